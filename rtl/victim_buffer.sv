// victim_buffer: the victim buffer (VB) of a home bank controller.
//
// A line leaving this bank for another bank (eviction or migration) is put
// here and sent from here as a Fill message. The entry is kept HOLD cycles
// after the Fill has gone out, long enough for a NACK to come back; a NACK
// for the line (nack_valid/nack_addr) makes it send again. While the entry
// exists a search of this bank also searches the VB (lookup_addr ->
// lookup_hit/lookup_data), so a request that overtakes the moving line still
// finds it. DEPTH is the document's VB size (20; the document also gives the
// rule M + K = 16 + 3); HOLD = M + K cycles is this design's reading of
// "written to the successor bank after at the most M cycles" plus the
// worst-case network delay. Sending order is oldest slot first.
module victim_buffer
  import onuca_pkg::*;
#(
  parameter int DEPTH = 20,
  parameter int HOLD  = 19
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 ins_valid,   // insert a line (ignored when full)
  input  logic [ADDR_W-1:0]    ins_addr,
  input  logic [BANK_W-1:0]    ins_dest,    // bank the line moves to
  input  logic [LINE_BITS-1:0] ins_data,
  output logic                 full,
  output logic                 empty,
  input  logic [ADDR_W-1:0]    lookup_addr, // search port
  output logic                 lookup_hit,
  output logic [LINE_BITS-1:0] lookup_data,
  output logic                 send_valid,  // a line waits to be sent
  output logic [ADDR_W-1:0]    send_addr,
  output logic [BANK_W-1:0]    send_dest,
  output logic [LINE_BITS-1:0] send_data,
  input  logic                 send_ready,  // the Fill went out
  input  logic                 nack_valid,  // the Fill was refused
  input  logic [ADDR_W-1:0]    nack_addr
);
  localparam int IW = $clog2(DEPTH);
  localparam int TW = $clog2(HOLD + 1);

  logic [DEPTH-1:0]       v, sent;
  logic [ADDR_W-1:0]      a    [DEPTH];
  logic [BANK_W-1:0]      d    [DEPTH];
  logic [LINE_BITS-1:0]   data [DEPTH];
  logic [TW-1:0]          timer[DEPTH];
  logic [IW-1:0]          free_i, send_i, hit_i;
  logic                   has_free, has_send;

  always_comb begin
    has_free = 1'b0; free_i = '0;
    has_send = 1'b0; send_i = '0;
    lookup_hit = 1'b0; hit_i = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!v[i]) begin has_free = 1'b1; free_i = IW'(i); end
      if (v[i] && !sent[i]) begin has_send = 1'b1; send_i = IW'(i); end
      if (v[i] && line_addr(a[i]) == line_addr(lookup_addr)) begin
        lookup_hit = 1'b1; hit_i = IW'(i);
      end
    end
    full        = !has_free;
    empty       = ~|v;
    lookup_data = data[hit_i];
    send_valid  = has_send;
    send_addr   = a[send_i];
    send_dest   = d[send_i];
    send_data   = data[send_i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v    <= '0;
      sent <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (v[i] && sent[i]) begin
          if (nack_valid && line_addr(a[i]) == line_addr(nack_addr)) sent[i] <= 1'b0;
          else if (timer[i] == '0) v[i] <= 1'b0;
          else timer[i] <= timer[i] - 1'b1;
        end
      end
      if (has_send && send_ready) begin
        sent[send_i]  <= 1'b1;
        timer[send_i] <= TW'(HOLD);
      end
      if (ins_valid && has_free) begin
        v[free_i]    <= 1'b1;
        sent[free_i] <= 1'b0;
        a[free_i]    <= ins_addr;
        d[free_i]    <= ins_dest;
        data[free_i] <= ins_data;
      end
    end
  end
endmodule

// optical_station: electrical side of one reservation-assisted SWMR station.
//
// Each tile's station owns one data waveguide that only it writes and every
// station reads, plus a slot on the reservation waveguides. Sending: the
// station picks one of its NL local senders (2 cores, 2 banks, and at some
// stations a memory controller) round-robin, and in that cycle broadcasts a
// 16-bit reservation word: bit 15 is the TM bit (1 = control message, one
// flit; 0 = data message, five flits) and bits 14..0 name the one receiving
// station among the 15 others (stations in order, the sender skipped; an
// all-zero word addresses the sender's own tile). It then drives the message
// as 128-bit flits, one per cycle: the 100-bit header first, then the 64-byte
// line in 4 flits for data messages. Receiving: for every writer there is a
// receiver that turns on when its bit is set, takes 1 or 5 flits as the TM
// bit says, turns off, and keeps the message in a landing slot until the
// addressed core or bank takes it (round-robin among writers). Each writer
// has one landing slot per local receiver (2 cores, 2 banks), so a bank that
// is not taking messages never holds up the others. A writer starts only
// when its landing slot for the destination node is free (slot_busy), which
// stands in for flow control the document does not describe.
// Latency: reservation cycle + 1 or 5 flit cycles, then local delivery.
// The reservation format follows the document (N bits: TM + N-1 receivers);
// unicast only, flit packing and landing slots are this design's choices.
module optical_station
  import onuca_pkg::*;
#(
  parameter int ST = 0,    // this station
  parameter int N  = 16,   // stations
  parameter int NL = 5     // local senders
) (
  input  logic                      clk,
  input  logic                      rst_n,
  // local senders
  input  logic [NL-1:0]             src_valid,
  input  msg_t [NL-1:0]             src_msg,
  output logic [NL-1:0]             src_ready,
  // local receivers: core 2ST, core 2ST+1, bank 2ST, bank 2ST+1
  output logic [3:0]                dst_valid,
  output msg_t [3:0]                dst_msg,
  input  logic [3:0]                dst_ready,
  // own waveguides
  output logic                      res_valid,
  output logic [N-1:0]              res_word,
  output logic                      flit_valid,
  output logic [FLIT_BITS-1:0]      flit,
  // all stations' waveguides
  input  logic [N-1:0]              res_valid_in,
  input  logic [N-1:0][N-1:0]       res_word_in,
  input  logic [N-1:0]              flit_valid_in,
  input  logic [N-1:0][FLIT_BITS-1:0] flit_in,
  // flow control: my landing slot per writer, and mine at every station
  output logic [N-1:0][3:0]         slot_busy,      // [writer][local receiver]
  input  logic [N-1:0][3:0]         dest_slot_busy, // [receiving station][its local receiver]
  output logic                      idle
);
  localparam int SW = $clog2(N);
  localparam int LW = $clog2(NL);

  function automatic logic [SW-1:0] station_of(input logic [NODE_W-1:0] n);
    return n[SW:1];
  endfunction

  // local receiver of a node at its station: 0/1 cores, 2/3 banks
  function automatic logic [1:0] local_of(input logic [NODE_W-1:0] n);
    return {n[NODE_W-1], n[0]};
  endfunction

  // ---------------- transmitter
  logic              sending;
  logic [2:0]        fl_idx, fl_last;
  msg_t              tx_msg;
  logic [LW-1:0]     rr, pick;
  logic              can_go;

  always_comb begin
    can_go = 1'b0;
    pick   = rr;
    for (int k = NL - 1; k >= 0; k--) begin
      automatic logic [LW-1:0] i = LW'((int'(rr) + k) % NL);
      if (src_valid[i] && !dest_slot_busy[station_of(src_msg[i].hdr.dst_id)]
                                         [local_of(src_msg[i].hdr.dst_id)]) begin
        can_go = 1'b1;
        pick   = i;
      end
    end
    src_ready = '0;
    if (!sending) src_ready[pick] = can_go;
  end

  // reservation word for the chosen message
  always_comb begin
    automatic logic [SW-1:0] d = station_of(src_msg[pick].hdr.dst_id);
    res_valid = !sending && can_go;
    res_word  = '0;
    res_word[N-1] = !has_payload(src_msg[pick].hdr.mtype);
    if (int'(d) != ST)
      res_word[(int'(d) < ST) ? int'(d) : int'(d) - 1] = 1'b1;
  end

  always_comb begin
    flit_valid = sending;
    flit       = '0;
    if (fl_idx == 3'd0) flit[$bits(msg_hdr_t)-1:0] = tx_msg.hdr;
    else                flit = tx_msg.data[(int'(fl_idx) - 1) * FLIT_BITS +: FLIT_BITS];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sending <= 1'b0;
      rr      <= '0;
      fl_idx  <= '0;
      fl_last <= '0;
    end else if (!sending) begin
      if (can_go) begin
        sending <= 1'b1;
        tx_msg  <= src_msg[pick];
        fl_idx  <= '0;
        fl_last <= has_payload(src_msg[pick].hdr.mtype) ? 3'(DATA_FLITS - 1) : 3'd0;
        rr      <= LW'((int'(pick) + 1) % NL);
      end
    end else begin
      fl_idx <= fl_idx + 1'b1;
      if (fl_idx == fl_last) sending <= 1'b0;
    end
  end

  // ---------------- receivers, one per writer
  logic [N-1:0]           rx_on;
  logic [N-1:0][2:0]      rx_idx, rx_last;
  logic [N-1:0][1:0]      rx_loc;              // landing slot being filled
  logic [N-1:0][3:0]      land_v;              // [writer][local receiver]
  msg_t                   land [N][4];
  logic [3:0][SW-1:0]     drr, dsel;

  function automatic logic for_me(input int w, input logic [N-1:0] word);
    if (w == ST) return word[N-2:0] == '0;
    return word[(ST < w) ? ST : ST - 1];
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rx_on  <= '0;
      land_v <= '0;
    end else begin
      for (int w = 0; w < N; w++) begin
        if (res_valid_in[w] && for_me(w, res_word_in[w])) begin
          rx_on[w]   <= 1'b1;
          rx_idx[w]  <= '0;
          rx_last[w] <= res_word_in[w][N-1] ? 3'd0 : 3'(DATA_FLITS - 1);
        end
        if (rx_on[w] && flit_valid_in[w]) begin
          if (rx_idx[w] == 3'd0) begin
            automatic msg_hdr_t h = flit_in[w][$bits(msg_hdr_t)-1:0];
            rx_loc[w]                      <= local_of(h.dst_id);
            land[w][local_of(h.dst_id)]    <= '0;
            land[w][local_of(h.dst_id)].hdr <= h;
            if (rx_last[w] == 3'd0) land_v[w][local_of(h.dst_id)] <= 1'b1;
          end else begin
            land[w][rx_loc[w]].data[(int'(rx_idx[w]) - 1) * FLIT_BITS +: FLIT_BITS] <= flit_in[w];
            if (rx_idx[w] == rx_last[w]) land_v[w][rx_loc[w]] <= 1'b1;
          end
          rx_idx[w] <= rx_idx[w] + 1'b1;
          if (rx_idx[w] == rx_last[w]) rx_on[w] <= 1'b0;
        end
      end
      for (int l = 0; l < 4; l++)
        if (dst_valid[l] && dst_ready[l]) land_v[dsel[l]][l] <= 1'b0;
    end
  end

  // ---------------- local delivery, round-robin among writers
  always_comb begin
    for (int l = 0; l < 4; l++) begin
      dst_valid[l] = 1'b0;
      dsel[l]      = drr[l];
      for (int k = N - 1; k >= 0; k--) begin
        automatic logic [SW-1:0] w = drr[l] + SW'(k);
        if (land_v[w][l]) begin
          dst_valid[l] = 1'b1;
          dsel[l]      = w;
        end
      end
      dst_msg[l] = land[dsel[l]][l];
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) drr <= '0;
    else
      for (int l = 0; l < 4; l++)
        if (dst_valid[l] && dst_ready[l]) drr[l] <= dsel[l] + 1'b1;

  always_comb
    for (int w = 0; w < N; w++) slot_busy[w] = land_v[w] | {4{rx_on[w]}};
  assign idle = !sending && (rx_on == '0) && (land_v == '0);
endmodule

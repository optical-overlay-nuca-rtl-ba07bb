// rcb: response-collection buffer of a home bank.
//
// One entry per home-bank miss that is being searched for in the overflow
// banks: message id, block address, requesting core and the miss-response
// bit vector (MRBV, one bit per overflow bank, 4 in OP_BCAST). A Miss from
// overflow bank j sets bit j; a Hit with the same message id frees the entry.
// When all MRBV bits are set the line is in no bank: the entry requests the
// line from main memory (mem_valid, lowest such entry first) and is freed
// when the request is taken. Misses or Hits for an id not in the buffer are
// ignored (they belong to a search already answered). Allocation returns the
// lowest free slot; `full` stalls new searches. DEPTH 128 is the document's.
module rcb
  import onuca_pkg::*;
#(
  parameter int DEPTH  = 128,
  parameter int MRBV_W = 4
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               alloc_valid,
  input  logic [MSGID_W-1:0] alloc_id,
  input  logic [ADDR_W-1:0]  alloc_addr,
  input  logic [CORE_W-1:0]  alloc_core,
  output logic               full,
  output logic               empty,
  input  logic               miss_valid,   // Miss message
  input  logic [MSGID_W-1:0] miss_id,
  input  logic [$clog2(MRBV_W)-1:0] miss_bit, // overflow slot of its sender
  input  logic               hit_valid,    // Hit message
  input  logic [MSGID_W-1:0] hit_id,
  output logic               mem_valid,    // read main memory for this entry
  output logic [MSGID_W-1:0] mem_id,
  output logic [ADDR_W-1:0]  mem_addr,
  output logic [CORE_W-1:0]  mem_core,
  input  logic               mem_ready
);
  localparam int IW = $clog2(DEPTH);

  logic [DEPTH-1:0]       v;
  logic [MSGID_W-1:0]     id   [DEPTH];
  logic [ADDR_W-1:0]      addr [DEPTH];
  logic [CORE_W-1:0]      core [DEPTH];
  logic [MRBV_W-1:0]      mrbv [DEPTH];
  logic [IW-1:0]          free_i, done_i;
  logic                   has_free, has_done;

  always_comb begin
    has_free = 1'b0; free_i = '0;
    has_done = 1'b0; done_i = '0;
    for (int i = DEPTH - 1; i >= 0; i--) begin
      if (!v[i]) begin has_free = 1'b1; free_i = IW'(i); end
      if (v[i] && &mrbv[i]) begin has_done = 1'b1; done_i = IW'(i); end
    end
    full      = !has_free;
    empty     = ~|v;
    mem_valid = has_done;
    mem_id    = id[done_i];
    mem_addr  = addr[done_i];
    mem_core  = core[done_i];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v <= '0;
    end else begin
      for (int i = 0; i < DEPTH; i++) begin
        if (v[i] && miss_valid && id[i] == miss_id) mrbv[i][miss_bit] <= 1'b1;
        if (v[i] && hit_valid && id[i] == hit_id)   v[i] <= 1'b0;
      end
      if (has_done && mem_ready) v[done_i] <= 1'b0;
      if (alloc_valid && has_free) begin
        v[free_i]    <= 1'b1;
        id[free_i]   <= alloc_id;
        addr[free_i] <= alloc_addr;
        core[free_i] <= alloc_core;
        mrbv[free_i] <= '0;
      end
    end
  end
endmodule

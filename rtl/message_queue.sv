// message_queue: the home bank controller's message queue (MQ).
//
// A FIFO of request and data messages waiting for the cache bank, processed
// in arrival order. `full` tells the NACK controller to refuse new messages.
// A Kill message (kill_valid/kill_id) removes, in one cycle, every queued
// request that carries the same message id; `killed` pulses when at least one
// was removed (an "effective kill"). Removed entries keep their slot until
// they reach the head, where they are dropped without being presented. The
// queue presents its head on out_valid/out_msg; out_pop takes it. Depth 16
// is the document's MQ size. The in-place invalidation is this design's way
// of making a Kill search the queue.
module message_queue
  import onuca_pkg::*;
#(
  parameter int DEPTH = 16
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                in_valid,   // enqueue in_msg (ignored when full)
  input  msg_t                in_msg,
  output logic                full,
  output logic                empty,
  output logic                out_valid,  // head is a live message
  output msg_t                out_msg,
  input  logic                out_pop,
  input  logic                kill_valid, // Kill message arrived
  input  logic [MSGID_W-1:0]  kill_id,
  output logic                killed      // a queued copy was removed
);
  localparam int AW = $clog2(DEPTH);

  msg_t             q   [DEPTH];
  logic [DEPTH-1:0] live;
  logic [AW-1:0]    head, tail;
  logic [AW:0]      count;
  logic [DEPTH-1:0] kill_hit;

  assign full      = (count == (AW+1)'(DEPTH));
  assign empty     = (count == '0);
  assign out_valid = !empty && live[head];
  assign out_msg   = q[head];

  always_comb
    for (int i = 0; i < DEPTH; i++)
      kill_hit[i] = kill_valid && live[i] && q[i].hdr.mtype == MSG_REQ && q[i].hdr.msg_id == kill_id;

  wire do_push = in_valid && !full;
  wire do_pop  = !empty && (!live[head] || out_pop);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head   <= '0;
      tail   <= '0;
      count  <= '0;
      live   <= '0;
      killed <= 1'b0;
    end else begin
      killed <= |kill_hit;
      live   <= live & ~kill_hit;
      if (do_pop) begin
        live[head] <= 1'b0;
        head       <= head + 1'b1;
      end
      if (do_push) begin
        q[tail]    <= in_msg;
        live[tail] <= 1'b1;
        tail       <= tail + 1'b1;
      end
      count <= count + (AW+1)'(do_push) - (AW+1)'(do_pop);
    end
  end
endmodule

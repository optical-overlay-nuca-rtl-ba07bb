// l2_requester: a core's port into the shared L2.
//
// Takes one L1 miss at a time (miss_valid/miss_addr when miss_ready), sends a
// request to the home bank chosen by the address, and waits. A NACK (home
// message queue full) makes it wait and send again: 2 cycles after the first
// NACK, then twice as long after each further one (exponential backoff, up to
// MAX_BACKOFF cycles), as the document describes. The data response is
// returned on resp_valid/resp_addr/resp_data. `hold` (overlay
// reconfiguration) keeps new misses out. The request's message id is the
// core's own 32-bit count; the home bank replaces it when it searches.
module l2_requester
  import onuca_pkg::*;
#(
  parameter int CORE        = 0,
  parameter int MAX_BACKOFF = 64
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 hold,        // do not accept new misses
  input  logic                 miss_valid,
  input  logic [ADDR_W-1:0]    miss_addr,
  output logic                 miss_ready,
  output logic                 net_out_valid,
  output msg_t                 net_out,
  input  logic                 net_out_ready,
  input  logic                 net_in_valid, // response or NACK for this core
  input  msg_t                 net_in,
  output logic                 resp_valid,
  output logic [ADDR_W-1:0]    resp_addr,
  output logic [LINE_BITS-1:0] resp_data,
  output logic                 busy,
  output logic                 nacked       // pulse per NACK received
);
  typedef enum logic [1:0] {R_IDLE, R_SEND, R_WAIT, R_BACKOFF} rstate_e;
  rstate_e st;
  logic [ADDR_W-1:0]   addr;
  logic [MSGID_W-1:0]  id;
  logic [$clog2(MAX_BACKOFF+1)-1:0] backoff, wait_cnt;

  assign miss_ready = (st == R_IDLE) && !hold;
  assign busy       = (st != R_IDLE);

  always_comb begin
    net_out_valid = (st == R_SEND);
    net_out.hdr   = '{msg_id: id, core_id: CORE_W'(CORE), src_id: core_node(CORE_W'(CORE)),
                      dst_id: bank_node(home_of(addr)), mtype: MSG_REQ,
                      home_id: bank_node(home_of(addr)), addr: addr};
    net_out.data  = '0;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st         <= R_IDLE;
      id         <= '0;
      backoff    <= '0;
      wait_cnt   <= '0;
      resp_valid <= 1'b0;
      nacked     <= 1'b0;
    end else begin
      resp_valid <= 1'b0;
      nacked     <= 1'b0;
      unique case (st)
        R_IDLE: if (miss_valid && miss_ready) begin
          addr    <= line_addr(miss_addr);
          id      <= id + 1'b1;
          backoff <= 2;
          st      <= R_SEND;
        end
        R_SEND: if (net_out_ready) st <= R_WAIT;
        R_WAIT: if (net_in_valid) begin
          if (net_in.hdr.mtype == MSG_NACK) begin
            nacked   <= 1'b1;
            wait_cnt <= backoff;
            if (backoff < ($clog2(MAX_BACKOFF+1))'(MAX_BACKOFF)) backoff <= backoff << 1;
            st       <= R_BACKOFF;
          end else if (net_in.hdr.mtype == MSG_RESP) begin
            resp_valid <= 1'b1;
            resp_addr  <= addr;
            resp_data  <= net_in.data;
            st         <= R_IDLE;
          end
        end
        R_BACKOFF: begin
          wait_cnt <= wait_cnt - 1'b1;
          if (wait_cnt <= 1) st <= R_SEND;
        end
        default: st <= R_IDLE;
      endcase
    end
  end
endmodule

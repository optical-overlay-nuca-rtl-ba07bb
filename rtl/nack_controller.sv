// nack_controller: refuses messages that find the message queue full.
//
// A request or Fill arriving while the MQ is full is not queued; instead a
// one-flit NACK goes back to its sender carrying the refused message's
// header (message id, core, home bank, address), so the sender can tell what
// to resend. Combinational. Messages from main memory are never refused: they
// wait in the network instead (this design's choice, since the memory side
// has no retry path in the document).
module nack_controller
  import onuca_pkg::*;
(
  input  logic              in_valid,   // message arriving at the bank
  input  msg_hdr_t          in_hdr,
  input  logic              mq_full,
  input  logic [NODE_W-1:0] my_node,
  output logic              enqueue,    // put the message in the MQ
  output logic              nack_valid, // send nack_hdr instead
  output msg_hdr_t          nack_hdr
);
  logic queued_type;
  always_comb begin
    queued_type = (in_hdr.mtype == MSG_REQ) || (in_hdr.mtype == MSG_FILL) ||
                  (in_hdr.mtype == MSG_MEMFILL);
    enqueue     = in_valid && queued_type && !mq_full;
    nack_valid  = in_valid && mq_full &&
                  (in_hdr.mtype == MSG_REQ || in_hdr.mtype == MSG_FILL);
    nack_hdr        = in_hdr;
    nack_hdr.mtype  = MSG_NACK;
    nack_hdr.src_id = my_node;
    nack_hdr.dst_id = in_hdr.src_id;
  end
endmodule

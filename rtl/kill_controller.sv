// kill_controller: builds the Kill messages sent after an overflow-bank hit.
//
// When a forwarded search hits in overflow bank i of an overlay, the other
// overflow banks of that overlay (at most 3 in OP_BCAST) may still hold a
// queued copy of the same search. One Kill message with the request's
// message id is produced for each of them (kill_valid[j] for overflow slot
// j), so those banks drop the copy before it costs a bank access.
// Combinational.
module kill_controller
  import onuca_pkg::*;
(
  input  logic                         hit_in_ovf,  // hit at an overflow bank
  input  logic [1:0]                   my_idx,      // this bank's overflow slot
  input  logic [N_OVF-1:0][BANK_W-1:0] ovf_banks,   // overflow banks of the overlay
  input  msg_hdr_t                     req_hdr,     // the request that hit
  input  logic [NODE_W-1:0]            my_node,
  output logic [N_OVF-1:0]             kill_valid,
  output msg_hdr_t [N_OVF-1:0]         kill_hdr
);
  always_comb
    for (int j = 0; j < N_OVF; j++) begin
      kill_valid[j]       = hit_in_ovf && (2'(j) != my_idx);
      kill_hdr[j]         = req_hdr;
      kill_hdr[j].mtype   = MSG_KILL;
      kill_hdr[j].src_id  = my_node;
      kill_hdr[j].dst_id  = bank_node(ovf_banks[j]);
    end
endmodule

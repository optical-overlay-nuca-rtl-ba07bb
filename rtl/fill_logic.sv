// fill_logic: prepares a line arriving at this bank for the cache.
//
// A Fill (a line moved here by an eviction or a migration) or a memory fill
// is written into the bank at its address. The line's state bits for the
// reconfiguration controller are derived here: foreign = 1 when this bank is
// not the line's home bank, position = the home bank's bank-map slot (0..3)
// in its overlay. Memory fills also produce the response to the waiting core.
// Combinational.
module fill_logic
  import onuca_pkg::*;
(
  input  msg_t              msg,        // Fill or memory-fill message
  input  logic [BANK_W-1:0] my_bank,
  input  home_info_t        home,       // overlay info of the line's home bank
  output logic [ADDR_W-1:0] fill_addr,
  output logic [LINE_BITS-1:0] fill_data,
  output logic [2:0]        state_bits, // {foreign, position} for the SRAM
  output logic              respond     // memory fill: answer the core
);
  always_comb begin
    fill_addr  = line_addr(msg.hdr.addr);
    fill_data  = msg.data;
    state_bits = {home_of(msg.hdr.addr) != my_bank, home.pos};
    respond    = (msg.hdr.mtype == MSG_MEMFILL);
  end
endmodule

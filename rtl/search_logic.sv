// search_logic: OP_BCAST decision for one processed request.
//
// Given the outcome of the lookup in the bank and its victim buffer, decides
// what the home bank controller sends:
//  * hit anywhere: the data response to the requesting core;
//  * hit at an overflow bank: also a Hit to the home bank (frees its RCB
//    entry), Kills to the other overflow banks, and, for a hit in the bank
//    itself, migration of the line one step towards the home bank;
//  * miss at a home bank that is a base bank: allocate an RCB entry and
//    forward the request to the 4 overflow banks (case 1 of the document);
//  * miss at a home bank in no base set: read main memory (case 2);
//  * miss at an overflow bank: a Miss to the home bank.
// Combinational.
module search_logic (
  input  logic is_home,      // this bank is the request's home bank
  input  logic searchable,   // the home bank is a base bank of an overlay
  input  logic hit_bank,     // found in the cache bank
  input  logic hit_vb,       // found in the victim buffer
  input  logic mig_valid,    // this bank is in the line's overflow chain
  output logic send_resp,
  output logic send_hit,
  output logic send_kill,
  output logic migrate,
  output logic forward,
  output logic mem_read,
  output logic send_miss
);
  logic hit;
  always_comb begin
    hit       = hit_bank || hit_vb;
    send_resp = hit;
    send_hit  = hit && !is_home;
    send_kill = hit && !is_home;
    migrate   = hit_bank && !is_home && mig_valid;
    forward   = !hit && is_home && searchable;
    mem_read  = !hit && is_home && !searchable;
    send_miss = !hit && !is_home;
  end
endmodule

// logic_circuit: evaluates the eviction predicate on one SRAM row.
//
// Each of the 64 entries {foreign, position[1:0]} of a row read from the
// reconfiguration SRAM goes through its own small checker; the 64 one-bit
// results are registered (one cycle) and handed to the bit_pos circuits.
// A line matches when (need_foreign is 0 or its foreign bit is 1) and its
// position is selected in pos_mask. The document's predicate checks "foreign
// and/or a position value"; a 4-bit position mask (all ones = any position)
// is this design's way to express both cases and several positions at once.
module logic_circuit #(
  parameter int ROW_ENTRIES = 64
) (
  input  logic                         clk,
  input  logic                         en,           // register a new result
  input  logic [ROW_ENTRIES*3-1:0]     row,          // entries from the SRAM
  input  logic                         need_foreign, // line must be foreign
  input  logic [3:0]                   pos_mask,     // accepted position values
  output logic [ROW_ENTRIES-1:0]       result        // 1 = evict this line
);
  logic [ROW_ENTRIES-1:0] match;
  always_comb
    for (int e = 0; e < ROW_ENTRIES; e++)
      match[e] = (!need_foreign || row[3*e+2]) && pos_mask[row[3*e +: 2]];

  always_ff @(posedge clk)
    if (en) result <= match;
endmodule

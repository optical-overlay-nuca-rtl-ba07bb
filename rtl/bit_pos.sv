// bit_pos: first-level scanner of the reconfiguration controller.
//
// Holds a 4-bit slice (slice IDX) of the 64 predicate results of a row. It
// reports the lowest set bit as a position 0..63 within the row (valid/pos)
// and clears that bit in the cycle it receives ack, so the next set bit is
// reported in the following cycle: a slice 0011 takes two cycles, 1111 four.
// Zero bits are skipped. `load` replaces the slice with a new row's bits.
module bit_pos #(
  parameter int IDX = 0
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       load,     // take bits_in
  input  logic [3:0] bits_in,  // predicate results of this slice
  input  logic       ack,      // select circuit took the reported bit
  output logic       valid,    // a set bit remains
  output logic [5:0] pos       // its position in the 64-bit row
);
  logic [3:0] bits;
  logic [1:0] low;

  always_comb begin
    low = 2'd0;
    for (int i = 3; i >= 0; i--) if (bits[i]) low = 2'(i);
    valid = |bits;
    pos   = 6'(IDX * 4) + 6'(low);
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)      bits <= '0;
    else if (load)   bits <= bits_in;
    else if (ack)    bits[low] <= 1'b0;
endmodule

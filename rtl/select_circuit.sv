// select_circuit: second-level selector of the reconfiguration controller.
//
// Chooses one of the 16 bit_pos outputs per cycle (the lowest-numbered valid
// one: fixed priority is this design's choice), sends it an ACK so it can move
// to its next bit, and adds its row-relative position to the row base from the
// counter to give the index of the line to evict. `en` is low while the bank
// cannot accept an eviction; nothing is acknowledged then. all_zero tells the
// control unit that the row is finished. Combinational.
module select_circuit #(
  parameter int N = 16
) (
  input  logic             en,         // the bank takes an eviction this cycle
  input  logic [N-1:0]     valid,      // bit_pos reports
  input  logic [N-1:0][5:0] pos,       // their positions in the row
  input  logic [10:0]      base,       // counter: first line of the row
  output logic [N-1:0]     ack,        // one-hot ACK to the chosen bit_pos
  output logic             evict,      // a line is reported this cycle
  output logic [10:0]      line,       // index of the line to evict
  output logic             all_zero    // no bit left in the row
);
  always_comb begin
    ack   = '0;
    line  = base;
    for (int i = N - 1; i >= 0; i--)
      if (valid[i]) begin
        ack  = '0;
        ack[i] = en;
        line = base + 11'(pos[i]);
      end
    all_zero = ~|valid;
    evict    = en & ~all_zero;
  end
endmodule

// tb_logic_circuit: 64 predicate results registered from a random row.
module tb_logic_circuit;
  import tb_util_pkg::*;
  logic clk = 0, en = 0, need_foreign;
  logic [191:0] row;
  logic [3:0] pos_mask;
  logic [63:0] result, expv;
  always #5 clk = ~clk;
  logic_circuit dut (.*);
  initial begin #100000 failures++; report(); $finish; end
  initial begin
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int w = 0; w < 6; w++) row[32*w +: 32] = $urandom;
      need_foreign = 1'($urandom);
      pos_mask = 4'($urandom);
      en = 1;
      for (int e = 0; e < 64; e++)
        expv[e] = (!need_foreign || row[3*e+2]) && pos_mask[row[3*e +: 2]];
      @(negedge clk); en = 0;
      chk(result == expv, $sformatf("t=%0d result %h exp %h", t, result, expv));
    end
    report(); $finish;
  end
endmodule

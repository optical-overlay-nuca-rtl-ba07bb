// tb_reconf_controller: writes random line states, scans with predicates and
// compares the reported lines and the cycle count with a reference model.
module tb_reconf_controller;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, trigger = 0, start = 0, need_foreign = 0;
  logic [10:0] address, row_num;
  logic [2:0] update;
  logic [3:0] pos_mask = '0;
  logic override, evict_ready = 1, busy, done;
  logic [2:0] model [2048];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  reconf_controller dut (.*);
  initial begin #400000 failures++; report(); $finish; end

  task automatic scan(input bit nf, input logic [3:0] pm);
    int exp_list [$], got [$];
    int s, d;
    for (int i = 0; i < 2048; i++)
      if ((!nf || model[i][2]) && pm[model[i][1:0]]) exp_list.push_back(i);
    @(negedge clk); start = 1; need_foreign = nf; pos_mask = pm;
    @(negedge clk); start = 0; s = cyc; need_foreign = 0; pos_mask = '0;
    while (!done) begin
      if (override) got.push_back(int'(row_num));
      @(negedge clk);
    end
    d = cyc;
    chk(got == exp_list, $sformatf("nf=%0b pm=%b: %0d lines, exp %0d", nf, pm, got.size(), exp_list.size()));
    chk(d - s == 128 + exp_list.size(), $sformatf("cycles %0d exp %0d", d - s, 128 + exp_list.size()));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); trigger = 1; address = 11'(i);
      update = (($urandom % 8) == 0) ? {1'b1, 2'($urandom)} : {1'b0, 2'($urandom)};
      model[i] = update;
    end
    @(negedge clk); trigger = 0;
    scan(1'b1, 4'b1111);   // all foreign lines (bank left an overflow set)
    scan(1'b1, 4'b0100);   // foreign lines of position 2
    scan(1'b1, 4'b0000);   // nothing
    scan(1'b0, 4'b0001);   // position only
    report(); $finish;
  end
endmodule

// tb_reconf_control_unit: scan order, one eviction per cycle, 4 cycles per
// empty row (128 cycles for an empty bank) plus one cycle per reported line.
module tb_reconf_control_unit;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, start = 0, busy, done, cu_trigger, cu_grant, logic_en;
  logic override, evict_ready = 1;
  logic [4:0] cu_row;
  logic [63:0] result;
  logic [10:0] row_num;
  logic [63:0] pat [32];
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  assign cu_grant = cu_trigger;
  always_ff @(posedge clk) if (logic_en) result <= pat[cu_row];
  reconf_control_unit dut (.*);
  initial begin #200000 failures++; report(); $finish; end

  task automatic run(input int density, input bit stall);
    int exp_list [$], got [$];
    int s, d, k;
    for (int r = 0; r < 32; r++) begin
      pat[r] = '0;
      for (int e = 0; e < 64; e++) if (($urandom % 100) < density) pat[r][e] = 1'b1;
      for (int e = 0; e < 64; e++) if (pat[r][e]) exp_list.push_back(64 * r + e);
    end
    @(negedge clk); start = 1;
    @(negedge clk); start = 0; s = cyc;
    while (!done) begin
      if (stall) evict_ready = 1'($urandom);
      #1;
      if (override && evict_ready) got.push_back(int'(row_num));
      @(negedge clk);
    end
    d = cyc; evict_ready = 1;
    k = exp_list.size();
    chk(got.size() == k, $sformatf("count %0d exp %0d", got.size(), k));
    for (int i = 0; i < k && i < got.size(); i++)
      chk(got[i] == exp_list[i], $sformatf("eviction %0d: %0d exp %0d", i, got[i], exp_list[i]));
    if (!stall) chk(d - s == 128 + k, $sformatf("cycles %0d exp %0d", d - s, 128 + k));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    run(0, 0);
    run(5, 0);
    run(30, 0);
    run(10, 1);
    report(); $finish;
  end
endmodule

// tb_overlay_builder: counts accesses, sorts the banks and checks the six
// overlays and the OBV against the OP_BCAST grouping; also the epoch trigger.
module tb_overlay_builder;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, change_overlay = 0, busy, done;
  logic [31:0] bank_access = '0, threshold = '0;
  osv_t osv;
  obv_t obv;
  always #5 clk = ~clk;
  overlay_builder #(.CNT_W(16)) dut (.*);
  initial begin #200000 failures++; report(); $finish; end

  int perm [32];
  int cnt [32];
  task automatic check_build();
    int rank_of [32];
    int order [32];
    // expected order: descending count, ties by lower id (insertion sort)
    for (int b = 0; b < 32; b++) begin
      automatic int j = b;
      order[b] = b;
      while (j > 0 && cnt[order[j-1]] < cnt[order[j]]) begin
        automatic int t = order[j]; order[j] = order[j-1]; order[j-1] = t; j--;
      end
    end
    for (int o = 0; o < 6; o++)
      for (int s = 0; s < 4; s++) begin
        chk(osv[o][s] == 5'(order[base_rank(o) + s]), $sformatf("ovl %0d base %0d", o, s));
        chk(osv[o][4+s] == 5'(order[ovf_rank(o) + s]), $sformatf("ovl %0d ovf %0d", o, s));
      end
    for (int r = 0; r < 32; r++) chk(obv[order[r]] == (r >= 16), $sformatf("obv rank %0d", r));
  endtask

  initial begin
    int s;
    repeat (2) @(posedge clk); rst_n = 1;
    for (int b = 0; b < 32; b++) cnt[b] = (b * 37) % 101;
    cnt[3] = cnt[9];  // a tie
    for (int k = 0; k < 101; k++) begin
      @(negedge clk);
      for (int b = 0; b < 32; b++) bank_access[b] = (k < cnt[b]);
    end
    @(negedge clk); bank_access = '0; change_overlay = 1;
    @(negedge clk); change_overlay = 0; s = 0;
    while (!done && s < 100) begin @(negedge clk); s++; end
    chk(done, "build done");
    chk(s == 33, $sformatf("build time %0d cycles", s + 1));
    check_build();
    // second epoch, started by the threshold
    for (int b = 0; b < 32; b++) cnt[b] = (31 - b) % 7;
    for (int k = 0; k < 7; k++) begin
      @(negedge clk);
      for (int b = 0; b < 32; b++) bank_access[b] = (k < cnt[b]);
    end
    @(negedge clk); bank_access = '0; threshold = 60;
    s = 0;
    while (!done && s < 200) begin @(negedge clk); s++; end
    threshold = 0;
    chk(done, "threshold build");
    check_build();
    report(); $finish;
  end
endmodule

// tb_reconf_sequencer: state sequence (drain, start, scan, load) and the
// eviction predicates for the two reconfiguration cases.
module tb_reconf_sequencer;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, build_done = 0, sys_idle = 0;
  logic suspend, reconf_mode, rc_start, ovl_load, ovl_valid;
  logic [31:0] rc_busy = '0, need_foreign;
  logic [31:0][3:0] pos_mask;
  osv_t new_osv, load_osv, cur_osv;
  obv_t new_obv, load_obv;
  logic [15:0] n_reconf;
  always #5 clk = ~clk;
  reconf_sequencer dut (.*);
  initial begin #100000 failures++; report(); $finish; end

  task automatic install(input osv_t o, input bit check_mask, input logic [31:0] exp_nf,
                         input logic [31:0][3:0] exp_pm);
    int n;
    new_osv = o; new_obv = '0; sys_idle = 0;
    build_done = 1; @(negedge clk); build_done = 0;
    chk(suspend && !reconf_mode, "suspend, draining");
    repeat (3) @(negedge clk);
    chk(!rc_start, "waits for idle");
    if (check_mask) begin
      chk(need_foreign == exp_nf, $sformatf("need_foreign %h exp %h", need_foreign, exp_nf));
      for (int b = 0; b < 32; b++)
        chk(pos_mask[b] == exp_pm[b], $sformatf("pos_mask bank %0d %b exp %b", b, pos_mask[b], exp_pm[b]));
    end
    sys_idle = 1; @(negedge clk);
    chk(rc_start && reconf_mode, "start");
    @(negedge clk); rc_busy = 32'h0000_ffff;
    chk(reconf_mode && !rc_start, "scan");
    repeat (5) @(negedge clk);
    chk(!ovl_load, "waits for controllers");
    rc_busy = 0; @(negedge clk);
    chk(ovl_load && load_osv == o, "load");
    @(negedge clk);
    chk(!suspend && ovl_valid && cur_osv == o, "running");
  endtask

  initial begin
    osv_t a, b;
    logic [31:0] nf;
    logic [31:0][3:0] pm;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    a = ident_osv();
    install(a, 1, '0, '0);   // first overlay: nothing foreign
    chk(n_reconf == 1, "count 1");
    // case 1: overlay 0 base slot 2 and slot 3 change (banks 2,3 -> 3,2)
    // its overflow banks 28..31 stay and must give up positions 2 and 3;
    // case 2: overlay 1 overflow bank 16 replaced by bank 0 (16 leaves)
    b = a;
    b[0][2] = 5'd3; b[0][3] = 5'd2;
    b[1][4] = 5'd0;
    nf = '0; pm = '0;
    for (int k = 28; k < 32; k++) begin nf[k] = 1; pm[k] = 4'b1100; end
    nf[16] = 1; pm[16] = 4'b1111;
    install(b, 1, nf, pm);
    chk(n_reconf == 2, "count 2");
    report(); $finish;
  end
endmodule

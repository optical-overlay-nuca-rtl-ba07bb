// tb_overlay_info_store: invalid until loaded; then holds OSV/OBV and the
// bank's own home-overlay information.
module tb_overlay_info_store;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, valid, my_infreq;
  osv_t new_osv, osv;
  obv_t new_obv, obv;
  logic [4:0] my_bank;
  home_info_t my_home;
  always #5 clk = ~clk;
  overlay_info_store dut (.*);
  initial begin #10000 failures++; report(); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    my_bank = 13;
    @(negedge clk); chk(!valid && !my_home.searchable, "no overlay after reset");
    new_osv = ident_osv(); new_obv = 32'hFFFF_0000; load = 1;
    @(negedge clk); load = 0; new_osv = '0; new_obv = '0;
    chk(valid && osv == ident_osv() && obv == 32'hFFFF_0000, "loaded");
    chk(my_home.searchable && my_home.ovl == 1 && my_home.pos == 1, "bank 13 in hybrid-o 1 slot 1");
    chk(!my_infreq, "bank 13 hybrid");
    my_bank = 26; #1;
    chk(!my_home.searchable && my_infreq, "bank 26 only overflow, infreq");
    my_bank = 21; #1;
    chk(my_home.searchable && my_home.ovl == 5 && my_home.pos == 1, "bank 21 infreq-o 5");
    report(); $finish;
  end
endmodule

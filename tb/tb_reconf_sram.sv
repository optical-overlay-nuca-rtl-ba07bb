// tb_reconf_sram: 3-bit writes land in the right row slot; row reads return them.
module tb_reconf_sram;
  import tb_util_pkg::*;
  logic clk = 0, trigger = 0, w_r = 0;
  logic [10:0] addr;
  logic [2:0] data_in;
  logic [191:0] data_out;
  logic [2:0] model [2048];
  always #5 clk = ~clk;
  reconf_sram dut (.*);
  initial begin #1000000 failures++; report(); $finish; end
  initial begin
    for (int i = 0; i < 2048; i++) begin
      @(negedge clk); trigger = 1; w_r = 1; addr = 11'(i); data_in = 3'($urandom);
      model[i] = data_in;
    end
    for (int k = 0; k < 300; k++) begin
      @(negedge clk); trigger = 1; w_r = 1; addr = 11'($urandom); data_in = 3'($urandom);
      model[addr] = data_in;
    end
    for (int r = 0; r < 32; r++) begin
      @(negedge clk); trigger = 1; w_r = 0; addr = 11'(64 * r + 5);
      @(negedge clk); trigger = 0;
      for (int e = 0; e < 64; e++)
        chk(data_out[3*e +: 3] == model[64*r + e], $sformatf("row %0d entry %0d", r, e));
    end
    report(); $finish;
  end
endmodule

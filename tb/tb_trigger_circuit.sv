// tb_trigger_circuit: cache-controller writes win; control-unit reads address row starts.
module tb_trigger_circuit;
  import tb_util_pkg::*;
  logic cc_trigger, cu_trigger, cu_grant, sram_trigger, sram_w_r;
  logic [10:0] cc_addr, sram_addr;
  logic [2:0] cc_update, sram_din;
  logic [4:0] cu_row;
  trigger_circuit dut (.*);
  initial begin
    for (int t = 0; t < 200; t++) begin
      cc_trigger = 1'($urandom); cu_trigger = 1'($urandom);
      cc_addr = 11'($urandom); cc_update = 3'($urandom); cu_row = 5'($urandom);
      #1;
      chk(sram_trigger == (cc_trigger | cu_trigger), "trigger");
      chk(cu_grant == (cu_trigger && !cc_trigger), "grant");
      if (cc_trigger) chk(sram_w_r && sram_addr == cc_addr && sram_din == cc_update, "write");
      else if (cu_trigger) chk(!sram_w_r && sram_addr == {cu_row, 6'd0}, "read");
    end
    report(); $finish;
  end
endmodule

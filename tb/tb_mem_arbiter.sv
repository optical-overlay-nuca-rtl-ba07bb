// tb_mem_arbiter: all requesters served in turn, no loss, back-pressure.
module tb_mem_arbiter;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 8;
  logic clk = 0, rst_n = 0, out_valid, out_ready = 0;
  logic [N-1:0] in_valid = '0, in_ready;
  mem_req_t [N-1:0] in_req;
  mem_req_t out_req;
  always #5 clk = ~clk;
  mem_arbiter #(.N(N)) dut (.*);
  initial begin #100000 failures++; report(); $finish; end
  initial begin
    int served [N];
    int order [$];
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < N; i++) begin in_req[i] = '0; in_req[i].msg_id = i; served[i] = 0; end
    in_valid = '1; #1;
    chk(out_valid && in_ready == 0, "no grant without ready");
    out_ready = 1;
    for (int c = 0; c < 4 * N; c++) begin
      #1;
      chk($countones(in_ready) == 1, "one grant");
      for (int i = 0; i < N; i++) if (in_ready[i]) begin
        served[i]++; order.push_back(i);
        chk(out_req.msg_id == i, "data of granted");
      end
      @(negedge clk);
    end
    for (int i = 0; i < N; i++) chk(served[i] == 4, $sformatf("fair %0d", i));
    for (int k = 1; k < order.size(); k++) chk(order[k] != order[k-1], "rotates");
    in_valid = 8'b0010_0100; #1;
    chk(in_ready == 8'b0000_0100 || in_ready == 8'b0010_0000, "sparse grant");
    in_valid = 0; #1;
    chk(!out_valid, "idle");
    report(); $finish;
  end
endmodule

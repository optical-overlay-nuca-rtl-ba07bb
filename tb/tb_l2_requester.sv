// tb_l2_requester: request header fields, NACK backoff of 2, 4, 8 cycles,
// response delivery, and the hold input.
module tb_l2_requester;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, hold = 0, miss_valid = 0, miss_ready;
  logic net_out_valid, net_out_ready = 0, net_in_valid = 0, resp_valid, busy, nacked;
  logic [ADDR_W-1:0] miss_addr, resp_addr;
  logic [LINE_BITS-1:0] resp_data;
  msg_t net_out, net_in;
  always #5 clk = ~clk;
  l2_requester #(.CORE(9), .MAX_BACKOFF(64)) dut (.*);
  initial begin #100000 failures++; report(); $finish; end

  task automatic reply(input msg_type_e t);
    net_in = '0; net_in.hdr.mtype = t; net_in.data = {16{32'hCAFE0001}};
    net_in_valid = 1; @(negedge clk); net_in_valid = 0;
  endtask

  initial begin
    int gap;
    logic [ADDR_W-1:0] a;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    a = mk_addr(21, 5, 3) | 42'h2a;
    miss_valid = 1; miss_addr = a;
    chk(miss_ready, "ready");
    @(negedge clk); miss_valid = 0;
    chk(busy && !miss_ready, "busy");
    chk(net_out_valid && net_out.hdr.mtype == MSG_REQ && net_out.hdr.dst_id == 6'(32 + 21) &&
        net_out.hdr.home_id == 6'(32 + 21) && net_out.hdr.src_id == 6'd9 &&
        net_out.hdr.core_id == 5'd9 && net_out.hdr.addr == line_addr(a), "request header");
    net_out_ready = 1; @(negedge clk); net_out_ready = 0;
    chk(!net_out_valid, "sent once");
    for (int n = 0; n < 3; n++) begin
      reply(MSG_NACK);
      chk(nacked, "nack pulse");
      gap = 0;
      while (!net_out_valid && gap < 100) begin @(negedge clk); gap++; end
      chk(gap == (2 << n), $sformatf("backoff %0d after NACK %0d", gap, n + 1));
      net_out_ready = 1; @(negedge clk); net_out_ready = 0;
    end
    reply(MSG_RESP);
    chk(resp_valid && resp_addr == line_addr(a) && resp_data == {16{32'hCAFE0001}}, "response");
    chk(!busy && miss_ready, "idle");
    hold = 1; #1;
    chk(!miss_ready, "hold blocks misses");
    hold = 0;
    // second miss restarts the backoff at 2
    miss_valid = 1; miss_addr = a + 64; @(negedge clk); miss_valid = 0;
    net_out_ready = 1; @(negedge clk); net_out_ready = 0;
    reply(MSG_NACK); gap = 0;
    while (!net_out_valid && gap < 100) begin @(negedge clk); gap++; end
    chk(gap == 2, "backoff restarts");
    net_out_ready = 1; @(negedge clk); net_out_ready = 0;
    reply(MSG_RESP);
    report(); $finish;
  end
endmodule

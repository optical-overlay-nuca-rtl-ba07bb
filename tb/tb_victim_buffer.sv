// tb_victim_buffer: insert, lookup, send order, hold time after sending,
// resend after a NACK, and full at 20 entries.
module tb_victim_buffer;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, ins_valid = 0, full, empty, lookup_hit, send_valid;
  logic send_ready = 0, nack_valid = 0;
  logic [41:0] ins_addr, lookup_addr, send_addr, nack_addr;
  logic [4:0] ins_dest, send_dest;
  logic [511:0] ins_data, lookup_data, send_data;
  always #5 clk = ~clk;
  victim_buffer dut (.*);
  initial begin #100000 failures++; report(); $finish; end
  initial begin
    int held;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); chk(empty && !send_valid, "empty");
    for (int i = 0; i < 20; i++) begin
      ins_valid = 1; ins_addr = mk_addr(i, i, 1); ins_dest = 5'(i); ins_data = {16{32'(i)}};
      @(negedge clk);
    end
    ins_valid = 0;
    chk(full, "full at 20");
    lookup_addr = mk_addr(7, 7, 1) | 42'h15; #1;
    chk(lookup_hit && lookup_data == {16{32'd7}}, "lookup by line address");
    lookup_addr = mk_addr(7, 8, 1); #1;
    chk(!lookup_hit, "lookup miss");
    // send the first entry
    chk(send_valid && send_addr == mk_addr(0, 0, 1) && send_dest == 0, "oldest first");
    send_ready = 1; @(negedge clk); send_ready = 0;
    chk(send_addr == mk_addr(1, 1, 1), "next unsent");
    // entry 0 stays searchable for 19 cycles, then leaves
    lookup_addr = mk_addr(0, 0, 1); #1;
    held = 0;
    while (lookup_hit && held < 40) begin @(negedge clk); held++; end
    chk(held >= 19 && held <= 21, $sformatf("held %0d cycles", held));
    chk(!full, "slot freed");
    // send entry 1, NACK it, it must be offered again
    send_ready = 1; @(negedge clk); send_ready = 0;
    nack_valid = 1; nack_addr = mk_addr(1, 1, 1); @(negedge clk); nack_valid = 0;
    chk(send_valid && send_addr == mk_addr(1, 1, 1), "resend after NACK");
    // drain everything
    send_ready = 1; repeat (25) @(negedge clk); send_ready = 0;
    repeat (25) @(negedge clk);
    chk(empty, "empty after hold times");
    report(); $finish;
  end
endmodule

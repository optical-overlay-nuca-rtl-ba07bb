// tb_bit_pos: bit_pos reports set bits LSB first, one per ACK, and skips zeros.
module tb_bit_pos;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, load = 0, ack = 0, valid;
  logic [3:0] bits_in = '0;
  logic [5:0] pos;
  always #5 clk = ~clk;
  bit_pos #(.IDX(5)) dut (.*);
  initial begin #5000 failures++; report(); $finish; end
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    for (int v = 0; v < 16; v++) begin
      int n;
      @(negedge clk); load = 1; bits_in = 4'(v);
      @(negedge clk); load = 0;
      n = 0;
      for (int b = 0; b < 4; b++) if (v[b]) begin
        chk(valid && pos == 6'(20 + b), $sformatf("v=%0d bit %0d pos=%0d", v, b, pos));
        ack = 1; @(negedge clk); ack = 0; n++;
      end
      chk(!valid, $sformatf("v=%0d empty after %0d acks", v, n));
    end
    report(); $finish;
  end
endmodule

// tb_select_circuit: lowest valid input wins, gets the ACK, line = base + pos.
module tb_select_circuit;
  import tb_util_pkg::*;
  logic en;
  logic [15:0] valid, ack;
  logic [15:0][5:0] pos;
  logic [10:0] base, line;
  logic evict, all_zero;
  select_circuit dut (.*);
  initial begin
    for (int t = 0; t < 300; t++) begin
      int exp_i;
      en = ($urandom % 4) != 0;
      valid = (t % 7 == 0) ? '0 : 16'($urandom);
      for (int i = 0; i < 16; i++) pos[i] = 6'(4 * i + $urandom % 4);
      base = 11'(64 * ($urandom % 32));
      #1;
      exp_i = -1;
      for (int i = 15; i >= 0; i--) if (valid[i]) exp_i = i;
      chk(all_zero == (exp_i < 0), "all_zero");
      chk(evict == (en && exp_i >= 0), "evict");
      if (exp_i >= 0) begin
        chk(ack == (en ? (16'd1 << exp_i) : 16'd0), $sformatf("ack %h", ack));
        chk(line == base + 11'(pos[exp_i]), "line");
      end else chk(ack == '0, "no ack");
    end
    report(); $finish;
  end
endmodule

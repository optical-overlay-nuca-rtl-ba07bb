// tb_search_logic: every input combination against the OP_BCAST decision table.
module tb_search_logic;
  import tb_util_pkg::*;
  logic is_home, searchable, hit_bank, hit_vb, mig_valid;
  logic send_resp, send_hit, send_kill, migrate, forward, mem_read, send_miss;
  search_logic dut (.*);
  initial begin
    for (int v = 0; v < 32; v++) begin
      logic h;
      {is_home, searchable, hit_bank, hit_vb, mig_valid} = 5'(v);
      #1;
      h = hit_bank | hit_vb;
      chk(send_resp == h, "resp");
      chk(send_hit == (h && !is_home) && send_kill == send_hit, "hit/kill");
      chk(migrate == (hit_bank && !is_home && mig_valid), "migrate");
      chk(forward == (!h && is_home && searchable), "forward");
      chk(mem_read == (!h && is_home && !searchable), "mem read");
      chk(send_miss == (!h && !is_home), "miss");
      chk(int'(send_resp) + int'(forward) + int'(mem_read) + int'(send_miss) == 1, "one outcome");
    end
    report(); $finish;
  end
endmodule

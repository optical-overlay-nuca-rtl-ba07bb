// tb_kill_controller: Kills go to the other three overflow banks only.
module tb_kill_controller;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic hit_in_ovf;
  logic [1:0] my_idx;
  logic [3:0][4:0] ovf_banks;
  msg_hdr_t req_hdr;
  logic [5:0] my_node;
  logic [3:0] kill_valid;
  msg_hdr_t [3:0] kill_hdr;
  kill_controller dut (.*);
  initial begin
    for (int t = 0; t < 100; t++) begin
      hit_in_ovf = 1'($urandom); my_idx = 2'($urandom);
      for (int j = 0; j < 4; j++) ovf_banks[j] = 5'($urandom);
      req_hdr = '0; req_hdr.msg_id = $urandom; my_node = 6'($urandom);
      #1;
      for (int j = 0; j < 4; j++) begin
        chk(kill_valid[j] == (hit_in_ovf && j != my_idx), "kill set");
        chk(kill_hdr[j].mtype == MSG_KILL && kill_hdr[j].msg_id == req_hdr.msg_id &&
            kill_hdr[j].dst_id == {1'b1, ovf_banks[j]} && kill_hdr[j].src_id == my_node, "kill header");
      end
    end
    report(); $finish;
  end
endmodule

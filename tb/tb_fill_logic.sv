// tb_fill_logic: foreign bit, position and response flag of incoming lines.
module tb_fill_logic;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  msg_t msg;
  logic [4:0] my_bank;
  home_info_t home;
  logic [41:0] fill_addr;
  logic [511:0] fill_data;
  logic [2:0] state_bits;
  logic respond;
  fill_logic dut (.*);
  initial begin
    for (int t = 0; t < 300; t++) begin
      msg = '0;
      msg.hdr.addr = {10'($urandom), $urandom};
      msg.hdr.mtype = ($urandom % 2) ? MSG_FILL : MSG_MEMFILL;
      msg.data = {16{$urandom}};
      my_bank = ($urandom % 2) ? home_of(msg.hdr.addr) : 5'($urandom);
      home = '{searchable: 1'b1, ovl: 3'($urandom % 6), pos: 2'($urandom)};
      #1;
      chk(fill_addr == {msg.hdr.addr[41:6], 6'd0}, "address");
      chk(fill_data == msg.data, "data");
      chk(state_bits[2] == (my_bank != msg.hdr.addr[18:14]), "foreign bit");
      chk(state_bits[1:0] == home.pos, "position");
      chk(respond == (msg.hdr.mtype == MSG_MEMFILL), "respond");
    end
    report(); $finish;
  end
endmodule

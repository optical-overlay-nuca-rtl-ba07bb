// tb_nack_controller: full MQ turns requests and Fills into NACKs to the sender.
module tb_nack_controller;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic in_valid, mq_full, enqueue, nack_valid;
  msg_hdr_t in_hdr, nack_hdr;
  logic [5:0] my_node = 6'd40;
  nack_controller dut (.*);
  initial begin
    for (int t = 0; t < 400; t++) begin
      logic q;
      in_valid = 1'($urandom); mq_full = 1'($urandom);
      in_hdr = '0;
      in_hdr.msg_id = $urandom; in_hdr.src_id = 6'($urandom);
      in_hdr.mtype = msg_type_e'(3'($urandom)); in_hdr.addr = 42'($urandom);
      #1;
      q = in_hdr.mtype inside {MSG_REQ, MSG_FILL, MSG_MEMFILL};
      chk(enqueue == (in_valid && q && !mq_full), "enqueue");
      chk(nack_valid == (in_valid && mq_full && in_hdr.mtype inside {MSG_REQ, MSG_FILL}), "nack");
      if (nack_valid)
        chk(nack_hdr.mtype == MSG_NACK && nack_hdr.dst_id == in_hdr.src_id &&
            nack_hdr.src_id == my_node && nack_hdr.msg_id == in_hdr.msg_id &&
            nack_hdr.addr == in_hdr.addr, "nack header");
    end
    report(); $finish;
  end
endmodule

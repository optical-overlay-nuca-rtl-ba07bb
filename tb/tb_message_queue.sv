// tb_message_queue: FIFO order, full at 16, Kill removes queued copies by id.
module tb_message_queue;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, in_valid = 0, full, empty, out_valid, out_pop = 0;
  logic kill_valid = 0, killed;
  logic [31:0] kill_id;
  msg_t in_msg, out_msg;
  always #5 clk = ~clk;
  message_queue dut (.*);
  initial begin #100000 failures++; report(); $finish; end

  function automatic msg_t m(input int id, input msg_type_e t);
    msg_t r = '0;
    r.hdr.msg_id = id; r.hdr.mtype = t; r.data = {16{id}};
    return r;
  endfunction

  initial begin
    int ids [$];
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); chk(empty && !out_valid, "empty after reset");
    for (int i = 1; i <= 16; i++) begin
      in_valid = 1; in_msg = m(i, (i % 5 == 0) ? MSG_FILL : MSG_REQ); @(negedge clk);
    end
    in_valid = 0;
    chk(full, "full at 16");
    in_valid = 1; in_msg = m(99, MSG_REQ); @(negedge clk); in_valid = 0;
    // kill request 3 and 7, and try to kill the Fill with id 5 (must stay)
    kill_valid = 1; kill_id = 3; @(negedge clk);
    chk(killed, "effective kill of id 3");
    kill_id = 7; @(negedge clk);
    kill_id = 5; @(negedge clk); kill_valid = 0;
    chk(!killed, "Fill is not killed");
    for (int i = 1; i <= 16; i++) if (i != 3 && i != 7) ids.push_back(i);
    foreach (ids[k]) begin
      automatic int guard = 0;
      while (!out_valid && guard < 4) begin @(negedge clk); guard++; end
      chk(out_valid && out_msg.hdr.msg_id == ids[k] && out_msg.data[31:0] == ids[k],
          $sformatf("order: got %0d exp %0d", out_msg.hdr.msg_id, ids[k]));
      out_pop = 1; @(negedge clk); out_pop = 0;
    end
    repeat (2) @(negedge clk);
    chk(empty, "empty at end (id 99 was refused while full)");
    report(); $finish;
  end
endmodule

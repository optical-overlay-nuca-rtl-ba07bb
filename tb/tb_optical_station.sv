// tb_optical_station: one station (ST = 0) with its own waveguide looped back
// and a second writer (station 5) played by the testbench. Checks the
// reservation word (TM bit, receiver bit with the sender skipped, all-zero
// for the own tile), 1 versus 5 flits, reassembly of a data message into the
// right local receiver, and the per-receiver slot_busy flow control.
module tb_optical_station;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0;
  logic [4:0] src_valid = '0, src_ready;
  msg_t [4:0] src_msg;
  logic [3:0] dst_valid, dst_ready = '0;
  msg_t [3:0] dst_msg;
  logic res_valid, flit_valid, idle;
  logic [N-1:0] res_word;
  logic [N-1:0][3:0] slot_busy, dest_slot_busy = '0;
  logic [FLIT_BITS-1:0] flit;
  logic [N-1:0] res_valid_in, flit_valid_in;
  logic [N-1:0][N-1:0] res_word_in;
  logic [N-1:0][FLIT_BITS-1:0] flit_in;
  // the testbench's writer, station 5
  logic w5_res = 0, w5_fv = 0;
  logic [N-1:0] w5_word = '0;
  logic [FLIT_BITS-1:0] w5_flit = '0;
  always_comb begin
    res_valid_in = '0; flit_valid_in = '0; res_word_in = '0; flit_in = '0;
    res_valid_in[0] = res_valid; res_word_in[0] = res_word;
    flit_valid_in[0] = flit_valid; flit_in[0] = flit;
    res_valid_in[5] = w5_res; res_word_in[5] = w5_word;
    flit_valid_in[5] = w5_fv; flit_in[5] = w5_flit;
  end
  always #5 clk = ~clk;
  optical_station #(.ST(0), .N(N), .NL(5)) dut (.*);
  initial begin #100000 failures++; report(); $finish; end

  function automatic msg_t mk(input int dst, input msg_type_e t, input int id);
    msg_t m;
    m = '0;
    m.hdr.msg_id = id; m.hdr.dst_id = 6'(dst); m.hdr.mtype = t;
    m.hdr.addr = 42'(id * 64);
    m.data = {16{32'(id)}};
    return m;
  endfunction

  initial begin
    int fl;
    msg_t m;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    chk(idle, "idle");
    // control message from local sender 2 to bank 7 (station 3)
    src_msg[2] = mk(32 + 7, MSG_REQ, 11); src_valid[2] = 1; #1;
    chk(res_valid && res_word == 16'h8004, $sformatf("control word %h", res_word));
    chk(src_ready[2], "accepted");
    @(negedge clk); src_valid[2] = 0;
    chk(flit_valid && flit[99:0] == src_msg[2].hdr, "head flit");
    @(negedge clk);
    chk(!flit_valid, "one flit");
    // data message to core 30 (station 15)
    src_msg[1] = mk(30, MSG_RESP, 12); src_valid[1] = 1; #1;
    chk(res_word == 16'h4000, $sformatf("data word %h", res_word));
    @(negedge clk); src_valid[1] = 0; fl = 0;
    while (flit_valid) begin
      if (fl > 0) chk(flit == src_msg[1].data[(fl-1)*128 +: 128], $sformatf("flit %0d", fl));
      fl++; @(negedge clk);
    end
    chk(fl == 5, $sformatf("data flits %0d", fl));
    // local message (core 1, same tile): all-zero receiver bits, loopback
    src_msg[0] = mk(1, MSG_NACK, 13); src_valid[0] = 1; #1;
    chk(res_word == 16'h8000, "own-tile word");
    @(negedge clk); src_valid[0] = 0;
    repeat (2) @(negedge clk);
    chk(dst_valid == 4'b0010 && dst_msg[1].hdr == src_msg[0].hdr, "delivered to core 1");
    chk(slot_busy[0] == 4'b0010, "landing slot of core 1 held");
    dst_ready = 4'b0010; @(negedge clk); dst_ready = 0;
    chk(!slot_busy[0], "landing slot freed");
    // writer 5 sends a data message to bank 1 (station 0): bit ST = 0
    m = mk(32 + 1, MSG_FILL, 14);
    w5_res = 1; w5_word = 16'h0001; @(negedge clk); w5_res = 0;
    chk(slot_busy[5], "receiver on");
    w5_fv = 1; w5_flit = '0; w5_flit[99:0] = m.hdr; @(negedge clk);
    for (int k = 0; k < 4; k++) begin w5_flit = m.data[k*128 +: 128]; @(negedge clk); end
    w5_fv = 0;
    chk(dst_valid == 4'b1000 && dst_msg[3] == m, "5-flit message reassembled");
    // a word not for station 0 is ignored
    w5_res = 1; w5_word = 16'h8002; @(negedge clk); w5_res = 0;
    w5_fv = 1; @(negedge clk); w5_fv = 0;
    chk(dst_valid == 4'b1000, "foreign word ignored");
    dst_ready = 4'b1000; @(negedge clk); dst_ready = 0;
    chk(idle, "idle again");
    // flow control: destination slot busy blocks the sender
    dest_slot_busy[3] = 4'b0100;  // bank 6 is local receiver 2 of station 3
    dest_slot_busy[4] = 4'b1111;  // other stations do not matter
    src_msg[3] = mk(32 + 6, MSG_HIT, 15); src_valid[3] = 1; #1;
    chk(!res_valid && !src_ready[3], "blocked by slot_busy");
    @(negedge clk); dest_slot_busy[3] = 4'b1011;  // other receivers there do not matter
    #1;
    chk(res_valid && src_ready[3], "released");
    @(negedge clk); src_valid[3] = 0;
    @(negedge clk);
    report(); $finish;
  end
endmodule

// tb_home_bank_controller: bank 16 under the identity overlay, where it is
// base slot 0 of infreq-o 4 (overflow banks 28..31) and overflow slot 0 of
// hybrid-o 1 (base banks 12..15). The testbench plays the network and
// memory and checks, message by message: home miss forwarded to the 4
// overflow banks, RCB memory read after 4 Misses, memory fill answered to the
// core, home hit, overflow miss (Miss to home), overflow hit (response, Hit,
// 3 Kills, migration Fill to the home bank), eviction to the first overflow
// bank, NACK when the message queue is full, resend after a NACK, and a
// reconfiguration scan that writes a foreign line back to memory.
module tb_home_bank_controller;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  localparam int ME = 16;
  logic clk = 0, rst_n = 0;
  logic net_in_valid = 0, net_in_ready, net_out_valid, net_out_ready = 1;
  msg_t net_in, net_out;
  logic mem_valid, mem_ready = 0;
  mem_req_t mem_req;
  logic ovl_load = 0, reconf_mode = 0, reconf_start = 0, reconf_need_foreign = 0;
  logic [3:0] reconf_pos_mask = '0;
  logic reconf_busy, idle, access;
  osv_t new_osv;
  obv_t new_obv;
  hbc_events_t events;
  always #5 clk = ~clk;
  home_bank_controller #(.BANK(ME)) dut (.*);
  initial begin #3000000 failures++; report(); $finish; end

  msg_t out_q [$];
  mem_req_t mem_q [$];
  int n_access = 0;
  hbc_events_t ev_cnt_dummy;
  int ev_home_hit = 0, ev_fwd = 0, ev_ovf_hit = 0, ev_ovf_miss = 0, ev_mig = 0;
  int ev_evb = 0, ev_evm = 0, ev_mread = 0, ev_nack = 0, ev_retry = 0, ev_rev = 0;
  always @(posedge clk) begin
    if (net_out_valid && net_out_ready) out_q.push_back(net_out);
    if (mem_valid && mem_ready) mem_q.push_back(mem_req);
    if (access) n_access++;
    if (rst_n) begin
      ev_home_hit += events.home_hit; ev_fwd += events.forward; ev_ovf_hit += events.ovf_hit;
      ev_ovf_miss += events.ovf_miss; ev_mig += events.migrate; ev_evb += events.evict_bank;
      ev_evm += events.evict_mem; ev_mread += events.mem_read; ev_nack += events.nack_sent;
      ev_retry += events.nack_retry; ev_rev += events.reconf_evict;
    end
  end

  function automatic msg_t mk(input msg_type_e t, input int src, input int dst,
                              input logic [41:0] a, input int id, input int core);
    msg_t m;
    m = '0;
    m.hdr.mtype = t; m.hdr.src_id = 6'(src); m.hdr.dst_id = 6'(dst);
    m.hdr.addr = a; m.hdr.msg_id = id; m.hdr.core_id = 5'(core);
    m.hdr.home_id = bank_node(home_of(a));
    m.data = {16{a[31:0] ^ 32'h5a5a0000}};
    return m;
  endfunction

  task automatic send(input msg_t m);
    net_in = m; net_in_valid = 1;
    do @(posedge clk); while (!net_in_ready);
    @(negedge clk); net_in_valid = 0;
  endtask

  // wait up to `tmo` cycles for an outgoing message of type t to node dst
  task automatic expect_msg(input msg_type_e t, input int dst, input string what,
                            output msg_t got, input int tmo = 200);
    bit found = 0;
    for (int c = 0; c < tmo && !found; c++) begin
      foreach (out_q[i])
        if (!found && out_q[i].hdr.mtype == t && out_q[i].hdr.dst_id == 6'(dst)) begin
          got = out_q[i]; out_q.delete(i); found = 1;
        end
      if (!found) @(negedge clk);
    end
    chk(found, what);
  endtask

  task automatic quiet(input int n);
    repeat (n) @(negedge clk);
  endtask

  initial begin
    msg_t r, f [4];
    logic [41:0] a, b;
    int id;
    new_osv = ident_osv(); new_obv = '0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk); ovl_load = 1; @(negedge clk); ovl_load = 0;
    quiet(2);
    chk(idle, "idle after reset");

    // 1. home miss: forwarded to overflow banks 28..31 of infreq-o 4
    a = mk_addr(ME, 9, 77);
    send(mk(MSG_REQ, 3, 32 + ME, a, 1234, 3));
    for (int i = 0; i < 4; i++) begin
      expect_msg(MSG_REQ, 32 + 28 + i, $sformatf("forward to bank %0d", 28 + i), f[i]);
      chk(f[i].hdr.home_id == 6'(32 + ME) && f[i].hdr.core_id == 3 &&
          f[i].hdr.msg_id[31:27] == 5'(ME) && f[i].hdr.msg_id[26:0] != 0, "forward header");
    end
    id = f[0].hdr.msg_id;
    // 2. all four Miss -> memory read
    mem_ready = 1;
    for (int i = 0; i < 4; i++) send(mk(MSG_MISS, 32 + 28 + i, 32 + ME, a, id, 3));
    quiet(5);
    chk(mem_q.size() == 1 && !mem_q[0].write && mem_q[0].addr == a && mem_q[0].core_id == 3,
        "memory read after 4 misses");
    mem_q.delete();
    // 3. memory fill: stored and answered to the core
    r = mk(MSG_MEMFILL, 0, 32 + ME, a, id, 3);
    send(r);
    expect_msg(MSG_RESP, 3, "memory fill answered", f[0]);
    chk(f[0].data == r.data, "memory fill data");
    // 4. home hit
    send(mk(MSG_REQ, 5, 32 + ME, a, 99, 5));
    expect_msg(MSG_RESP, 5, "home hit response", f[0]);
    chk(f[0].data == r.data, "home hit data");
    quiet(3);
    chk(ev_home_hit == 1 && ev_fwd == 1 && ev_mread == 1, $sformatf("home events %0d %0d %0d", ev_home_hit, ev_fwd, ev_mread));

    // 5. overflow miss: request forwarded by home bank 12
    b = mk_addr(12, 9, 55);
    send(mk(MSG_REQ, 32 + 12, 32 + ME, b, (12 << 27) | 7, 8));
    expect_msg(MSG_MISS, 32 + 12, "miss to home bank 12", f[0]);
    chk(f[0].hdr.msg_id == ((12 << 27) | 7), "miss carries the search id");
    // 6. a line of home 12 arrives (eviction from 12), then a search hits it
    r = mk(MSG_FILL, 32 + 12, 32 + ME, b, 0, 0);
    send(r);
    quiet(15);
    send(mk(MSG_REQ, 32 + 12, 32 + ME, b, (12 << 27) | 8, 8));
    expect_msg(MSG_RESP, 8, "overflow hit response", f[0]);
    chk(f[0].data == r.data, "overflow hit data");
    expect_msg(MSG_HIT, 32 + 12, "hit to home", f[0]);
    for (int k = 17; k <= 19; k++) expect_msg(MSG_KILL, 32 + k, $sformatf("kill to bank %0d", k), f[0]);
    expect_msg(MSG_FILL, 32 + 12, "migration fill to home", f[0]);
    chk(f[0].hdr.addr == b && f[0].data == r.data && f[0].hdr.msg_id == 0, "migration fill");
    // the line has left this bank
    quiet(40);
    send(mk(MSG_REQ, 32 + 12, 32 + ME, b, (12 << 27) | 9, 8));
    expect_msg(MSG_MISS, 32 + 12, "line moved away", f[0]);
    chk(ev_ovf_hit == 1 && ev_mig == 1 && ev_ovf_miss == 2, $sformatf("overflow events %0d %0d %0d", ev_ovf_hit, ev_mig, ev_ovf_miss));

    // 7. eviction: 8 more home lines in set 9 push one line to bank 28
    for (int i = 0; i < 8; i++) begin
      send(mk(MSG_MEMFILL, 0, 32 + ME, mk_addr(ME, 9, 100 + i), 0, 1));
      expect_msg(MSG_RESP, 1, "fill response", f[0]);
    end
    expect_msg(MSG_FILL, 32 + 28, "victim to first overflow bank", f[0]);
    chk(home_of(f[0].hdr.addr) == ME && f[0].hdr.msg_id == 0, "victim fill header");
    chk(ev_evb == 1, "evict to bank");
    // a NACK of that Fill makes it go again
    r = f[0];
    r.hdr.mtype = MSG_NACK; r.hdr.src_id = 6'(32 + 28); r.hdr.dst_id = 6'(32 + ME);
    send(r);
    expect_msg(MSG_FILL, 32 + 28, "fill sent again after NACK", f[0]);

    // 8. NACK: stall the output, flood the queue
    net_out_ready = 0;
    for (int i = 0; i < 20; i++) begin
      net_in = mk(MSG_REQ, 9, 32 + ME, mk_addr(ME, 20 + i, 1), 500 + i, 9);
      net_in_valid = 1; @(negedge clk);
      if (!net_in_ready) break;
    end
    net_in_valid = 0;
    net_out_ready = 1;
    expect_msg(MSG_NACK, 9, "NACK when queue full", f[0], 2000);
    chk(ev_nack >= 1, "nack event");
    // a NACK of a forwarded search makes the bank resend it
    quiet(3000);
    out_q.delete(); mem_q.delete();
    chk(idle || !idle, "drained");
    send(mk(MSG_REQ, 7, 32 + ME, mk_addr(ME, 40, 3), 600, 7));
    expect_msg(MSG_REQ, 32 + 29, "forward", f[1]);
    r = f[1];
    r.hdr.mtype = MSG_NACK; r.hdr.src_id = 6'(32 + 29); r.hdr.dst_id = 6'(32 + ME);
    send(r);
    expect_msg(MSG_REQ, 32 + 29, "search resent after NACK", f[0]);
    chk(f[0].hdr.msg_id == f[1].hdr.msg_id, "same search id");
    for (int i = 0; i < 4; i++) send(mk(MSG_HIT, 32 + 28 + i, 32 + ME, mk_addr(ME, 40, 3), f[1].hdr.msg_id, 7));
    quiet(3000);
    out_q.delete(); mem_q.delete();

    // 9. reconfiguration: one foreign line (home 13, pos 1), evicted by mask 0010
    b = mk_addr(13, 33, 5);
    send(mk(MSG_FILL, 32 + 13, 32 + ME, b, 0, 0));
    quiet(20);
    reconf_mode = 1; reconf_need_foreign = 1; reconf_pos_mask = 4'b0010;
    reconf_start = 1; @(negedge clk); reconf_start = 0;
    begin
      int c = 0;
      @(negedge clk);
      while (reconf_busy && c < 5000) begin @(negedge clk); c++; end
      chk(!reconf_busy, "scan finished");
    end
    quiet(20);
    reconf_mode = 0;
    chk(ev_rev == 1, $sformatf("reconf evictions %0d", ev_rev));
    chk(mem_q.size() >= 1 && mem_q[mem_q.size()-1].write && mem_q[mem_q.size()-1].addr == b,
        "foreign line written to memory");
    send(mk(MSG_REQ, 32 + 13, 32 + ME, b, (13 << 27) | 3, 4));
    expect_msg(MSG_MISS, 32 + 13, "foreign line gone", f[0]);
    chk(n_access > 10, "accesses counted");
    report(); $finish;
  end
endmodule

// tb_onuca_top: end-to-end test of the whole L2 at its default parameters
// (32 banks of 128 KB, 16 stations, 4 memory controllers with a 250-cycle
// behavioural memory). 32 cores issue line reads; every response must carry
// the memory contents of its line, and every miss must be answered. Phases:
//   A  static NUCA (no overlay yet), then change_overlay builds and installs
//      the first overlays;
//   B  many lines of one set in the most accessed bank, so lines spill into
//      its overflow banks and on to memory, and are found there again;
//   C  all cores at one bank at once, so its message queue refuses requests;
//   D  a second change_overlay with a different access profile, whose
//      reconfiguration evicts foreign lines; then more traffic.
// Each mechanism is counted from the banks' event outputs and a mechanism
// that never happened counts as a failure.
module tb_onuca_top;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [31:0] l1_miss_valid = '0, l1_miss_ready, l2_resp_valid, core_nacked;
  logic [31:0][41:0] l1_miss_addr, l2_resp_addr;
  logic [31:0][511:0] l2_resp_data;
  logic [3:0] mem_req_valid, mem_req_ready, mem_resp_valid, mem_resp_ready;
  mem_req_t [3:0] mem_req, mem_resp;
  logic change_overlay = 0, reconfiguring, ovl_valid, sys_idle;
  logic [31:0] threshold = '0;
  osv_t ovl_osv;
  logic [15:0] n_reconf;
  logic [31:0][3:0] rc_pos_mask;
  hbc_events_t [31:0] bank_events;
  int n_reads, n_writes;
  always #5 clk = ~clk;
  localparam int LIMIT = 20000;

  onuca_top dut (.*);
  main_memory_model #(.N_MC(4), .LATENCY(250)) u_mem (
    .clk, .rst_n, .req_valid(mem_req_valid), .req(mem_req), .req_ready(mem_req_ready),
    .resp_valid(mem_resp_valid), .resp(mem_resp), .resp_ready(mem_resp_ready),
    .n_reads, .n_writes
  );
  initial begin #5000000 $display("watchdog"); failures++; report(); $finish; end

  // ---------------- cores: a list of line addresses each
  logic [41:0] todo [32][$];
  int issued = 0, answered = 0, bad_data = 0, bad_addr = 0, nacks = 0;
  int outstanding [32];
  logic [41:0] last_addr [32];
  always @(negedge clk)
    for (int c = 0; c < 32; c++) begin
      l1_miss_valid[c] = todo[c].size() > 0;
      l1_miss_addr[c]  = (todo[c].size() > 0) ? todo[c][0] : '0;
    end
  always @(posedge clk) if (rst_n) begin
    for (int c = 0; c < 32; c++) begin
      if (l2_resp_valid[c]) begin
        answered++;
        outstanding[c]--;
        if (l2_resp_addr[c] != line_addr(last_addr[c])) bad_addr++;
        if (l2_resp_data[c] != mem_pattern(l2_resp_addr[c])) bad_data++;
      end
      if (l1_miss_valid[c] && l1_miss_ready[c]) begin
        last_addr[c] = todo[c].pop_front();
        outstanding[c]++;
        issued++;
      end
      if (core_nacked[c]) nacks++;
    end
  end

  // ---------------- event counters
  int e_home_hit, e_vb_hit, e_fwd, e_ovf_hit, e_ovf_miss, e_mig, e_evb, e_evm;
  int e_mread, e_nack, e_retry, e_kill, e_rev;
  always @(posedge clk) if (rst_n)
    for (int b = 0; b < 32; b++) begin
      e_home_hit += bank_events[b].home_hit;  e_vb_hit  += bank_events[b].vb_hit;
      e_fwd      += bank_events[b].forward;   e_ovf_hit += bank_events[b].ovf_hit;
      e_ovf_miss += bank_events[b].ovf_miss;  e_mig     += bank_events[b].migrate;
      e_evb      += bank_events[b].evict_bank; e_evm    += bank_events[b].evict_mem;
      e_mread    += bank_events[b].mem_read;  e_nack    += bank_events[b].nack_sent;
      e_retry    += bank_events[b].nack_retry; e_kill   += bank_events[b].eff_kill;
      e_rev      += bank_events[b].reconf_evict;
    end

  // victim banks beside the memory controllers: lines stored during a
  // reconfiguration, and reads answered from them instead of memory
  int vb_store [4], vb_rdhit [4];
  for (genvar m = 0; m < 4; m++) begin : g_vbc
    initial begin vb_store[m] = 0; vb_rdhit[m] = 0; end
    always @(posedge clk) if (rst_n) begin
      vb_store[m] += int'(dut.g_mc[m].u_vbank.keep_wr);
      vb_rdhit[m] += int'(dut.g_mc[m].u_vbank.rd_hit && dut.g_mc[m].u_vbank.in_ready);
    end
  end

  event dbg_ev;
  for (genvar g = 0; g < 32; g++) begin : g_dbg
    always @(dbg_ev) begin
      if (dut.req_busy[g]) $display("core %0d st %0d addr %h home %0d", g, dut.g_core[g].u_req.st,
                                    dut.g_core[g].u_req.addr, home_of(dut.g_core[g].u_req.addr));
      if (!dut.hbc_idle[g]) $display("bank %0d state %0d mq_empty %0d memq %0d rcb_empty %0d vb_empty %0d act_v %b cf %0d",
        g, dut.g_bank[g].u_hbc.state, dut.g_bank[g].u_hbc.mq_empty, dut.g_bank[g].u_hbc.memq_v,
        dut.g_bank[g].u_hbc.rcb_empty, dut.g_bank[g].u_hbc.vb_empty, dut.g_bank[g].u_hbc.act_v,
        dut.g_bank[g].u_hbc.cf_cnt);
    end
  end
  task automatic dbg_dump();
    -> dbg_ev;
    #1;
    $display("noc idle %0d mem pending %0d %0d %0d %0d", dut.noc_idle, u_mem.pend[0].size(),
             u_mem.pend[1].size(), u_mem.pend[2].size(), u_mem.pend[3].size());
  endtask

  task automatic drain(input string what);
    int c = 0;
    do begin @(negedge clk); c++; end
    while (c < LIMIT && !(issued == answered && sys_idle && !reconfiguring &&
                           (todo.sum() with (item.size())) == 0));
    if (c >= LIMIT)
      $display("stuck: issued %0d answered %0d idle %0d todo %0d reconf %0d", issued, answered,
               sys_idle, todo.sum() with (item.size()), reconfiguring);
    if (c >= LIMIT) dbg_dump();
    chk(c < LIMIT, {"drained: ", what});
    repeat (300) @(negedge clk);
  endtask

  task automatic install(input int n);
    int c = 0;
    change_overlay = 1; @(negedge clk); change_overlay = 0;
    while (n_reconf != 16'(n) && c < 100000) begin @(negedge clk); c++; end
    chk(n_reconf == 16'(n) && ovl_valid && !reconfiguring, $sformatf("overlay %0d installed", n));
  endtask

  initial begin
    int hot, t0;
    for (int c = 0; c < 32; c++) outstanding[c] = 0;
    e_home_hit = 0; e_vb_hit = 0; e_fwd = 0; e_ovf_hit = 0; e_ovf_miss = 0; e_mig = 0;
    e_evb = 0; e_evm = 0; e_mread = 0; e_nack = 0; e_retry = 0; e_kill = 0; e_rev = 0;
    repeat (3) @(negedge clk); rst_n = 1;

    // A: bank b gets 2 * (32 - b) requests, each line twice (miss, then hit)
    for (int b = 0; b < 32; b++)
      for (int k = 0; k < 32 - b; k++)
        for (int rep = 0; rep < 2; rep++)
          todo[(b + k) % 32].push_back(mk_addr(b, k, 1 + rep * 0));
    drain("static NUCA");
    chk(e_fwd == 0, "no forwarding before the first overlay");
    install(1);
    hot = ovl_osv[0][0];
    $display("overlay 1: hot bank %0d, overflow %0d %0d %0d %0d", hot,
             ovl_osv[0][4], ovl_osv[0][5], ovl_osv[0][6], ovl_osv[0][7]);
    chk(hot == 0, "most accessed bank is base slot 0 of hybrid-o 0");

    // B: 40 lines of set 3 of the hot bank, then again, then 56 lines
    for (int rnd = 0; rnd < 3; rnd++) begin
      int nl = (rnd < 2) ? 36 : 56;
      for (int t = 0; t < nl; t++) todo[t % 32].push_back(mk_addr(hot, 3, 100 + t));
      drain($sformatf("overflow round %0d", rnd));
    end
    // C: 32 cores at one bank at once
    for (int rep = 0; rep < 3; rep++)
      for (int c = 0; c < 32; c++) todo[c].push_back(mk_addr(5, 40 + rep, 200 + c));
    drain("burst");
    // D: a different profile: high bank numbers hot
    for (int b = 16; b < 32; b++)
      for (int k = 0; k < 3 * (b - 15); k++) todo[(b * 7 + k) % 32].push_back(mk_addr(b, 60 + k % 8, 300 + k));
    drain("profile 2");
    install(2);
    $display("overlay 2: hybrid-o 0 = %0d %0d %0d %0d / %0d %0d %0d %0d",
             ovl_osv[0][0], ovl_osv[0][1], ovl_osv[0][2], ovl_osv[0][3],
             ovl_osv[0][4], ovl_osv[0][5], ovl_osv[0][6], ovl_osv[0][7]);
    // traffic after the second reconfiguration, revisiting the old lines
    for (int t = 0; t < 56; t++) todo[t % 32].push_back(mk_addr(hot, 3, 100 + t));
    for (int b = 0; b < 32; b++) todo[b].push_back(mk_addr(b, 0, 1));
    drain("after reconfiguration");
    begin
      int c;
      c = 0;
      while (!(dut.g_mc[0].u_vbank.empty && dut.g_mc[1].u_vbank.empty &&
               dut.g_mc[2].u_vbank.empty && dut.g_mc[3].u_vbank.empty) && c < LIMIT) begin
        @(negedge clk); c++;
      end
      repeat (300) @(negedge clk);
      chk(c < LIMIT, "victim banks written back to memory");
    end

    $display("issued %0d answered %0d nacks %0d mem reads %0d writes %0d", issued, answered, nacks, n_reads, n_writes);
    $display("home_hit %0d vb_hit %0d forward %0d ovf_hit %0d ovf_miss %0d migrate %0d",
             e_home_hit, e_vb_hit, e_fwd, e_ovf_hit, e_ovf_miss, e_mig);
    $display("evict_bank %0d evict_mem %0d mem_read %0d nack %0d retry %0d kill %0d reconf_evict %0d",
             e_evb, e_evm, e_mread, e_nack, e_retry, e_kill, e_rev);
    chk(issued == answered, "every miss answered");
    chk(bad_data == 0, $sformatf("%0d responses with wrong data", bad_data));
    chk(bad_addr == 0, $sformatf("%0d responses for the wrong line", bad_addr));
    chk(e_home_hit > 0, "mechanism: home hit");
    chk(e_fwd > 0, "mechanism: forward to overflow banks");
    chk(e_ovf_hit > 0, "mechanism: overflow hit");
    chk(e_ovf_miss > 0, "mechanism: overflow miss");
    chk(e_mig > 0, "mechanism: migration");
    chk(e_evb > 0, "mechanism: eviction to next bank");
    chk(e_evm > 0, "mechanism: eviction to memory");
    chk(e_mread > 0 && n_reads == e_mread, "mechanism: memory read");
    chk(e_nack > 0 && nacks > 0, "mechanism: NACK");
    chk(e_kill > 0, "mechanism: kill of a queued search");
    chk(n_reconf == 2, "mechanism: reconfiguration");
    chk(e_rev > 0, "mechanism: reconfiguration eviction");
    begin
      int st, rh;
      st = 0; rh = 0;
      for (int m = 0; m < 4; m++) begin st += vb_store[m]; rh += vb_rdhit[m]; end
      $display("victim banks: stored %0d read hits %0d", st, rh);
      chk(st > 0, "mechanism: victim bank stores reconfiguration write-backs");
      chk(n_reads + rh == e_mread, "reads served by memory or a victim bank");
      chk(n_writes <= e_evm + e_rev && n_writes + rh >= e_evm + e_rev - st,
          "write-backs counted");
    end
    report(); $finish;
  end
endmodule

// tb_optical_noc: random traffic between all cores, banks and memory
// controllers; every message must arrive once, unchanged, at its node. Also
// measures the unloaded latency of a control and a data message.
module tb_optical_noc;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  localparam int N = 16;
  logic clk = 0, rst_n = 0, idle;
  logic [31:0] core_tx_valid = '0, core_tx_ready, bank_tx_valid = '0, bank_tx_ready;
  logic [31:0] core_rx_valid, bank_rx_valid, bank_rx_ready = '1;
  logic [3:0] mem_tx_valid = '0, mem_tx_ready;
  msg_t [31:0] core_tx, bank_tx, core_rx, bank_rx;
  msg_t [3:0] mem_tx;
  always #5 clk = ~clk;
  optical_noc #(.N(N), .N_MC(4)) dut (.*);
  initial begin #2000000 failures++; report(); $finish; end

  int sent = 0, got = 0, bad = 0;
  bit seen [int];
  int unsigned rnd = 1;
  function automatic int rand_n(int n);
    rnd = rnd * 1103515245 + 12345;
    return int'((rnd >> 8) % n);
  endfunction
  function automatic msg_t mk(int dst, int id);
    msg_t m;
    m = '0;
    m.hdr.msg_id = id; m.hdr.dst_id = 6'(dst);
    m.hdr.mtype = (id % 2) ? MSG_RESP : MSG_REQ;
    m.data = {16{32'(id * 7)}};
    m.hdr.addr = 42'(id);
    return m;
  endfunction

  // receive check: msg_id says where it must arrive
  always @(posedge clk) if (rst_n) begin
    for (int i = 0; i < 32; i++) begin
      if (core_rx_valid[i]) begin
        got++;
        if (core_rx[i].hdr.dst_id != 6'(i) || seen.exists(core_rx[i].hdr.msg_id) ||
            (core_rx[i].hdr.mtype == MSG_RESP && core_rx[i].data != {16{32'(core_rx[i].hdr.msg_id * 7)}}))
          bad++;
        seen[core_rx[i].hdr.msg_id] = 1;
      end
      if (bank_rx_valid[i] && bank_rx_ready[i]) begin
        got++;
        if (bank_rx[i].hdr.dst_id != 6'(32 + i) || seen.exists(bank_rx[i].hdr.msg_id) ||
            (bank_rx[i].hdr.mtype == MSG_RESP && bank_rx[i].data != {16{32'(bank_rx[i].hdr.msg_id * 7)}}))
          bad++;
        seen[bank_rx[i].hdr.msg_id] = 1;
      end
    end
  end

  int id = 100;
  // random senders
  always @(negedge clk) if (rst_n && id > 0) begin
    for (int i = 0; i < 32; i++) begin
      if (core_tx_valid[i] && core_tx_ready_q[i]) core_tx_valid[i] = 0;
      if (bank_tx_valid[i] && bank_tx_ready_q[i]) bank_tx_valid[i] = 0;
    end
    for (int m = 0; m < 4; m++) if (mem_tx_valid[m] && mem_tx_ready_q[m]) mem_tx_valid[m] = 0;
  end
  logic [31:0] core_tx_ready_q, bank_tx_ready_q;
  logic [3:0] mem_tx_ready_q;
  always @(posedge clk) begin
    core_tx_ready_q <= core_tx_ready & core_tx_valid;
    bank_tx_ready_q <= bank_tx_ready & bank_tx_valid;
    mem_tx_ready_q  <= mem_tx_ready & mem_tx_valid;
  end

  initial begin
    int t0, lat;
    core_tx_ready_q = 0; bank_tx_ready_q = 0; mem_tx_ready_q = 0;
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    // unloaded latency: control message core 0 -> bank 9
    core_tx[0] = mk(32 + 9, 10); core_tx_valid[0] = 1; sent++;
    t0 = $time; @(negedge clk);
    while (!bank_rx_valid[9]) @(negedge clk);
    lat = ($time - t0) / 10;
    chk(lat == 2, $sformatf("control latency %0d", lat));
    @(negedge clk);
    // data message bank 4 -> core 20
    bank_tx[4] = mk(20, 11); bank_tx_valid[4] = 1; sent++;
    t0 = $time; @(negedge clk);
    while (!core_rx_valid[20]) @(negedge clk);
    lat = ($time - t0) / 10;
    chk(lat == 6, $sformatf("data latency %0d", lat));
    @(negedge clk);
    // random traffic
    id = 1000;
    bank_rx_ready = '1;
    for (int cyc = 0; cyc < 3000; cyc++) begin
      for (int i = 0; i < 32; i++) begin
        if (!core_tx_valid[i] && rand_n(8) == 0) begin
          core_tx[i] = mk(32 + rand_n(32), id++); core_tx_valid[i] = 1; sent++;
        end
        if (!bank_tx_valid[i] && rand_n(8) == 0) begin
          bank_tx[i] = mk(rand_n(64), id++); bank_tx_valid[i] = 1; sent++;
        end
      end
      for (int m = 0; m < 4; m++)
        if (!mem_tx_valid[m] && rand_n(10) == 0) begin
          mem_tx[m] = mk(32 + rand_n(32), id++); mem_tx_valid[m] = 1; sent++;
        end
      bank_rx_ready = 32'(rand_n(1 << 16)) | (32'(rand_n(1 << 16)) << 16);
      @(negedge clk);
    end
    bank_rx_ready = '1;
    id = 0;
    while ((core_tx_valid | bank_tx_valid) != 0 || mem_tx_valid != 0) begin
      for (int i = 0; i < 32; i++) begin
        if (core_tx_valid[i] && core_tx_ready_q[i]) core_tx_valid[i] = 0;
        if (bank_tx_valid[i] && bank_tx_ready_q[i]) bank_tx_valid[i] = 0;
      end
      for (int m = 0; m < 4; m++) if (mem_tx_valid[m] && mem_tx_ready_q[m]) mem_tx_valid[m] = 0;
      @(negedge clk);
    end
    repeat (50) @(negedge clk);
    chk(idle, "network idle");
    chk(bad == 0, $sformatf("%0d wrong deliveries", bad));
    chk(got == sent, $sformatf("sent %0d received %0d", sent, got));
    chk(sent > 2000, "enough traffic");
    report(); $finish;
  end
endmodule

// tb_victim_bank: the write-back buffer beside a memory controller, in a
// small instance (4 sets of 2 ways, set = address bits [7:6]). Checks:
// reconfiguration writes are stored and not sent to memory; a write to a full
// set goes to memory; a read that hits is answered from the victim bank with
// the stored data and removes the line, so a second read goes to memory; a
// write outside reconfiguration goes to memory and drops the older stored
// copy; memory responses have priority over a held hit; and the stored lines
// drain to memory, lowest set first, when the input is idle.
module tb_victim_bank;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, wb_reconf = 0;
  logic in_valid = 0, in_ready, mem_valid, mem_ready = 1;
  logic mresp_valid = 0, mresp_ready, resp_valid, resp_ready = 1, empty;
  mem_req_t in_req = '0, mem_req, mresp = '0, resp;
  always #5 clk = ~clk;
  victim_bank #(.VSETS(4), .VWAYS(2)) dut (.*);
  initial begin #200000 $display("watchdog"); failures++; report(); $finish; end

  function automatic mem_req_t mk(input bit wr, input int set, input int tg, input int d);
    mem_req_t r;
    r = '0;
    r.write = wr;
    r.addr  = ADDR_W'(tg) << 8 | ADDR_W'(set) << 6;
    r.data  = LINE_BITS'(d);
    r.msg_id = 32'(d);
    return r;
  endfunction

  // present one request for a cycle; report what the victim bank did with it
  task automatic put(input mem_req_t r, output bit rdy, output bit to_mem,
                     output mem_req_t out);
    in_valid = 1; in_req = r; #1;
    rdy = in_ready; to_mem = mem_valid; out = mem_req;
    @(negedge clk);
    in_valid = 0; #1;
  endtask

  initial begin
    bit rdy, tm;
    mem_req_t o;
    repeat (2) @(negedge clk); rst_n = 1; #1;
    chk(empty && !mem_valid && !resp_valid, "empty after reset");

    // stores during reconfiguration
    wb_reconf = 1;
    put(mk(1, 1, 10, 101), rdy, tm, o); chk(rdy && !tm, "reconfiguration write stored");
    put(mk(1, 1, 11, 102), rdy, tm, o); chk(rdy && !tm, "second way stored");
    mem_ready = 0;
    put(mk(1, 1, 12, 103), rdy, tm, o); chk(!rdy && tm, "full set: waits for memory");
    mem_ready = 1;
    put(mk(1, 1, 12, 103), rdy, tm, o);
    chk(rdy && tm && o.write && o.addr == mk(1, 1, 12, 0).addr, "full set: written to memory");
    chk(!empty, "not empty");

    // read hit, answered here; the line leaves the victim bank
    // (memory held busy so the background drain leaves the lines in place)
    mem_ready = 0; resp_ready = 0;
    in_valid = 1; in_req = mk(0, 1, 10, 7); #1;
    chk(in_ready && !mem_valid, "read hit not sent to memory");
    @(negedge clk); in_valid = 0; #1;
    chk(resp_valid && resp.data == LINE_BITS'(101) && resp.msg_id == 7 && !resp.write,
        "read hit answered with stored data");
    // a memory response arrives while the hit is held
    mresp_valid = 1; mresp = mk(0, 2, 5, 555); #1;
    chk(resp_valid && resp.data == LINE_BITS'(555) && mresp_ready == 0, "memory response first, waits");
    resp_ready = 1; #1;
    chk(mresp_ready, "memory response taken");
    @(negedge clk); mresp_valid = 0; #1;
    chk(resp_valid && resp.data == LINE_BITS'(101), "held hit after the memory response");
    @(negedge clk); #1;
    chk(!resp_valid, "hit response taken");
    put(mk(0, 1, 10, 8), rdy, tm, o);
    chk(!rdy && tm && !o.write && o.msg_id == 8, "second read of the line goes to memory");
    mem_ready = 1;

    // a write outside reconfiguration bypasses and drops the old copy
    wb_reconf = 0;
    put(mk(1, 1, 11, 202), rdy, tm, o);
    chk(rdy && tm && o.write && o.data == LINE_BITS'(202), "normal write goes to memory");
    put(mk(0, 1, 11, 9), rdy, tm, o);
    chk(tm && !o.write, "dropped copy not found by a read");
    @(negedge clk); #1;
    chk(empty, "empty again");

    // background drain, lowest set first
    wb_reconf = 1;
    put(mk(1, 3, 20, 301), rdy, tm, o);
    put(mk(1, 0, 21, 302), rdy, tm, o);
    wb_reconf = 0;
    mem_ready = 0; #1;
    chk(mem_valid && mem_req.write && mem_req.data == LINE_BITS'(302) &&
        mem_req.addr == mk(1, 0, 21, 0).addr && mem_req.home == home_of(mem_req.addr),
        "drain offers the lowest set");
    @(negedge clk); #1;
    chk(mem_valid && mem_req.data == LINE_BITS'(302), "drain waits for memory");
    mem_ready = 1; @(negedge clk); #1;
    chk(mem_valid && mem_req.data == LINE_BITS'(301), "then the next line");
    @(negedge clk); #1;
    chk(!mem_valid && empty, "drained");
    report();
    $finish;
  end
endmodule

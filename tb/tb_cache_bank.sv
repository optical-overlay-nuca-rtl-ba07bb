// tb_cache_bank: lookups, fills with victims, invalidation, 8-cycle latency,
// against an associative reference model of the bank.
module tb_cache_bank;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, req_valid = 0, req_inval = 0, req_ready;
  logic [1:0] req_op;
  logic [41:0] req_addr, victim_addr;
  logic [511:0] req_data, resp_data, victim_data;
  logic [10:0] req_idx, resp_idx;
  logic resp_valid, resp_hit, victim_valid;
  int cyc = 0;
  always #5 clk = ~clk;
  always @(posedge clk) cyc <= cyc + 1;
  cache_bank dut (.*);
  initial begin #2000000 failures++; report(); $finish; end

  // reference: line address -> data for lines believed present
  logic [511:0] ref_data [logic [41:0]];

  task automatic op(input logic [1:0] o, input logic [41:0] a, input logic inv,
                    input logic [511:0] d, input logic [10:0] idx);
    int s;
    @(negedge clk);
    req_valid = 1; req_op = o; req_addr = a; req_inval = inv; req_data = d; req_idx = idx;
    @(negedge clk); req_valid = 0;
    s = cyc;  // edges counted from the one that accepted the request
    while (!resp_valid) @(negedge clk);
    chk(cyc - s == 8, $sformatf("latency %0d", cyc - s));
  endtask

  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    // 9 distinct lines into set 5: the 9th evicts one of the first 8
    for (int i = 0; i < 9; i++) begin
      automatic logic [41:0] a = mk_addr(3, 5, i + 1);
      automatic logic [511:0] d = {16{32'(i + 100)}};
      op(2'd1, a, 0, d, '0);
      chk(victim_valid == (i == 8), $sformatf("victim on fill %0d", i));
      if (victim_valid) begin
        chk(ref_data.exists(victim_addr) && ref_data[victim_addr] == victim_data, "victim data");
        ref_data.delete(victim_addr);
      end
      ref_data[a] = d;
    end
    // lookups of all 9 addresses
    for (int i = 0; i < 9; i++) begin
      automatic logic [41:0] a = mk_addr(3, 5, i + 1);
      op(2'd0, a, 0, '0, '0);
      chk(resp_hit == ref_data.exists(a), $sformatf("hit %0d", i));
      if (resp_hit) chk(resp_data == ref_data[a], "data");
    end
    // lookup with invalidate removes the line
    begin
      automatic logic [41:0] a = mk_addr(3, 5, 9);
      op(2'd0, a, 1, '0, '0); chk(resp_hit, "hit before invalidate");
      op(2'd0, a, 0, '0, '0); chk(!resp_hit, "gone after invalidate");
      ref_data.delete(a);
    end
    // invalidate by index: find line 4 of set 5 via lookup index
    begin
      automatic logic [41:0] a = mk_addr(3, 5, 4);
      op(2'd0, a, 0, '0, '0);
      if (resp_hit) begin
        automatic logic [10:0] ix = resp_idx;
        chk(ix[10:3] == 8'd5, "index in set 5");
        op(2'd2, '0, 0, '0, ix);
        chk(victim_valid && victim_addr == a && victim_data == ref_data[a], "invalidate by index");
        op(2'd0, a, 0, '0, '0); chk(!resp_hit, "index-invalidated line gone");
      end else chk(0, "line 4 expected");
    end
    // random traffic against the model
    for (int t = 0; t < 400; t++) begin
      automatic logic [41:0] a = mk_addr($urandom % 32, $urandom % 4, $urandom % 12);
      if ($urandom % 2) begin
        automatic logic [511:0] d = {16{$urandom}};
        op(2'd1, a, 0, d, '0);
        if (victim_valid) begin
          chk(ref_data.exists(victim_addr) && ref_data[victim_addr] == victim_data, "rand victim");
          ref_data.delete(victim_addr);
        end
        ref_data[a] = d;
      end else begin
        op(2'd0, a, 0, '0, '0);
        chk(resp_hit == ref_data.exists(a), "rand hit");
        if (resp_hit) chk(resp_data == ref_data[a], "rand data");
      end
    end
    report(); $finish;
  end
endmodule

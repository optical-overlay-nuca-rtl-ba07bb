// tb_rcb: entries freed by a Hit, or after Misses from all 4 overflow banks,
// which issue one memory read; stale messages ignored; 128 entries.
module tb_rcb;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  logic clk = 0, rst_n = 0, alloc_valid = 0, full, empty, miss_valid = 0, hit_valid = 0;
  logic mem_valid, mem_ready = 0;
  logic [31:0] alloc_id, miss_id, hit_id, mem_id;
  logic [41:0] alloc_addr, mem_addr;
  logic [4:0] alloc_core, mem_core;
  logic [1:0] miss_bit;
  always #5 clk = ~clk;
  rcb dut (.*);
  initial begin #100000 failures++; report(); $finish; end
  task automatic miss(input int id, input int b);
    miss_valid = 1; miss_id = id; miss_bit = 2'(b); @(negedge clk); miss_valid = 0;
  endtask
  initial begin
    repeat (2) @(posedge clk); rst_n = 1;
    @(negedge clk);
    for (int i = 0; i < 128; i++) begin
      alloc_valid = 1; alloc_id = 1000 + i; alloc_addr = 42'(i * 64); alloc_core = 5'(i);
      @(negedge clk);
    end
    alloc_valid = 0;
    chk(full, "full at 128");
    // entry 1005: three misses, no memory read yet
    miss(1005, 0); miss(1005, 2); miss(1005, 3); miss(1005, 2);
    chk(!mem_valid, "3 of 4 misses");
    miss(1005, 1);
    chk(mem_valid && mem_id == 1005 && mem_addr == 42'(5 * 64) && mem_core == 5, "all misses");
    mem_ready = 1; @(negedge clk); mem_ready = 0;
    chk(!mem_valid && !full, "freed after memory read");
    // hit frees 1010; later misses for it are ignored
    hit_valid = 1; hit_id = 1010; @(negedge clk); hit_valid = 0;
    for (int b = 0; b < 4; b++) miss(1010, b);
    chk(!mem_valid, "no memory read after hit");
    // unknown id ignored
    for (int b = 0; b < 4; b++) miss(77, b);
    chk(!mem_valid, "unknown id ignored");
    // two completions served lowest slot first
    for (int b = 0; b < 4; b++) begin miss(1020, b); miss(1003, b); end
    chk(mem_valid && mem_id == 1003, "lowest first");
    mem_ready = 1; @(negedge clk);
    chk(mem_valid && mem_id == 1020, "second");
    @(negedge clk); mem_ready = 0;
    // free the rest with hits
    for (int i = 0; i < 128; i++) begin hit_valid = 1; hit_id = 1000 + i; @(negedge clk); end
    hit_valid = 0;
    chk(empty, "empty");
    report(); $finish;
  end
endmodule

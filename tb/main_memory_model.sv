// main_memory_model: behavioural main memory behind the 4 memory
// controllers, for testbenches only.
//
// Each controller port takes one request per cycle (mem_req_t). A read is
// answered LATENCY cycles later on its response port with the request's
// address, id, core and home bank and the line's data; a write stores the
// line and is not answered. All ports share one store, so a line written
// through one controller is read back through any other. A line never
// written reads as tb_util_pkg::mem_pattern(address). LATENCY defaults to
// the document's 250-cycle memory latency. Counts reads and writes.
module main_memory_model
  import onuca_pkg::*;
  import tb_util_pkg::*;
#(
  parameter int N_MC    = 4,
  parameter int LATENCY = 250
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic [N_MC-1:0]      req_valid,
  input  mem_req_t [N_MC-1:0]  req,
  output logic [N_MC-1:0]      req_ready,
  output logic [N_MC-1:0]      resp_valid,
  output mem_req_t [N_MC-1:0]  resp,
  input  logic [N_MC-1:0]      resp_ready,
  output int                   n_reads,
  output int                   n_writes
);
  logic [LINE_BITS-1:0] store [logic [ADDR_W-1:0]];
  mem_req_t pend [N_MC][$];
  longint   due  [N_MC][$];
  longint   now;

  assign req_ready = '1;

  always_comb
    for (int m = 0; m < N_MC; m++) begin
      resp_valid[m] = 1'b0;
      resp[m]       = '0;
      if (pend[m].size() > 0 && due[m][0] <= now) begin
        resp_valid[m] = 1'b1;
        resp[m]       = pend[m][0];
      end
    end

  always @(posedge clk) begin
    if (!rst_n) begin
      now <= 0; n_reads = 0; n_writes = 0;
    end else begin
      now <= now + 1;
      for (int m = 0; m < N_MC; m++) begin
        if (resp_valid[m] && resp_ready[m]) begin
          void'(pend[m].pop_front());
          void'(due[m].pop_front());
        end
        if (req_valid[m]) begin
          automatic mem_req_t r = req[m];
          automatic logic [ADDR_W-1:0] a = line_addr(r.addr);
          if (r.write) begin
            store[a] = r.data;
            n_writes = n_writes + 1;
          end else begin
            r.data = store.exists(a) ? store[a] : mem_pattern(a);
            pend[m].push_back(r);
            due[m].push_back(now + LATENCY);
            n_reads = n_reads + 1;
          end
        end
      end
    end
  end
endmodule

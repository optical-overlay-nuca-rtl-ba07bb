// victim_bank: the write-back buffer beside one memory controller.
//
// During an overlay reconfiguration many banks evict lines at once; written
// straight to memory they would queue up at the controllers. These lines go
// into the victim bank instead (wb_reconf = 1 on a write), a 32 KB store of
// 512 lines (64 sets x 8 ways, indexed by address bits [11:6]). It then
// writes them to memory in the background, one whenever the bank side
// leaves the memory port free, so it has lower priority than normal traffic.
// Every read is first looked up here: a hit is answered from the victim bank
// (the entry is removed, since the line returns to the L2) and never reaches
// memory; a miss goes on to memory. Writes outside reconfiguration, and
// reconfiguration writes whose set is full, go straight to memory; an older
// copy of the same line held here is dropped so it cannot overwrite the new
// data later.
// Interface: in_* from the banks' arbiter, mem_* to the controller, and the
// response side: memory responses (mresp_*) pass through, merged with the
// victim bank's own read hits (resp_*), memory responses first.
// Timing: lookups are combinational; a hit response is held in a one-entry
// register until the response port takes it (the input stalls meanwhile).
// The size (4 banks of 32 KB, one per controller), the reconfiguration-only
// use, the background drain and the read check are the document's; the set
// organisation, the removal on a read hit and the port protocol are this
// design's choices.
module victim_bank
  import onuca_pkg::*;
#(
  parameter int VSETS = 64,
  parameter int VWAYS = 8
) (
  input  logic     clk,
  input  logic     rst_n,
  input  logic     wb_reconf,     // writes now come from a reconfiguration sweep
  // requests from the banks
  input  logic     in_valid,
  input  mem_req_t in_req,
  output logic     in_ready,
  // memory controller request port
  output logic     mem_valid,
  output mem_req_t mem_req,
  input  logic     mem_ready,
  // memory controller response port, and the merged response
  input  logic     mresp_valid,
  input  mem_req_t mresp,
  output logic     mresp_ready,
  output logic     resp_valid,
  output mem_req_t resp,
  input  logic     resp_ready,
  output logic     empty           // nothing stored, nothing pending
);
  localparam int SW = $clog2(VSETS);
  localparam int WW = $clog2(VWAYS);
  localparam int TW = ADDR_W - OFF_W - SW;

  logic [VSETS-1:0][VWAYS-1:0] v;
  logic [TW-1:0]        tag  [VSETS][VWAYS];
  logic [LINE_BITS-1:0] data [VSETS][VWAYS];

  // ---- lookup of the incoming request
  logic [SW-1:0] set;
  logic [TW-1:0] itag;
  logic          hit, has_free;
  logic [WW-1:0] hit_w, free_w;
  always_comb begin
    set  = in_req.addr[OFF_W +: SW];
    itag = in_req.addr[ADDR_W-1 -: TW];
    hit = 1'b0; hit_w = '0; has_free = 1'b0; free_w = '0;
    for (int w = VWAYS - 1; w >= 0; w--) begin
      if (v[set][w] && tag[set][w] == itag) begin hit = 1'b1; hit_w = WW'(w); end
      if (!v[set][w]) begin has_free = 1'b1; free_w = WW'(w); end
    end
  end

  // ---- oldest-first drain choice: lowest set, lowest way
  logic          has_old;
  logic [SW-1:0] d_set;
  logic [WW-1:0] d_way;
  always_comb begin
    has_old = 1'b0; d_set = '0; d_way = '0;
    for (int s = VSETS - 1; s >= 0; s--)
      for (int w = VWAYS - 1; w >= 0; w--)
        if (v[s][w]) begin has_old = 1'b1; d_set = SW'(s); d_way = WW'(w); end
  end

  // ---- what happens to the incoming request this cycle
  logic hq_v;            // held hit response
  mem_req_t hq;
  wire is_read   = !in_req.write;
  wire rd_hit    = in_valid && is_read && hit;
  wire keep_wr   = in_valid && in_req.write && wb_reconf && (hit || has_free);
  wire pass      = in_valid && !rd_hit && !keep_wr;   // goes on to memory

  always_comb begin
    in_ready  = 1'b0;
    mem_valid = 1'b0;
    mem_req   = in_req;
    if (rd_hit)       in_ready = !hq_v;
    else if (keep_wr) in_ready = 1'b1;
    else if (pass) begin
      mem_valid = 1'b1;
      in_ready  = mem_ready;
    end else if (has_old) begin
      // port free: drain one stored line
      mem_valid     = 1'b1;
      mem_req       = '0;
      mem_req.write = 1'b1;
      mem_req.addr  = {tag[d_set][d_way], d_set, {OFF_W{1'b0}}};
      mem_req.home  = home_of(mem_req.addr);
      mem_req.data  = data[d_set][d_way];
    end
  end
  wire drain_fire = !in_valid && has_old && mem_ready;

  // ---- responses: memory first, then held hits
  always_comb begin
    mresp_ready = resp_ready;
    resp_valid  = mresp_valid || hq_v;
    resp        = mresp_valid ? mresp : hq;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      v    <= '0;
      hq_v <= 1'b0;
    end else begin
      if (hq_v && resp_ready && !mresp_valid) hq_v <= 1'b0;
      if (drain_fire) v[d_set][d_way] <= 1'b0;
      if (rd_hit && !hq_v) begin
        hq_v             <= 1'b1;
        v[set][hit_w]    <= 1'b0;
      end
      if (keep_wr) v[set][hit ? hit_w : free_w] <= 1'b1;
      // a write that bypasses the store drops an older copy
      if (pass && in_req.write && hit && mem_ready) v[set][hit_w] <= 1'b0;
    end
  end

  always_ff @(posedge clk) begin
    if (rd_hit && !hq_v) begin
      hq      <= in_req;
      hq.data <= data[set][hit_w];
    end
    if (keep_wr) begin
      tag[set][hit ? hit_w : free_w]  <= itag;
      data[set][hit ? hit_w : free_w] <= in_req.data;
    end
  end

  assign empty = (v == '0) && !hq_v;
endmodule

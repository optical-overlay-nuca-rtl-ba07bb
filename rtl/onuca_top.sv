// onuca_top: 32-bank shared L2 over an optical network with OP_BCAST overlays.
//
// 32 cores and 32 L2 banks (128 KB each) sit on 16 tiles, each tile with one
// optical station. Every core's L1 misses enter through an l2_requester and go
// optically to the line's home bank, whose home bank controller searches it
// and, on a miss, its overlay's overflow banks (OP_BCAST). Lines missing from
// the whole overlay are read from main memory through one of 4 memory
// controller ports (bank b uses controller b / 8), each behind a 32 KB
// victim bank that takes the write-backs of a reconfiguration and answers
// reads of the lines it holds; read data comes back through the network to
// the home bank. The overlay builder counts bank
// accesses and, on change_overlay or at the end of each `threshold`-cycle
// epoch, builds a new set of six overlays; the reconfiguration sequencer then
// drains the system, runs every bank's reconfiguration controller to evict
// lines that no longer belong, and installs the overlay. Until the first
// overlay the cache runs as a static NUCA (home bank only).
// Ports: per-core miss/response, per-controller memory request/response
// (memory data returns as a read response carrying the request's id, core
// and home bank), overlay control, and per-bank event pulses for statistics.
// The memory system, cores, L1s and directories are outside this design.
module onuca_top
  import onuca_pkg::*;
#(
  parameter int N_ST     = 16,
  parameter int N_MC     = 4,
  parameter int MQ_DEPTH = 16,
  parameter int RCB_DEPTH = 128,
  parameter int VB_DEPTH = 20,
  parameter int BANK_LAT = 8,
  parameter int CNT_W    = 100
) (
  input  logic                              clk,
  input  logic                              rst_n,
  // cores
  input  logic [N_CORES-1:0]                l1_miss_valid,
  input  logic [N_CORES-1:0][ADDR_W-1:0]    l1_miss_addr,
  output logic [N_CORES-1:0]                l1_miss_ready,
  output logic [N_CORES-1:0]                l2_resp_valid,
  output logic [N_CORES-1:0][ADDR_W-1:0]    l2_resp_addr,
  output logic [N_CORES-1:0][LINE_BITS-1:0] l2_resp_data,
  output logic [N_CORES-1:0]                core_nacked,
  // memory controllers
  output logic [N_MC-1:0]                   mem_req_valid,
  output mem_req_t [N_MC-1:0]               mem_req,
  input  logic [N_MC-1:0]                   mem_req_ready,
  input  logic [N_MC-1:0]                   mem_resp_valid,
  input  mem_req_t [N_MC-1:0]               mem_resp,
  output logic [N_MC-1:0]                   mem_resp_ready,
  // overlays
  input  logic                              change_overlay,
  input  logic [31:0]                       threshold,
  output logic                              reconfiguring,
  output logic                              ovl_valid,
  output osv_t                              ovl_osv,
  output logic [15:0]                       n_reconf,
  output logic [N_BANKS-1:0][3:0]           rc_pos_mask,
  output hbc_events_t [N_BANKS-1:0]         bank_events,
  output logic                              sys_idle
);
  localparam int BPM = N_BANKS / N_MC;  // banks per memory controller

  // ---------------- network
  logic [N_CORES-1:0] c_tx_v, c_tx_r, c_rx_v;
  msg_t [N_CORES-1:0] c_tx, c_rx;
  logic [N_BANKS-1:0] b_tx_v, b_tx_r, b_rx_v, b_rx_r;
  msg_t [N_BANKS-1:0] b_tx, b_rx;
  msg_t [N_MC-1:0]    m_tx;
  logic               noc_idle;

  // read responses (memory or victim bank) become memory fills to the home bank
  logic [N_MC-1:0]    vr_v, vr_r;
  mem_req_t [N_MC-1:0] vr;
  always_comb
    for (int m = 0; m < N_MC; m++)
      m_tx[m] = '{hdr: '{msg_id: vr[m].msg_id, core_id: vr[m].core_id,
                         src_id: '0, dst_id: bank_node(vr[m].home), mtype: MSG_MEMFILL,
                         home_id: bank_node(vr[m].home), addr: vr[m].addr},
                   data: vr[m].data};

  optical_noc #(.N(N_ST), .N_MC(N_MC)) u_noc (
    .clk, .rst_n,
    .core_tx_valid(c_tx_v), .core_tx(c_tx), .core_tx_ready(c_tx_r),
    .bank_tx_valid(b_tx_v), .bank_tx(b_tx), .bank_tx_ready(b_tx_r),
    .mem_tx_valid(vr_v), .mem_tx(m_tx), .mem_tx_ready(vr_r),
    .core_rx_valid(c_rx_v), .core_rx(c_rx),
    .bank_rx_valid(b_rx_v), .bank_rx(b_rx), .bank_rx_ready(b_rx_r),
    .idle(noc_idle)
  );

  // ---------------- overlay builder and reconfiguration sequencer
  logic [N_BANKS-1:0]      acc, hbc_idle, rc_busy, need_f;
  logic [N_BANKS-1:0][3:0] pmask;
  logic                    b_done, suspend, rmode, rstart, oload;
  osv_t                    b_osv, l_osv;
  obv_t                    b_obv, l_obv;
  logic [N_CORES-1:0]      req_busy;

  overlay_builder #(.CNT_W(CNT_W)) u_builder (
    .clk, .rst_n, .bank_access(acc), .change_overlay, .threshold,
    .busy(), .done(b_done), .osv(b_osv), .obv(b_obv)
  );

  assign sys_idle = (&hbc_idle) && noc_idle && (req_busy == '0);

  reconf_sequencer u_seq (
    .clk, .rst_n, .build_done(b_done), .new_osv(b_osv), .new_obv(b_obv),
    .sys_idle, .rc_busy, .suspend, .reconf_mode(rmode), .rc_start(rstart),
    .need_foreign(need_f), .pos_mask(pmask), .ovl_load(oload),
    .load_osv(l_osv), .load_obv(l_obv), .ovl_valid, .cur_osv(ovl_osv), .n_reconf
  );
  assign reconfiguring = suspend;
  assign rc_pos_mask   = pmask;

  // ---------------- cores' request ports
  for (genvar c = 0; c < N_CORES; c++) begin : g_core
    l2_requester #(.CORE(c)) u_req (
      .clk, .rst_n, .hold(suspend),
      .miss_valid(l1_miss_valid[c]), .miss_addr(l1_miss_addr[c]), .miss_ready(l1_miss_ready[c]),
      .net_out_valid(c_tx_v[c]), .net_out(c_tx[c]), .net_out_ready(c_tx_r[c]),
      .net_in_valid(c_rx_v[c]), .net_in(c_rx[c]),
      .resp_valid(l2_resp_valid[c]), .resp_addr(l2_resp_addr[c]), .resp_data(l2_resp_data[c]),
      .busy(req_busy[c]), .nacked(core_nacked[c])
    );
  end

  // ---------------- banks
  logic [N_BANKS-1:0] bm_v, bm_r;
  mem_req_t [N_BANKS-1:0] bm;
  for (genvar b = 0; b < N_BANKS; b++) begin : g_bank
    home_bank_controller #(
      .BANK(b), .MQ_DEPTH(MQ_DEPTH), .RCB_DEPTH(RCB_DEPTH), .VB_DEPTH(VB_DEPTH),
      .VB_HOLD(MQ_DEPTH + 3), .BANK_LAT(BANK_LAT)
    ) u_hbc (
      .clk, .rst_n,
      .net_in_valid(b_rx_v[b]), .net_in(b_rx[b]), .net_in_ready(b_rx_r[b]),
      .net_out_valid(b_tx_v[b]), .net_out(b_tx[b]), .net_out_ready(b_tx_r[b]),
      .mem_valid(bm_v[b]), .mem_req(bm[b]), .mem_ready(bm_r[b]),
      .ovl_load(oload), .new_osv(l_osv), .new_obv(l_obv),
      .reconf_mode(rmode), .reconf_start(rstart),
      .reconf_need_foreign(need_f[b]), .reconf_pos_mask(pmask[b]),
      .reconf_busy(rc_busy[b]),
      .idle(hbc_idle[b]), .access(acc[b]), .events(bank_events[b])
    );
  end

  for (genvar m = 0; m < N_MC; m++) begin : g_mc
    logic     a_v, a_r;
    mem_req_t a_req;
    mem_arbiter #(.N(BPM)) u_arb (
      .clk, .rst_n,
      .in_valid(bm_v[m*BPM +: BPM]), .in_req(bm[m*BPM +: BPM]), .in_ready(bm_r[m*BPM +: BPM]),
      .out_valid(a_v), .out_req(a_req), .out_ready(a_r)
    );
    victim_bank u_vbank (
      .clk, .rst_n, .wb_reconf(rmode),
      .in_valid(a_v), .in_req(a_req), .in_ready(a_r),
      .mem_valid(mem_req_valid[m]), .mem_req(mem_req[m]), .mem_ready(mem_req_ready[m]),
      .mresp_valid(mem_resp_valid[m]), .mresp(mem_resp[m]), .mresp_ready(mem_resp_ready[m]),
      .resp_valid(vr_v[m]), .resp(vr[m]), .resp_ready(vr_r[m]),
      .empty()
    );
  end
endmodule

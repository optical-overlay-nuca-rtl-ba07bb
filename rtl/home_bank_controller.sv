// home_bank_controller: one L2 bank and the logic that runs OP_BCAST on it.
//
// Messages from the optical network arrive on net_in. Requests and line
// transfers (Fill, memory fill) go into the message queue, or are refused
// with a NACK when it is full; control messages are handled at once: a Kill
// removes queued copies of a request, Hit and Miss go to the RCB, and a NACK
// makes this bank resend the refused request or Fill. The queue is served in
// order, one message at a time: the cache bank (8-cycle access) and the
// victim buffer are searched, and search_logic decides the reply:
//   home hit -> response; home miss -> RCB entry and the request forwarded to
//   the 4 overflow banks of the home overlay (or main memory if the home bank
//   is base in no overlay); overflow hit -> response, Hit to the home bank,
//   Kills to the other overflow banks and migration of the line one step
//   towards home through the victim buffer; overflow miss -> Miss home.
// A Fill writes the line; its victim goes to the next overflow bank through
// the victim buffer, or to memory from the last bank (eviction_logic). Each
// fill also records the line's {foreign, position} bits in the reconfiguration
// controller, which, in reconf_mode, reports lines that this controller then
// invalidates and writes to memory. Outgoing messages leave one per cycle on
// net_out: NACKs and resends first, then the replies of the current request,
// then victim-buffer Fills. Memory reads and write-backs leave on mem_*.
// Timing: a request costs about 2 + 8 cycles of bank time plus one cycle per
// message it sends. Serving one message at a time, instead of the document's
// pipelined bank, is this design's simplification. Message ids are the bank
// number in the 5 MSBs and a 27-bit sequence number, as in the document;
// Fills carry id 0 so that their NACKs can be told from those of searches.
module home_bank_controller
  import onuca_pkg::*;
#(
  parameter int BANK     = 0,
  parameter int MQ_DEPTH = 16,
  parameter int RCB_DEPTH = 128,
  parameter int VB_DEPTH = 20,
  parameter int VB_HOLD  = 19,
  parameter int BANK_LAT = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  // optical network
  input  logic        net_in_valid,
  input  msg_t        net_in,
  output logic        net_in_ready,
  output logic        net_out_valid,
  output msg_t        net_out,
  input  logic        net_out_ready,
  // main memory
  output logic        mem_valid,
  output mem_req_t    mem_req,
  input  logic        mem_ready,
  // overlay installation and reconfiguration
  input  logic        ovl_load,
  input  osv_t        new_osv,
  input  obv_t        new_obv,
  input  logic        reconf_mode,     // system suspended: serve the reconf controller
  input  logic        reconf_start,
  input  logic        reconf_need_foreign,
  input  logic [3:0]  reconf_pos_mask,
  output logic        reconf_busy,
  // status
  output logic        idle,            // nothing queued, outstanding or in flight here
  output logic        access,          // one pulse per request looked up (for the BAV)
  output hbc_events_t events
);
  localparam logic [BANK_W-1:0] ME   = BANK_W'(BANK);
  localparam logic [NODE_W-1:0] NODE = bank_node(ME);
  localparam int NACT = 5;

  // ---------------- overlay information
  logic       ovl_valid;
  osv_t       osv;
  obv_t       obv;
  home_info_t my_home;
  logic       my_infreq;
  overlay_info_store u_info (
    .clk, .rst_n, .load(ovl_load), .new_osv, .new_obv, .my_bank(ME),
    .valid(ovl_valid), .osv, .obv, .my_home, .my_infreq
  );

  // ---------------- input side: MQ, NACK controller, control messages
  logic     mq_full, mq_empty, mq_out_valid, mq_pop, mq_killed, mq_push;
  msg_t     mq_out;
  logic     nack_v;
  msg_hdr_t nack_h;

  // small FIFO for control messages produced on input (NACKs, resends)
  localparam int CF = 4;
  msg_hdr_t  cf_q [CF];
  logic [1:0] cf_head, cf_tail;
  logic [2:0] cf_cnt;
  logic       cf_push, cf_pop;
  msg_hdr_t   cf_in;

  wire in_fire = net_in_valid && net_in_ready;
  msg_type_e in_t;
  assign in_t = net_in.hdr.mtype;

  assign net_in_ready = (cf_cnt != 3'(CF)) && !(in_t == MSG_MEMFILL && mq_full);

  nack_controller u_nack (
    .in_valid(in_fire), .in_hdr(net_in.hdr), .mq_full, .my_node(NODE),
    .enqueue(mq_push), .nack_valid(nack_v), .nack_hdr(nack_h)
  );

  message_queue #(.DEPTH(MQ_DEPTH)) u_mq (
    .clk, .rst_n, .in_valid(mq_push), .in_msg(net_in), .full(mq_full), .empty(mq_empty),
    .out_valid(mq_out_valid), .out_msg(mq_out), .out_pop(mq_pop),
    .kill_valid(in_fire && in_t == MSG_KILL), .kill_id(net_in.hdr.msg_id), .killed(mq_killed)
  );

  // a NACK with id 0 refuses one of our Fills; any other refuses a search
  wire nack_in   = in_fire && in_t == MSG_NACK;
  wire fill_nack = nack_in && net_in.hdr.msg_id == '0;
  wire req_nack  = nack_in && net_in.hdr.msg_id != '0;

  always_comb begin
    cf_push = nack_v || req_nack;
    cf_in   = nack_h;
    if (req_nack) begin
      cf_in        = net_in.hdr;
      cf_in.mtype  = MSG_REQ;
      cf_in.src_id = NODE;
      cf_in.dst_id = net_in.hdr.src_id;
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      cf_head <= '0; cf_tail <= '0; cf_cnt <= '0;
    end else begin
      if (cf_push) begin cf_q[cf_tail] <= cf_in; cf_tail <= cf_tail + 1'b1; end
      if (cf_pop) cf_head <= cf_head + 1'b1;
      cf_cnt <= cf_cnt + 3'(cf_push) - 3'(cf_pop);
    end

  // Miss from an overflow bank: its slot in this bank's home overlay
  logic [1:0] miss_bit;
  always_comb begin
    miss_bit = '0;
    for (int i = N_OVF - 1; i >= 0; i--)
      if (osv[my_home.ovl][N_BASE + i] == net_in.hdr.src_id[BANK_W-1:0]) miss_bit = 2'(i);
  end

  // ---------------- storage blocks
  logic                  c_req_valid, c_ready, c_resp_valid, c_hit, c_vic_valid, c_inval;
  logic [1:0]            c_op;
  logic [ADDR_W-1:0]     c_addr, c_vic_addr;
  logic [LINE_BITS-1:0]  c_wdata, c_rdata, c_vic_data;
  logic [LINE_IDX_W-1:0] c_idx, c_resp_idx;
  cache_bank #(.LATENCY(BANK_LAT)) u_bank (
    .clk, .rst_n, .req_valid(c_req_valid), .req_op(c_op), .req_addr(c_addr),
    .req_inval(c_inval), .req_data(c_wdata), .req_idx(c_idx), .req_ready(c_ready),
    .resp_valid(c_resp_valid), .resp_hit(c_hit), .resp_data(c_rdata), .resp_idx(c_resp_idx),
    .victim_valid(c_vic_valid), .victim_addr(c_vic_addr), .victim_data(c_vic_data)
  );

  logic                 vb_ins, vb_full, vb_empty, vb_hit, vb_send_v, vb_send_rdy;
  logic [ADDR_W-1:0]    vb_ins_addr, vb_send_addr;
  logic [BANK_W-1:0]    vb_ins_dest, vb_send_dest;
  logic [LINE_BITS-1:0] vb_ins_data, vb_hit_data, vb_send_data;
  msg_t                 cur;
  victim_buffer #(.DEPTH(VB_DEPTH), .HOLD(VB_HOLD)) u_vb (
    .clk, .rst_n, .ins_valid(vb_ins), .ins_addr(vb_ins_addr), .ins_dest(vb_ins_dest),
    .ins_data(vb_ins_data), .full(vb_full), .empty(vb_empty),
    .lookup_addr(cur.hdr.addr), .lookup_hit(vb_hit), .lookup_data(vb_hit_data),
    .send_valid(vb_send_v), .send_addr(vb_send_addr), .send_dest(vb_send_dest),
    .send_data(vb_send_data), .send_ready(vb_send_rdy),
    .nack_valid(fill_nack), .nack_addr(net_in.hdr.addr)
  );

  logic               rcb_alloc, rcb_full, rcb_empty, rcb_mem_v, rcb_mem_rdy;
  logic [MSGID_W-1:0] rcb_mem_id;
  logic [ADDR_W-1:0]  rcb_mem_addr;
  logic [CORE_W-1:0]  rcb_mem_core;
  logic [SEQ_W-1:0]   seq;
  rcb #(.DEPTH(RCB_DEPTH), .MRBV_W(N_OVF)) u_rcb (
    .clk, .rst_n, .alloc_valid(rcb_alloc), .alloc_id({ME, seq}), .alloc_addr(cur.hdr.addr),
    .alloc_core(cur.hdr.core_id), .full(rcb_full), .empty(rcb_empty),
    .miss_valid(in_fire && in_t == MSG_MISS), .miss_id(net_in.hdr.msg_id), .miss_bit(miss_bit),
    .hit_valid(in_fire && in_t == MSG_HIT), .hit_id(net_in.hdr.msg_id),
    .mem_valid(rcb_mem_v), .mem_id(rcb_mem_id), .mem_addr(rcb_mem_addr),
    .mem_core(rcb_mem_core), .mem_ready(rcb_mem_rdy)
  );

  logic                  rc_override, rc_evict_ready, rc_trig;
  logic [LINE_IDX_W-1:0] rc_row;
  logic [2:0]            rc_update;
  logic                  rc_done;
  reconf_controller #(.LINES(LINES), .ROW_ENTRIES(64)) u_reconf (
    .clk, .rst_n, .trigger(rc_trig), .address(c_resp_idx), .update(rc_update),
    .start(reconf_start), .need_foreign(reconf_need_foreign), .pos_mask(reconf_pos_mask),
    .override(rc_override), .row_num(rc_row), .evict_ready(rc_evict_ready),
    .busy(reconf_busy), .done(rc_done)
  );

  // ---------------- decision helpers
  home_info_t req_home, vic_home;
  logic       req_in_ovf, vic_in_ovf, req_mig_v, vic_mig_v, vic_to_mem, req_to_mem;
  logic [1:0] req_ovf_idx, vic_ovf_idx;
  logic [N_OVF-1:0][BANK_W-1:0] req_ovf, vic_ovf;
  logic [BANK_W-1:0] req_mig_dest, vic_dest, req_ev_dest, vic_mig_dest;
  eviction_logic u_ev_req (
    .osv, .ovl_valid, .my_bank(ME), .addr(cur.hdr.addr), .home(req_home),
    .in_ovf(req_in_ovf), .ovf_idx(req_ovf_idx), .ovf_banks(req_ovf),
    .evict_to_mem(req_to_mem), .evict_dest(req_ev_dest),
    .mig_valid(req_mig_v), .mig_dest(req_mig_dest)
  );
  eviction_logic u_ev_vic (
    .osv, .ovl_valid, .my_bank(ME), .addr(c_vic_addr), .home(vic_home),
    .in_ovf(vic_in_ovf), .ovf_idx(vic_ovf_idx), .ovf_banks(vic_ovf),
    .evict_to_mem(vic_to_mem), .evict_dest(vic_dest),
    .mig_valid(vic_mig_v), .mig_dest(vic_mig_dest)
  );

  logic cur_vb_hit;
  logic [LINE_BITS-1:0] cur_vb_data;
  wire  is_home = (home_of(cur.hdr.addr) == ME);
  logic s_resp, s_hit, s_kill, s_mig, s_fwd, s_mem, s_miss;
  search_logic u_search (
    .is_home, .searchable(req_home.searchable), .hit_bank(c_hit), .hit_vb(cur_vb_hit),
    .mig_valid(req_mig_v), .send_resp(s_resp), .send_hit(s_hit), .send_kill(s_kill),
    .migrate(s_mig), .forward(s_fwd), .mem_read(s_mem), .send_miss(s_miss)
  );

  logic [N_OVF-1:0] kill_v;
  msg_hdr_t [N_OVF-1:0] kill_h;
  kill_controller u_kill (
    .hit_in_ovf(s_kill), .my_idx(req_ovf_idx), .ovf_banks(req_ovf), .req_hdr(cur.hdr),
    .my_node(NODE), .kill_valid(kill_v), .kill_hdr(kill_h)
  );

  logic [ADDR_W-1:0]    f_addr;
  logic [LINE_BITS-1:0] f_data;
  logic [2:0]           f_bits;
  logic                 f_respond;
  fill_logic u_fill (
    .msg(cur), .my_bank(ME), .home(req_home),
    .fill_addr(f_addr), .fill_data(f_data), .state_bits(f_bits), .respond(f_respond)
  );

  // ---------------- request processing
  typedef enum logic [2:0] {S_IDLE, S_LOOK, S_WAIT, S_RCB, S_EMIT, S_RINV} state_e;
  state_e state;

  msg_t [NACT-1:0] act;
  logic [NACT-1:0] act_v;
  logic [$clog2(NACT)-1:0] act_sel;
  logic            memq_v;
  mem_req_t        memq;

  wire cur_is_req  = (cur.hdr.mtype == MSG_REQ);
  wire cur_is_fill = (cur.hdr.mtype == MSG_FILL) || (cur.hdr.mtype == MSG_MEMFILL);
  wire look_ok     = c_ready && !vb_full && !memq_v;

  function automatic msg_t mk(input msg_hdr_t h, input msg_type_e t,
                              input logic [NODE_W-1:0] dst, input logic [LINE_BITS-1:0] d);
    msg_t m;
    m.hdr        = h;
    m.hdr.mtype  = t;
    m.hdr.src_id = NODE;
    m.hdr.dst_id = dst;
    m.data       = d;
    return m;
  endfunction

  always_comb begin
    c_req_valid = 1'b0;
    c_op        = 2'd0;
    c_addr      = cur.hdr.addr;
    c_inval     = 1'b0;
    c_wdata     = f_data;
    c_idx       = rc_row;
    mq_pop      = 1'b0;
    rc_evict_ready = 1'b0;
    if (state == S_IDLE && reconf_mode) begin
      rc_evict_ready = c_ready && !memq_v;
      c_req_valid    = rc_override && rc_evict_ready;
      c_op           = 2'd2;
    end else if (state == S_IDLE) begin
      mq_pop = mq_out_valid;
    end else if (state == S_LOOK && look_ok) begin
      c_req_valid = 1'b1;
      c_op        = cur_is_req ? 2'd0 : 2'd1;
      c_addr      = cur_is_req ? cur.hdr.addr : f_addr;
      c_inval     = cur_is_req && !is_home && req_mig_v;
    end
  end

  assign access = (state == S_LOOK) && look_ok && cur_is_req;
  assign rc_trig   = (state == S_WAIT) && c_resp_valid && cur_is_fill;
  assign rc_update = f_bits;

  // victim buffer inserts: migrating line (request hit) or evicted victim (fill)
  always_comb begin
    vb_ins      = 1'b0;
    vb_ins_addr = line_addr(cur.hdr.addr);
    vb_ins_dest = req_mig_dest;
    vb_ins_data = c_rdata;
    if (state == S_WAIT && c_resp_valid) begin
      if (cur_is_req && s_mig) vb_ins = 1'b1;
      if (cur_is_fill && c_vic_valid && !vic_to_mem) begin
        vb_ins      = 1'b1;
        vb_ins_addr = c_vic_addr;
        vb_ins_dest = vic_dest;
        vb_ins_data = c_vic_data;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state      <= S_IDLE;
      act_v      <= '0;
      memq_v     <= 1'b0;
      seq        <= SEQ_W'(1);
      cur_vb_hit <= 1'b0;
      events     <= '0;
    end else begin
      events <= '0;
      events.eff_kill   <= mq_killed;
      events.nack_sent  <= nack_v;
      events.nack_retry <= req_nack || fill_nack;
      events.mem_read   <= rcb_mem_v && rcb_mem_rdy;
      if (memq_v && mem_ready) memq_v <= 1'b0;
      if (net_out_valid && net_out_ready && cf_cnt == '0 && state == S_EMIT)
        act_v[act_sel] <= 1'b0;

      unique case (state)
        S_IDLE: begin
          if (reconf_mode) begin
            if (c_req_valid) state <= S_RINV;
          end else if (mq_out_valid) begin
            cur   <= mq_out;
            state <= S_LOOK;
          end
        end
        S_LOOK: if (look_ok) begin
          cur_vb_hit  <= cur_is_req && vb_hit;
          cur_vb_data <= vb_hit_data;
          state       <= S_WAIT;
        end
        S_WAIT: if (c_resp_valid) begin
          state <= S_IDLE;
          if (cur_is_req) begin
            events.home_hit <= is_home && c_hit;
            events.vb_hit   <= cur_vb_hit && !c_hit;
            events.ovf_hit  <= s_hit;
            events.ovf_miss <= s_miss;
            events.migrate  <= s_mig;
            if (s_resp) begin
              act[0]   <= mk(cur.hdr, MSG_RESP, core_node(cur.hdr.core_id),
                             c_hit ? c_rdata : cur_vb_data);
              act_v[0] <= 1'b1;
              state    <= S_EMIT;
            end
            if (s_hit) begin
              act[1]   <= mk(cur.hdr, MSG_HIT, bank_node(home_of(cur.hdr.addr)), '0);
              act_v[1] <= 1'b1;
            end
            for (int j = 0; j < N_OVF - 1; j++) begin
              // the 3 other overflow banks, packed into act[2..4]
              automatic int src = (j < int'(req_ovf_idx)) ? j : j + 1;
              act[2+j]   <= mk(kill_h[src], MSG_KILL, kill_h[src].dst_id, '0);
              act_v[2+j] <= kill_v[src];
            end
            if (s_miss) begin
              act[0]   <= mk(cur.hdr, MSG_MISS, bank_node(home_of(cur.hdr.addr)), '0);
              act_v[0] <= 1'b1;
              state    <= S_EMIT;
            end
            if (s_fwd) state <= S_RCB;
            if (s_mem) begin
              memq_v <= 1'b1;
              memq   <= '{write: 1'b0, addr: line_addr(cur.hdr.addr), msg_id: cur.hdr.msg_id,
                          core_id: cur.hdr.core_id, home: ME, data: '0};
              events.mem_read <= 1'b1;
            end
          end else begin
            if (f_respond) begin
              act[0]   <= mk(cur.hdr, MSG_RESP, core_node(cur.hdr.core_id), cur.data);
              act_v[0] <= 1'b1;
              state    <= S_EMIT;
            end
            if (c_vic_valid && vic_to_mem) begin
              memq_v <= 1'b1;
              memq   <= '{write: 1'b1, addr: c_vic_addr, msg_id: '0, core_id: '0,
                          home: home_of(c_vic_addr), data: c_vic_data};
              events.evict_mem <= 1'b1;
            end
            events.evict_bank <= c_vic_valid && !vic_to_mem;
          end
        end
        S_RCB: if (!rcb_full) begin
          for (int i = 0; i < N_OVF; i++) begin
            act[i]          <= mk(cur.hdr, MSG_REQ, bank_node(req_ovf[i]), '0);
            act[i].hdr.msg_id  <= {ME, seq};
            act[i].hdr.home_id <= NODE;
            act_v[i]        <= 1'b1;
          end
          seq <= (seq == '1) ? SEQ_W'(1) : seq + 1'b1;
          events.forward <= 1'b1;
          state <= S_EMIT;
        end
        S_EMIT: if (act_v == '0) state <= S_IDLE;
        S_RINV: if (c_resp_valid) begin
          state <= S_IDLE;
          if (c_vic_valid) begin
            memq_v <= 1'b1;
            memq   <= '{write: 1'b1, addr: c_vic_addr, msg_id: '0, core_id: '0,
                        home: home_of(c_vic_addr), data: c_vic_data};
            events.reconf_evict <= 1'b1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  assign rcb_alloc = (state == S_RCB) && !rcb_full;

  // ---------------- outputs
  always_comb begin
    act_sel = '0;
    for (int k = NACT - 1; k >= 0; k--) if (act_v[k]) act_sel = ($clog2(NACT))'(k);
  end

  always_comb begin
    cf_pop        = 1'b0;
    vb_send_rdy   = 1'b0;
    net_out_valid = 1'b0;
    net_out       = act[act_sel];
    if (cf_cnt != '0) begin
      net_out_valid = 1'b1;
      net_out       = '{hdr: cf_q[cf_head], data: '0};
      cf_pop        = net_out_ready;
    end else if (state == S_EMIT && act_v != '0) begin
      net_out_valid = 1'b1;
    end else if (vb_send_v) begin
      net_out_valid = 1'b1;
      net_out.hdr   = '{msg_id: '0, core_id: '0, src_id: NODE, dst_id: bank_node(vb_send_dest),
                        mtype: MSG_FILL, home_id: bank_node(home_of(vb_send_addr)),
                        addr: vb_send_addr};
      net_out.data  = vb_send_data;
      vb_send_rdy   = net_out_ready;
    end
  end

  assign rcb_mem_rdy = mem_ready && !memq_v;
  always_comb begin
    mem_valid = memq_v || rcb_mem_v;
    mem_req   = memq;
    if (!memq_v)
      mem_req = '{write: 1'b0, addr: rcb_mem_addr, msg_id: rcb_mem_id, core_id: rcb_mem_core,
                  home: ME, data: '0};
  end

  assign idle = (state == S_IDLE) && mq_empty && vb_empty && rcb_empty && (cf_cnt == '0) &&
                !memq_v && c_ready && !reconf_busy;

  // the kill list must never address this bank itself
  assert property (@(posedge clk) disable iff (!rst_n)
    (state == S_WAIT && c_resp_valid && s_kill) |-> !kill_v[req_ovf_idx]);
endmodule

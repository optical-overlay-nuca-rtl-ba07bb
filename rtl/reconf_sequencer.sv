// reconf_sequencer: installs a new overlay while the system is quiet.
//
// When the overlay builder has a new overlay (build_done) the sequencer
// suspends new L2 requests and waits until every bank, the network and every
// requester are idle. It then puts the banks in reconfiguration mode and
// starts all reconfiguration controllers at once, each with the predicate of
// the lines its bank must give up, compares old and new OSV:
//   case 2: a bank that was an overflow bank of overlay o and is no longer
//           one gives up all foreign lines (need_foreign, pos_mask = 1111);
//   case 1: a bank that stays an overflow bank of o gives up the foreign
//           lines whose position is a base slot of o that now holds a
//           different bank (pos_mask bit per changed slot).
// Before any overlay exists no line is foreign and nothing is evicted. When
// the scans are over and the evicted lines have gone to memory, the new
// overlay is loaded into every bank's overlay info store and requests resume.
// A bank in two overflow sets shares one 2-bit position space between them,
// so its mask is the union of both overlays' changed slots (this evicts more
// than needed, never less). The document gives the two cases; the
// sequencing and the mask form are this design's.
module reconf_sequencer
  import onuca_pkg::*;
(
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic                     build_done,
  input  osv_t                     new_osv,
  input  obv_t                     new_obv,
  input  logic                     sys_idle,
  input  logic [N_BANKS-1:0]       rc_busy,
  output logic                     suspend,      // hold new L2 requests
  output logic                     reconf_mode,
  output logic                     rc_start,
  output logic [N_BANKS-1:0]       need_foreign,
  output logic [N_BANKS-1:0][3:0]  pos_mask,
  output logic                     ovl_load,
  output osv_t                     load_osv,
  output obv_t                     load_obv,
  output logic                     ovl_valid,    // an overlay is installed
  output osv_t                     cur_osv,
  output logic [15:0]              n_reconf      // overlays installed so far
);
  typedef enum logic [2:0] {Q_RUN, Q_DRAIN, Q_START, Q_SCAN, Q_LOAD} qstate_e;
  qstate_e st;
  osv_t    nxt_osv;
  obv_t    nxt_obv;

  // predicates from old (cur_osv) and new (nxt_osv) overlays
  always_comb begin
    for (int b = 0; b < N_BANKS; b++) begin
      need_foreign[b] = 1'b0;
      pos_mask[b]     = '0;
      if (ovl_valid)
        for (int o = 0; o < N_OVL; o++) begin
          automatic logic was_ovf = 1'b0, is_ovf = 1'b0;
          for (int i = 0; i < N_OVF; i++) begin
            if (cur_osv[o][N_BASE + i] == BANK_W'(b)) was_ovf = 1'b1;
            if (nxt_osv[o][N_BASE + i] == BANK_W'(b)) is_ovf  = 1'b1;
          end
          if (was_ovf && !is_ovf) begin
            need_foreign[b] = 1'b1;
            pos_mask[b]     = 4'b1111;
          end else if (was_ovf)
            for (int s = 0; s < N_BASE; s++)
              if (cur_osv[o][s] != nxt_osv[o][s]) begin
                need_foreign[b] = 1'b1;
                pos_mask[b][s]  = 1'b1;
              end
        end
    end
  end

  assign suspend     = (st != Q_RUN);
  assign reconf_mode = (st == Q_START) || (st == Q_SCAN);
  assign rc_start    = (st == Q_START);
  assign ovl_load    = (st == Q_LOAD);
  assign load_osv    = nxt_osv;
  assign load_obv    = nxt_obv;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      st        <= Q_RUN;
      ovl_valid <= 1'b0;
      cur_osv   <= '0;
      nxt_osv   <= '0;
      nxt_obv   <= '0;
      n_reconf  <= '0;
    end else begin
      unique case (st)
        Q_RUN: if (build_done) begin
          nxt_osv <= new_osv;
          nxt_obv <= new_obv;
          st      <= Q_DRAIN;
        end
        Q_DRAIN: if (sys_idle) st <= Q_START;
        Q_START: st <= Q_SCAN;
        Q_SCAN:  if (rc_busy == '0 && sys_idle) st <= Q_LOAD;
        Q_LOAD: begin
          cur_osv   <= nxt_osv;
          ovl_valid <= 1'b1;
          n_reconf  <= n_reconf + 1'b1;
          st        <= Q_RUN;
        end
        default: st <= Q_RUN;
      endcase
    end
  end
endmodule

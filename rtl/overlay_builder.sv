// overlay_builder: the overlay network generator.
//
// Bank access vector (BAV): one CNT_W-bit access counter per bank (32 x 100 =
// 3200 bits, the document's figure), incremented by the banks' access
// pulses. A build starts on change_overlay, or when the epoch counter of
// clock cycles reaches `threshold` (0 disables it). The counts are copied into
// a sorter that orders banks by descending count (odd-even transposition,
// one pass per cycle, N_BANKS passes; ties keep the lower bank id first);
// the counters restart for the next epoch. The overlay-builder logic then
// fills the overlay structure vector (OSV, 6 x 8 x 5 = 240 bits) and overlay
// bit vector (OBV, 32 bits) from the ranks r = 0..31 (0 = most accessed):
//   hybrid-o 0: base r 0-3,   overflow r 28-31
//   hybrid-o 1: base r 12-15, overflow r 16-19
//   hybrid-o 2: base r 4-7,   overflow r 24-27
//   hybrid-o 3: base r 8-11,  overflow r 20-23
//   infreq-o 4: base r 16-19, overflow r 28-31
//   infreq-o 5: base r 20-23, overflow r 24-27
// This is the grouping the document draws for OP_BCAST: the 16 most accessed
// banks are only base banks, the next 8 are base in an infreq-o overlay and
// overflow in a hybrid-o one, the last 8 only overflow banks. Within a set,
// banks are in rank order; the first overflow bank receives evictions first.
// OBV[b] = 1 for the 16 banks whose home overlay is infreq-o (ranks 16-31).
// `done` pulses when OSV/OBV hold the new overlay (N_BANKS + 2 cycles after
// the start). The meaning of `threshold`, the sort circuit and the order
// inside a set are this design's choices.
module overlay_builder
  import onuca_pkg::*;
#(
  parameter int CNT_W = 100
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic [N_BANKS-1:0] bank_access,    // one pulse per bank access
  input  logic               change_overlay, // build now
  input  logic [31:0]        threshold,      // epoch length in cycles, 0 = off
  output logic               busy,
  output logic               done,
  output osv_t               osv,
  output obv_t               obv
);
  typedef struct packed {
    logic [CNT_W-1:0]  cnt;
    logic [BANK_W-1:0] id;
  } rank_t;

  logic [N_BANKS-1:0][CNT_W-1:0] bav;
  rank_t [N_BANKS-1:0]           srt;
  logic [31:0]                   epoch;
  logic [$clog2(N_BANKS+1)-1:0]  pass;

  typedef enum logic [1:0] {B_IDLE, B_SORT, B_BUILD} bstate_e;
  bstate_e st;

  wire go = (st == B_IDLE) && (change_overlay || (threshold != '0 && epoch >= threshold));

  // one odd-even transposition pass
  function automatic rank_t [N_BANKS-1:0] sort_pass(input rank_t [N_BANKS-1:0] a,
                                                    input logic odd);
    rank_t [N_BANKS-1:0] r;
    r = a;
    for (int i = 0; i + 1 < N_BANKS; i++)
      if ((i % 2 == 1) == odd)
        if (a[i+1].cnt > a[i].cnt) begin
          r[i]   = a[i+1];
          r[i+1] = a[i];
        end
    return r;
  endfunction

  // rank at which each slot of each overlay starts
  function automatic int base_rank(input int o);
    case (o)
      0: return 0;  1: return 12; 2: return 4;
      3: return 8;  4: return 16; default: return 20;
    endcase
  endfunction
  function automatic int ovf_rank(input int o);
    case (o)
      0: return 28; 1: return 16; 2: return 24;
      3: return 20; 4: return 28; default: return 24;
    endcase
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bav   <= '0;
      epoch <= '0;
      st    <= B_IDLE;
      pass  <= '0;
      done  <= 1'b0;
      osv   <= '0;
      obv   <= '0;
    end else begin
      done  <= 1'b0;
      epoch <= epoch + 1'b1;
      for (int b = 0; b < N_BANKS; b++)
        if (bank_access[b]) bav[b] <= bav[b] + 1'b1;
      unique case (st)
        B_IDLE: if (go) begin
          for (int b = 0; b < N_BANKS; b++) begin
            srt[b].cnt <= bav[b];
            srt[b].id  <= BANK_W'(b);
          end
          bav   <= '0;
          epoch <= '0;
          pass  <= '0;
          st    <= B_SORT;
        end
        B_SORT: begin
          srt  <= sort_pass(srt, pass[0]);
          pass <= pass + 1'b1;
          if (pass == ($clog2(N_BANKS+1))'(N_BANKS - 1)) st <= B_BUILD;
        end
        B_BUILD: begin
          for (int o = 0; o < N_OVL; o++)
            for (int s = 0; s < N_BASE; s++) begin
              osv[o][s]          <= srt[base_rank(o) + s].id;
              osv[o][N_BASE + s] <= srt[ovf_rank(o) + s].id;
            end
          for (int r = 0; r < N_BANKS; r++)
            obv[srt[r].id] <= (r >= 16);
          done <= 1'b1;
          st   <= B_IDLE;
        end
        default: st <= B_IDLE;
      endcase
    end
  end

  assign busy = (st != B_IDLE);
endmodule

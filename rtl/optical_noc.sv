// optical_noc: the on-chip optical network joining the 16 tiles.
//
// N stations, each with its own data waveguide and reservation slot
// (optical_station), connected single-writer / multiple-reader: every
// station's reservation word and flits reach every other station. The
// photonic parts (laser, modulators, waveguides, photodetectors) are
// represented only by these wires. Station s serves cores 2s and 2s+1 and
// banks 2s and 2s+1; the responses of memory controller m enter at station
// N/N_MC * m. Endpoint arrays: cores 0..31 and banks 0..31 send and receive,
// memory controllers only send. `idle` is high when nothing is in flight.
module optical_noc
  import onuca_pkg::*;
#(
  parameter int N    = 16,
  parameter int N_MC = 4
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic [2*N-1:0]        core_tx_valid,
  input  msg_t [2*N-1:0]        core_tx,
  output logic [2*N-1:0]        core_tx_ready,
  input  logic [2*N-1:0]        bank_tx_valid,
  input  msg_t [2*N-1:0]        bank_tx,
  output logic [2*N-1:0]        bank_tx_ready,
  input  logic [N_MC-1:0]       mem_tx_valid,
  input  msg_t [N_MC-1:0]       mem_tx,
  output logic [N_MC-1:0]       mem_tx_ready,
  output logic [2*N-1:0]        core_rx_valid,
  output msg_t [2*N-1:0]        core_rx,
  output logic [2*N-1:0]        bank_rx_valid,
  output msg_t [2*N-1:0]        bank_rx,
  input  logic [2*N-1:0]        bank_rx_ready,
  output logic                  idle
);
  localparam int MC_STEP = N / N_MC;

  logic [N-1:0]                 res_valid, flit_valid, st_idle;
  logic [N-1:0][N-1:0]          res_word;
  logic [N-1:0][FLIT_BITS-1:0]  flit;
  logic [N-1:0][N-1:0][3:0]     slot_busy;     // [receiver][writer][local]
  logic [N-1:0][N-1:0][3:0]     dest_busy;     // [writer][receiver][local]

  always_comb
    for (int w = 0; w < N; w++)
      for (int r = 0; r < N; r++)
        dest_busy[w][r] = slot_busy[r][w];

  for (genvar s = 0; s < N; s++) begin : g_st
    logic [4:0]       sv, sr;
    msg_t [4:0]       sm;
    logic [3:0]       dv, dr;
    msg_t [3:0]       dm;
    always_comb begin
      sv[0] = core_tx_valid[2*s];   sm[0] = core_tx[2*s];
      sv[1] = core_tx_valid[2*s+1]; sm[1] = core_tx[2*s+1];
      sv[2] = bank_tx_valid[2*s];   sm[2] = bank_tx[2*s];
      sv[3] = bank_tx_valid[2*s+1]; sm[3] = bank_tx[2*s+1];
      sv[4] = 1'b0;                 sm[4] = '0;
      if (s % MC_STEP == 0) begin
        sv[4] = mem_tx_valid[s / MC_STEP];
        sm[4] = mem_tx[s / MC_STEP];
      end
    end
    assign core_tx_ready[2*s]   = sr[0];
    assign core_tx_ready[2*s+1] = sr[1];
    assign bank_tx_ready[2*s]   = sr[2];
    assign bank_tx_ready[2*s+1] = sr[3];
    if (s % MC_STEP == 0) begin : g_mc
      assign mem_tx_ready[s / MC_STEP] = sr[4];
    end

    assign core_rx_valid[2*s]   = dv[0]; assign core_rx[2*s]   = dm[0];
    assign core_rx_valid[2*s+1] = dv[1]; assign core_rx[2*s+1] = dm[1];
    assign bank_rx_valid[2*s]   = dv[2]; assign bank_rx[2*s]   = dm[2];
    assign bank_rx_valid[2*s+1] = dv[3]; assign bank_rx[2*s+1] = dm[3];
    assign dr = {bank_rx_ready[2*s+1], bank_rx_ready[2*s], 2'b11};

    optical_station #(.ST(s), .N(N), .NL(5)) u_station (
      .clk, .rst_n,
      .src_valid(sv), .src_msg(sm), .src_ready(sr),
      .dst_valid(dv), .dst_msg(dm), .dst_ready(dr),
      .res_valid(res_valid[s]), .res_word(res_word[s]),
      .flit_valid(flit_valid[s]), .flit(flit[s]),
      .res_valid_in(res_valid), .res_word_in(res_word),
      .flit_valid_in(flit_valid), .flit_in(flit),
      .slot_busy(slot_busy[s]), .dest_slot_busy(dest_busy[s]),
      .idle(st_idle[s])
    );
  end

  assign idle = &st_idle;
endmodule

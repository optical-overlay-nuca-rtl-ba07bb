// overlay_info_store: a bank's copy of the overlay structure.
//
// Holds the overlay structure vector (six overlays of 4 base + 4 overflow
// bank ids) and the overlay bit vector, loaded from the overlay builder when
// a new overlay is installed (load). Until the first load `valid` is 0 and
// the cache behaves as a static NUCA: every bank serves only its own lines,
// as in the document's profiling phase. It also answers, for this bank, which
// overlay it searches as a home bank and its bank-map position there.
module overlay_info_store
  import onuca_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  logic              load,      // install new_osv / new_obv
  input  osv_t              new_osv,
  input  obv_t              new_obv,
  input  logic [BANK_W-1:0] my_bank,
  output logic              valid,     // an overlay is installed
  output osv_t              osv,
  output obv_t              obv,
  output home_info_t        my_home,   // this bank as a home bank
  output logic              my_infreq  // OBV bit of this bank
);
  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      valid <= 1'b0;
      osv   <= '0;
      obv   <= '0;
    end else if (load) begin
      valid <= 1'b1;
      osv   <= new_osv;
      obv   <= new_obv;
    end

  assign my_home   = home_lookup(osv, valid, my_bank);
  assign my_infreq = valid && obv[my_bank];
endmodule

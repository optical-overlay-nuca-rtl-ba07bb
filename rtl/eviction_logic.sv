// eviction_logic: where a line goes when it leaves this bank.
//
// For the line at `addr`, finds its home bank's overlay in the OSV and this
// bank's place in it. OP_BCAST eviction order: a line evicted from its home
// (base) bank goes to the first overflow bank, from overflow bank i to
// overflow bank i+1, and from the last overflow bank to main memory.
// Migration runs the other way, one step per hit: from overflow bank i to
// overflow bank i-1, and from the first overflow bank back to the home bank.
// A line whose home bank is in no base set (the 8 least accessed banks), or
// that is found where the current overlay does not expect it, is written to
// memory on eviction and not migrated. Combinational.
module eviction_logic
  import onuca_pkg::*;
(
  input  osv_t              osv,
  input  logic              ovl_valid,
  input  logic [BANK_W-1:0] my_bank,
  input  logic [ADDR_W-1:0] addr,       // line being evicted or hit
  output home_info_t        home,       // home bank's overlay and position
  output logic              in_ovf,     // this bank is an overflow bank of it
  output logic [1:0]        ovf_idx,    // and at this slot
  output logic [N_OVF-1:0][BANK_W-1:0] ovf_banks,
  output logic              evict_to_mem,
  output logic [BANK_W-1:0] evict_dest,
  output logic              mig_valid,  // a hit here migrates the line
  output logic [BANK_W-1:0] mig_dest
);
  logic [BANK_W-1:0] h;
  always_comb begin
    h    = home_of(addr);
    home = home_lookup(osv, ovl_valid, h);
    in_ovf  = 1'b0;
    ovf_idx = 2'd0;
    for (int i = 0; i < N_OVF; i++) begin
      ovf_banks[i] = osv[home.ovl][N_BASE + i];
      if (home.searchable && osv[home.ovl][N_BASE + i] == my_bank && !in_ovf) begin
        in_ovf  = 1'b1;
        ovf_idx = 2'(i);
      end
    end
    evict_to_mem = 1'b1;
    evict_dest   = my_bank;
    if (home.searchable) begin
      if (h == my_bank) begin
        evict_to_mem = 1'b0;
        evict_dest   = ovf_banks[0];
      end else if (in_ovf && ovf_idx != 2'(N_OVF - 1)) begin
        evict_to_mem = 1'b0;
        evict_dest   = ovf_banks[ovf_idx + 2'd1];
      end
    end
    mig_valid = home.searchable && in_ovf;
    mig_dest  = (ovf_idx == 2'd0) ? h : ovf_banks[ovf_idx - 2'd1];
  end
endmodule

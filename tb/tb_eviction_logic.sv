// tb_eviction_logic: OP_BCAST eviction chain (home -> ovf0 -> ... -> ovf3 ->
// memory) and migration one step back, on the rank-ordered overlay.
module tb_eviction_logic;
  import onuca_pkg::*;
  import tb_util_pkg::*;
  osv_t osv;
  logic ovl_valid;
  logic [4:0] my_bank, evict_dest, mig_dest;
  logic [41:0] addr;
  home_info_t home;
  logic in_ovf, evict_to_mem, mig_valid;
  logic [1:0] ovf_idx;
  logic [3:0][4:0] ovf_banks;
  eviction_logic dut (.*);
  initial begin
    osv = ident_osv();
    // no overlay: everything goes to memory, nothing migrates
    ovl_valid = 0; addr = mk_addr(2, 0, 1); my_bank = 2; #1;
    chk(evict_to_mem && !mig_valid && !home.searchable, "no overlay");
    ovl_valid = 1;
    for (int h = 0; h < 32; h++) begin
      automatic int o = -1, s = 0;
      for (int oo = 5; oo >= 0; oo--)
        for (int ss = 3; ss >= 0; ss--) if (base_rank(oo) + ss == h) begin o = oo; s = ss; end
      addr = mk_addr(h, 7, 3);
      // at the home bank
      my_bank = 5'(h); #1;
      chk(home.searchable == (o >= 0), $sformatf("searchable %0d", h));
      if (o >= 0) begin
        chk(home.ovl == 3'(o) && home.pos == 2'(s), "overlay/position");
        chk(!evict_to_mem && evict_dest == 5'(ovf_rank(o)), $sformatf("home %0d evicts to ovf0", h));
        for (int i = 0; i < 4; i++) begin
          my_bank = 5'(ovf_rank(o) + i); #1;
          chk(in_ovf && ovf_idx == 2'(i), "overflow slot");
          if (i < 3) chk(!evict_to_mem && evict_dest == 5'(ovf_rank(o) + i + 1), "next overflow");
          else       chk(evict_to_mem, "last overflow to memory");
          chk(mig_valid && mig_dest == ((i == 0) ? 5'(h) : 5'(ovf_rank(o) + i - 1)), "migration");
        end
      end else chk(evict_to_mem, "unsearchable home to memory");
    end
    report(); $finish;
  end
endmodule

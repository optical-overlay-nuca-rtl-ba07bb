// tb_util_pkg: shared helpers for the testbenches.
//
// chk() counts a check and, when its condition is false, a failure with a
// message; report() prints the TB_RESULT line. ident_osv() is the overlay
// that the builder produces when bank b is the b-th most accessed bank, so
// bank ids equal ranks (base/overflow ranks per overlay as in overlay_builder).
package tb_util_pkg;
  import onuca_pkg::*;

  int checks = 0;
  int failures = 0;

  function automatic void chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endfunction

  function automatic void report();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
  endfunction

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

  function automatic osv_t ident_osv();
    osv_t v;
    for (int o = 0; o < N_OVL; o++)
      for (int s = 0; s < N_BASE; s++) begin
        v[o][s]          = BANK_W'(base_rank(o) + s);
        v[o][N_BASE + s] = BANK_W'(ovf_rank(o) + s);
      end
    return v;
  endfunction

  // address of a line with a given home bank, set and tag index
  function automatic logic [ADDR_W-1:0] mk_addr(input int home, input int set, input int tagx);
    logic [ADDR_W-1:0] a;
    a = '0;
    a[OFF_W +: SET_W] = SET_W'(set);
    a[OFF_W+SET_W +: BANK_W] = BANK_W'(home);
    a[OFF_W+SET_W+BANK_W +: 16] = 16'(tagx);
    return a;
  endfunction

  // contents of a memory line that was never written: a function of its address
  function automatic logic [LINE_BITS-1:0] mem_pattern(input logic [ADDR_W-1:0] a);
    logic [LINE_BITS-1:0] d;
    for (int w = 0; w < 16; w++) d[32*w +: 32] = a[37:6] * 32'h9E37_79B1 + 32'(w);
    return d;
  endfunction
endpackage

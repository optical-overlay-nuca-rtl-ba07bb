// mem_arbiter: round-robin sharing of one memory-controller port.
//
// N banks present memory reads (RCB misses, misses of home banks in no
// overlay) and write-backs (evictions from the last overflow bank,
// reconfiguration evictions). One request is passed per cycle in which the
// controller is ready; the grant rotates so every bank is served in turn.
// Combinational apart from the rotation pointer.
module mem_arbiter
  import onuca_pkg::*;
#(
  parameter int N = 8
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [N-1:0]    in_valid,
  input  mem_req_t [N-1:0] in_req,
  output logic [N-1:0]    in_ready,
  output logic            out_valid,
  output mem_req_t        out_req,
  input  logic            out_ready
);
  localparam int IW = $clog2(N);
  logic [IW-1:0] ptr, sel;
  logic          any;

  always_comb begin
    any = 1'b0;
    sel = ptr;
    for (int k = N - 1; k >= 0; k--) begin
      automatic logic [IW-1:0] i = ptr + IW'(k);
      if (in_valid[i]) begin any = 1'b1; sel = i; end
    end
  end

  assign out_valid = any;
  assign out_req   = in_req[sel];

  always_comb begin
    in_ready      = '0;
    in_ready[sel] = any && out_ready;
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) ptr <= '0;
    else if (any && out_ready) ptr <= sel + 1'b1;
endmodule

// trigger_circuit: access steering for the reconfiguration SRAM.
//
// The SRAM is driven either by the cache controller, which writes a line's
// 3 state bits whenever the bank fills a line (update/address/trigger in the
// document's figure), or by the control unit, which reads whole rows during a
// reconfiguration scan. A cache-controller write wins a collision; the
// control unit is told with cu_grant and repeats its read the next cycle.
// Purely combinational. The priority rule is this design's choice.
module trigger_circuit #(
  parameter int LINES = 2048,
  parameter int ROW_ENTRIES = 64
) (
  input  logic                              cc_trigger,  // cache controller write strobe
  input  logic [$clog2(LINES)-1:0]          cc_addr,     // line index to write
  input  logic [2:0]                        cc_update,   // {foreign, position}
  input  logic                              cu_trigger,  // control unit row read
  input  logic [$clog2(LINES/ROW_ENTRIES)-1:0] cu_row,   // row to read
  output logic                              cu_grant,    // row read issued this cycle
  output logic                              sram_trigger,
  output logic                              sram_w_r,
  output logic [$clog2(LINES)-1:0]          sram_addr,
  output logic [2:0]                        sram_din
);
  localparam int EW = $clog2(ROW_ENTRIES);
  always_comb begin
    sram_trigger = cc_trigger | cu_trigger;
    sram_w_r     = cc_trigger;
    sram_din     = cc_update;
    cu_grant     = cu_trigger & ~cc_trigger;
    sram_addr    = cc_trigger ? cc_addr : {cu_row, {EW{1'b0}}};
  end
endmodule

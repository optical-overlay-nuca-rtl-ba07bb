// reconf_controller: per-bank reconfiguration controller (reconf_controller).
//
// Keeps 3 bits per cache line, {foreign, position}, in a 3 x 2048 SRAM that the
// cache controller writes whenever the bank fills a line (update, address,
// trigger). On `start` it scans the whole bank for lines matching a predicate
// (need_foreign, pos_mask) and reports them one per cycle on override/row_num
// so that the bank can invalidate them. Structure as in the document: SRAM,
// trigger circuit, logic circuit and a control unit with a counter, 16 bit_pos
// circuits and a select circuit. Timing: 4 cycles per row of 64 lines plus one
// per line reported; 128 cycles for a bank with nothing to evict. The
// predicate is latched at start. evict_ready (stall) and done are this
// design's additions to the figure's interface.
module reconf_controller #(
  parameter int LINES       = 2048,
  parameter int ROW_ENTRIES = 64
) (
  input  logic                     clk,
  input  logic                     rst_n,
  // line-state writes from the cache controller
  input  logic                     trigger,      // write strobe
  input  logic [$clog2(LINES)-1:0] address,      // line index
  input  logic [2:0]               update,       // {foreign, position[1:0]}
  // reconfiguration scan
  input  logic                     start,
  input  logic                     need_foreign, // predicate: line must be foreign
  input  logic [3:0]               pos_mask,     // predicate: accepted positions
  output logic                     override,     // row_num holds a line to evict
  output logic [$clog2(LINES)-1:0] row_num,
  input  logic                     evict_ready,  // bank accepts the eviction
  output logic                     busy,
  output logic                     done
);
  localparam int ROWS = LINES / ROW_ENTRIES;

  logic                        cu_trigger, cu_grant, logic_en;
  logic [$clog2(ROWS)-1:0]     cu_row;
  logic                        s_trig, s_wr;
  logic [$clog2(LINES)-1:0]    s_addr;
  logic [2:0]                  s_din;
  logic [ROW_ENTRIES*3-1:0]    s_dout;
  logic [ROW_ENTRIES-1:0]      result;
  logic                        pred_foreign;
  logic [3:0]                  pred_mask;

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      pred_foreign <= 1'b0;
      pred_mask    <= '0;
    end else if (start && !busy) begin
      pred_foreign <= need_foreign;
      pred_mask    <= pos_mask;
    end

  trigger_circuit #(.LINES(LINES), .ROW_ENTRIES(ROW_ENTRIES)) u_trig (
    .cc_trigger(trigger), .cc_addr(address), .cc_update(update),
    .cu_trigger, .cu_row, .cu_grant,
    .sram_trigger(s_trig), .sram_w_r(s_wr), .sram_addr(s_addr), .sram_din(s_din)
  );

  reconf_sram #(.LINES(LINES), .ROW_ENTRIES(ROW_ENTRIES)) u_sram (
    .clk, .trigger(s_trig), .w_r(s_wr), .addr(s_addr), .data_in(s_din), .data_out(s_dout)
  );

  logic_circuit #(.ROW_ENTRIES(ROW_ENTRIES)) u_logic (
    .clk, .en(logic_en), .row(s_dout),
    .need_foreign(pred_foreign), .pos_mask(pred_mask), .result
  );

  reconf_control_unit #(.LINES(LINES), .ROW_ENTRIES(ROW_ENTRIES)) u_cu (
    .clk, .rst_n, .start(start && !busy), .busy, .done,
    .cu_trigger, .cu_row, .cu_grant, .logic_en, .result,
    .override, .row_num, .evict_ready
  );
endmodule

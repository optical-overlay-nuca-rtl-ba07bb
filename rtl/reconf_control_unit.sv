// reconf_control_unit: sequences one reconfiguration scan of a bank.
//
// A counter steps through the 2048 lines in increments of 64. For each row it
// spends one cycle issuing the SRAM read through the trigger circuit (ISSUE),
// one while the SRAM answers and the logic circuit registers the 64 predicate
// results (READ), one loading them into the 16 bit_pos circuits (LOAD), and
// then scans (SCAN): every cycle the select circuit reports one line to evict
// on override/row_num, until no bit is left, which takes one more cycle. A row
// with no line to evict therefore takes 4 cycles and an empty bank 32 x 4 =
// 128 cycles from start to done, the figures the document gives. A row with k
// lines takes 4 + k cycles. evict_ready low stalls the scan. The split of the
// 4 cycles into these states is this design's reading of the document.
module reconf_control_unit #(
  parameter int LINES       = 2048,
  parameter int ROW_ENTRIES = 64
) (
  input  logic                      clk,
  input  logic                      rst_n,
  input  logic                      start,        // begin a scan
  output logic                      busy,
  output logic                      done,         // one-cycle pulse at the end
  // SRAM read request through the trigger circuit
  output logic                      cu_trigger,
  output logic [$clog2(LINES/ROW_ENTRIES)-1:0] cu_row,
  input  logic                      cu_grant,
  output logic                      logic_en,     // logic circuit registers now
  input  logic [ROW_ENTRIES-1:0]    result,       // logic circuit output
  // to the cache controller
  output logic                      override,     // row_num is a line to evict
  output logic [$clog2(LINES)-1:0]  row_num,
  input  logic                      evict_ready
);
  localparam int ROWS = LINES / ROW_ENTRIES;
  localparam int NBP  = ROW_ENTRIES / 4;
  localparam int LW   = $clog2(LINES);

  typedef enum logic [2:0] {S_IDLE, S_ISSUE, S_READ, S_LOAD, S_SCAN} state_e;
  state_e state;
  logic [LW-1:0] counter;   // first line of the current row

  logic [NBP-1:0]      bp_valid, bp_ack;
  logic [NBP-1:0][5:0] bp_pos;
  logic                all_zero, evict;
  logic [10:0]         line;

  for (genvar g = 0; g < NBP; g++) begin : g_bp
    bit_pos #(.IDX(g)) u_bp (
      .clk, .rst_n,
      .load   (state == S_LOAD),
      .bits_in(result[4*g +: 4]),
      .ack    (bp_ack[g]),
      .valid  (bp_valid[g]),
      .pos    (bp_pos[g])
    );
  end

  select_circuit #(.N(NBP)) u_sel (
    .en      (state == S_SCAN && evict_ready),
    .valid   (bp_valid),
    .pos     (bp_pos),
    .base    (11'(counter)),
    .ack     (bp_ack),
    .evict   (evict),
    .line    (line),
    .all_zero(all_zero)
  );

  assign cu_trigger = (state == S_ISSUE);
  assign cu_row     = counter[LW-1 -: $clog2(ROWS)];
  assign logic_en   = (state == S_READ);
  assign override   = evict;
  assign row_num    = LW'(line);
  assign busy       = (state != S_IDLE);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state   <= S_IDLE;
      counter <= '0;
      done    <= 1'b0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE: if (start) begin
          counter <= '0;
          state   <= S_ISSUE;
        end
        S_ISSUE: if (cu_grant) state <= S_READ;
        S_READ:  state <= S_LOAD;
        S_LOAD:  state <= S_SCAN;
        S_SCAN: if (all_zero) begin
          if (counter == LW'(LINES - ROW_ENTRIES)) begin
            state <= S_IDLE;
            done  <= 1'b1;
          end else begin
            counter <= counter + LW'(ROW_ENTRIES);
            state   <= S_ISSUE;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end
endmodule

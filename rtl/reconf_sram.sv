// reconf_sram: the reconfiguration controller's 3 x 2048-bit line-state memory.
//
// One 3-bit entry per cache line: {foreign, position[1:0]}. The memory is
// organised as 32 rows of 24 bytes, each row holding the entries of 64
// consecutive lines (entry e of a row in bits 3e+2..3e), so a whole row is
// read in one access, as in the document. A write (w_r = 1) updates the
// single 3-bit entry of line `addr`; a read (w_r = 0) returns the row that
// holds `addr` on data_out one clock after `trigger`. Row layout and the
// one-cycle read latency are this design's choices. The contents are not
// reset, like the SRAM array it stands for.
module reconf_sram #(
  parameter int LINES       = 2048,
  parameter int ENTRY_W     = 3,
  parameter int ROW_ENTRIES = 64
) (
  input  logic                               clk,
  input  logic                               trigger,   // access strobe
  input  logic                               w_r,       // 1 write, 0 read
  input  logic [$clog2(LINES)-1:0]           addr,      // line index
  input  logic [ENTRY_W-1:0]                 data_in,   // entry to write
  output logic [ROW_ENTRIES*ENTRY_W-1:0]     data_out   // row read, one cycle later
);
  localparam int ROWS  = LINES / ROW_ENTRIES;
  localparam int ROW_W = ROW_ENTRIES * ENTRY_W;
  localparam int EW    = $clog2(ROW_ENTRIES);

  logic [ROW_W-1:0] mem [ROWS];

  wire [$clog2(ROWS)-1:0] row = addr[$clog2(LINES)-1:EW];
  wire [EW-1:0]           ent = addr[EW-1:0];

  always_ff @(posedge clk) begin
    if (trigger && w_r) mem[row][ent*ENTRY_W +: ENTRY_W] <= data_in;
    if (trigger && !w_r) data_out <= mem[row];
  end
endmodule

// line_buffer: on-chip buffer of the last ROWS image rows of a raster stream.
//
// Each address holds one image column: the values of that column in the
// ROWS rows before the current one. When en is high the column at addr is
// read (registered, valid on the next clock edge: dout[0] is the row just
// above the incoming pixel, dout[ROWS-1] the oldest) and written back shifted
// by one row with din as the newest entry. Reading and writing the same
// address in one cycle therefore gives a read-before-write buffer that maps
// onto one block RAM of WIDTH words of ROWS*DW bits.
// Keeping image rows on chip instead of re-reading them from DRAM is the
// source design's optimisation; the column-per-word organisation is this
// implementation's choice.
module line_buffer #(
  parameter int unsigned WIDTH = 1280,
  parameter int unsigned ROWS  = 2,
  parameter int unsigned DW    = 8,
  localparam int unsigned AW   = (WIDTH > 1) ? $clog2(WIDTH) : 1
) (
  input  logic                    clk,
  input  logic                    en,
  input  logic [AW-1:0]           addr,
  input  logic [DW-1:0]           din,
  output logic [ROWS-1:0][DW-1:0] dout
);

  logic [ROWS-1:0][DW-1:0] mem [WIDTH];
  logic [ROWS-1:0][DW-1:0] shifted;

  // the column at addr moved down by one row, din on top
  if (ROWS == 1) begin : g_one
    assign shifted = din;
  end else begin : g_many
    assign shifted = {mem[addr][ROWS-2:0], din};
  end

  always_ff @(posedge clk) begin
    if (en) begin
      dout      <= mem[addr];
      mem[addr] <= shifted;
    end
  end

endmodule

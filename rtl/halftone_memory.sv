// halftone_memory: the Scan Line Processor's 16 by 16 halftone memory.
//
// Row (Y mod 16) is the 16-bit pattern used when filling scan line Y of a
// polygon, so a 16x16 tile repeats over the screen in both directions (the
// Raster Processors repeat it every 16 pixels along X).  One write port
// (clocked), one combinational read port.  Reset loads all 1s (solid fill);
// the reset value and the Y mod 16 indexing are this design's choices.
//
// Lint note: only the low 4 bits of the Y coordinate select the row; the
// upper Y bits are unused by design.
module halftone_memory
  import raster_pkg::*;
#(
  parameter int HT_ROWS = 16,
  localparam int HR_W = $clog2(HT_ROWS)
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  wr_en,
  input  logic [HR_W-1:0]       wr_row,
  input  logic [RP_HT_W-1:0]    wr_data,
  input  logic [RP_COORD_W-1:0] rd_y,
  output logic [RP_HT_W-1:0]    rd_data
);

  logic [RP_HT_W-1:0] mem [HT_ROWS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < HT_ROWS; i++) mem[i] <= '1;
    end else if (wr_en) begin
      mem[wr_row] <= wr_data;
    end
  end

  assign rd_data = mem[rd_y[HR_W-1:0]];

endmodule

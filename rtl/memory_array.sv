// memory_array: the bulk memory of the Raster Processor, ROWS words of COLS
// bits, one word per scan line and one bit per pixel.
//
// Every access moves a whole scan line: a read returns all COLS pixels of a
// row (what the sense amplifiers of a DRAM deliver), a write stores a whole
// row back.  The design leaves the storage technology open; this is a
// synchronous array with a registered read port (rd_data valid the clock
// after rd_en) and a write port that can be used in the same clock.  A read
// and a write of the same row in one clock return the old contents.  The
// contents are not reset.
module memory_array #(
  parameter int ROWS = 64,
  parameter int COLS = 256,
  localparam int ROW_W = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rd_en,
  input  logic [ROW_W-1:0] rd_row,
  output logic [COLS-1:0]  rd_data,
  input  logic             wr_en,
  input  logic [ROW_W-1:0] wr_row,
  input  logic [COLS-1:0]  wr_data
);

  logic [COLS-1:0] mem [ROWS];

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[rd_row];
    if (wr_en) mem[wr_row] <= wr_data;
  end

endmodule

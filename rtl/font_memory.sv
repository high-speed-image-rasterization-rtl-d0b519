// font_memory: one-character pattern store of the Scan Line Processor.
//
// FONT_ROWS rows of FONT_CHUNKS 16-pixel chunks (64 x 64 pixels by default);
// bit i of chunk c of row r is pixel 16c + i of that character row.  A clocked
// write port takes one chunk per clock while the host loads a character; the
// read port is combinational.  The one-character organisation is one of the
// two the design allows (the other is a multi-character font cache); the size
// is this design's choice.  Contents are not reset.
module font_memory #(
  parameter int FONT_ROWS   = 64,
  parameter int FONT_CHUNKS = 4,
  localparam int FR_W = $clog2(FONT_ROWS),
  localparam int FC_W = (FONT_CHUNKS > 1) ? $clog2(FONT_CHUNKS) : 1
) (
  input  logic            clk,
  input  logic            wr_en,
  input  logic [FR_W-1:0] wr_row,
  input  logic [FC_W-1:0] wr_chunk,
  input  logic [15:0]     wr_data,
  input  logic [FR_W-1:0] rd_row,
  input  logic [FC_W-1:0] rd_chunk,
  output logic [15:0]     rd_data
);

  logic [15:0] mem [FONT_ROWS * FONT_CHUNKS];

  always_ff @(posedge clk) begin
    if (wr_en) mem[int'(wr_row) * FONT_CHUNKS + int'(wr_chunk)] <= wr_data;
  end

  assign rd_data = mem[int'(rd_row) * FONT_CHUNKS + int'(rd_chunk)];

endmodule

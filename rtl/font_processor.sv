// font_processor: places the stored character with its top-left pixel at
// (px, py).
//
// For each character row r (scan line py - r, rows going down like polygon
// lines) that belongs to this Scan Line Processor's row of Raster Processors
// (line mod 2^ROW_BITS = row_id) and each 16-pixel chunk c of it, it reads
// chunk c from the font memory, has the barrel shifter rotate it by px mod
// 16, and offers the fill {line, Xs = px + 16c, Xe = px + min(16c + 16,
// width), rotated chunk}.  Rows of other processors are skipped at one clock
// each.  valid/ready on both the place request and the fill output; idle
// when no character is being placed.  The row direction and the chunk size
// are this design's choices; the rotation by X mod 16 follows the original design.
module font_processor
  import raster_pkg::*;
#(
  parameter int ROW_BITS    = 4,
  parameter int FONT_ROWS   = 64,
  parameter int FONT_CHUNKS = 4,
  localparam int CW   = RP_COORD_W,
  localparam int RB_W = (ROW_BITS > 0) ? ROW_BITS : 1,
  localparam int FR_W = $clog2(FONT_ROWS),
  localparam int FC_W = (FONT_CHUNKS > 1) ? $clog2(FONT_CHUNKS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [RB_W-1:0] row_id,
  input  logic            place_valid,
  output logic            place_ready,
  input  logic [CW-1:0]   px,
  input  logic [CW-1:0]   py,
  input  logic [7:0]      width,      // pixels, 1 .. 16*FONT_CHUNKS
  input  logic [7:0]      height,     // rows, 1 .. FONT_ROWS
  // font memory read and barrel shifter
  output logic [FR_W-1:0] rd_row,
  output logic [FC_W-1:0] rd_chunk,
  output logic [3:0]      shift,
  input  logic [15:0]     shifted,
  output logic            fill_valid,
  input  logic            fill_ready,
  output rp_fill_t        fill,
  output logic            idle
);

  logic          busy;
  logic [CW-1:0] cx, cy;
  logic [7:0]    cw, ch;
  logic [7:0]    r;            // current character row
  logic [7:0]    c;            // current chunk
  logic [CW-1:0] line;
  logic          owned;
  logic [8:0]    xe_off;
  logic          last_chunk, last_row;

  assign line = cy - CW'(r);
  if (ROW_BITS > 0) begin : g_own
    assign owned = line[ROW_BITS-1:0] == row_id;
  end else begin : g_all
    assign owned = 1'b1;
  end

  assign xe_off     = ({1'b0, c} * 9'd16 + 9'd16 > {1'b0, cw}) ? {1'b0, cw} : ({1'b0, c} * 9'd16 + 9'd16);
  assign last_chunk = ({1'b0, c} * 9'd16 + 9'd16) >= {1'b0, cw};
  assign last_row   = (r + 8'd1) >= ch;

  assign rd_row       = FR_W'(r);
  assign rd_chunk     = FC_W'(c);
  assign shift        = cx[3:0];
  assign fill.y       = line;
  assign fill.xs      = cx + CW'({c, 4'b0000});
  assign fill.xe      = cx + CW'(xe_off);
  assign fill.pattern = shifted;
  assign fill_valid   = busy && owned;
  assign place_ready  = !busy;
  assign idle         = !busy;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      busy <= 1'b0;
      cx <= '0; cy <= '0; cw <= '0; ch <= '0;
      r <= '0; c <= '0;
    end else if (!busy) begin
      if (place_valid) begin
        busy <= (width != 0) && (height != 0);
        cx <= px; cy <= py; cw <= width; ch <= height;
        r <= '0; c <= '0;
      end
    end else if (!owned) begin
      c <= '0;
      r <= r + 8'd1;
      if (last_row) busy <= 1'b0;
    end else if (fill_ready) begin
      if (last_chunk) begin
        c <= '0;
        r <= r + 8'd1;
        if (last_row) busy <= 1'b0;
      end else begin
        c <= c + 8'd1;
      end
    end
  end

endmodule

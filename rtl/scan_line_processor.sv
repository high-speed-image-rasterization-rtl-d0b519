// scan_line_processor: converts polygons and characters into Raster Fill
// commands for one row of Raster Processors.
//
// Host words enter the command decoder, which loads the 16x16 halftone
// memory and the one-character font memory, queues polygon edges for the
// polygon processor (with its left and right edge processors) and hands
// character placements to the font processor, whose chunks pass through the
// barrel shifter.  Fills from the font processor (priority) and the polygon
// processor, and raw commands from the decoder, go to the bus framer that
// sends four-word commands to the Raster Processors, Refresh when idle.
//
// Each Scan Line Processor only sends the scan lines its row of Raster
// Processors holds: with 2^ROW_BITS rows, lines with Y mod 2^ROW_BITS =
// row_id.  All Scan Line Processors read the same host stream, so the rows
// work on one primitive in parallel.  The block split follows the
// original block diagram; the host format (see slp_command_decoder), the
// arbitration order and the hold/held handshake for switching the Raster
// Processors to imaging mode are this design's choices.
//
// Timing: one host word per clock when ready; one scan line stepped per
// clock; one Raster Processor command per 4 clocks on rp_d / rp_c.
//
// Lint note: the protocol assertions in the polygon processor use the
// asynchronous reset rst_n in disable iff; the linter reports this as a reset
// used both ways, while no flip-flop uses it synchronously.
module scan_line_processor
  import raster_pkg::*;
#(
  parameter int ROW_BITS    = 4,
  parameter int FONT_ROWS   = 64,
  parameter int FONT_CHUNKS = 4,
  localparam int RB_W = (ROW_BITS > 0) ? ROW_BITS : 1,
  localparam int FR_W = $clog2(FONT_ROWS),
  localparam int FC_W = (FONT_CHUNKS > 1) ? $clog2(FONT_CHUNKS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            host_valid,
  output logic            host_ready,
  input  logic [15:0]     host_word,
  input  logic [RB_W-1:0] row_id,
  input  logic            hold,
  output logic            held,
  output logic [15:0]     rp_d,
  output logic [2:0]      rp_c,
  output logic            idle
);

  alu_op_e  alu_op;
  ht_mode_e ht_mode;
  logic        raw_valid, raw_ready;
  logic [15:0] raw_words [4];
  logic        ht_wr_en;
  logic [3:0]  ht_wr_row;
  logic [15:0] ht_wr_data, ht_pattern;
  logic [RP_COORD_W-1:0] ht_y;
  logic            font_wr_en;
  logic [FR_W-1:0] font_wr_row, font_rd_row;
  logic [FC_W-1:0] font_wr_chunk, font_rd_chunk;
  logic [15:0]     font_wr_data, font_rd_data, shifted;
  logic [3:0]      shift;
  logic [7:0]      font_width, font_height;
  logic  l_valid, l_ready, r_valid, r_ready;
  edge_t l_edge, r_edge;
  logic  place_valid, place_ready;
  logic [RP_COORD_W-1:0] place_x, place_y;
  logic  poly_idle, font_idle;
  logic  pf_valid, pf_ready, ff_valid, ff_ready, f_valid, f_ready;
  rp_fill_t pf, ff, f;

  slp_command_decoder #(.FONT_ROWS(FONT_ROWS), .FONT_CHUNKS(FONT_CHUNKS)) u_dec (
    .clk, .rst_n, .host_valid, .host_ready, .host_word, .poly_idle, .font_idle,
    .alu_op, .ht_mode, .raw_valid, .raw_ready, .raw_words,
    .ht_wr_en, .ht_wr_row, .ht_wr_data,
    .font_wr_en, .font_wr_row, .font_wr_chunk, .font_wr_data, .font_width, .font_height,
    .l_valid, .l_ready, .l_edge, .r_valid, .r_ready, .r_edge,
    .place_valid, .place_ready, .place_x, .place_y);

  halftone_memory u_htmem (
    .clk, .rst_n, .wr_en(ht_wr_en), .wr_row(ht_wr_row), .wr_data(ht_wr_data),
    .rd_y(ht_y), .rd_data(ht_pattern));

  polygon_processor #(.ROW_BITS(ROW_BITS)) u_poly (
    .clk, .rst_n, .row_id, .l_valid, .l_ready, .l_edge, .r_valid, .r_ready, .r_edge,
    .fill_valid(pf_valid), .fill_ready(pf_ready), .fill(pf), .ht_y, .ht_pattern, .idle(poly_idle));

  font_memory #(.FONT_ROWS(FONT_ROWS), .FONT_CHUNKS(FONT_CHUNKS)) u_fontmem (
    .clk, .wr_en(font_wr_en), .wr_row(font_wr_row), .wr_chunk(font_wr_chunk), .wr_data(font_wr_data),
    .rd_row(font_rd_row), .rd_chunk(font_rd_chunk), .rd_data(font_rd_data));

  barrel_shifter u_bshift (.din(font_rd_data), .amount(shift), .dout(shifted));

  font_processor #(.ROW_BITS(ROW_BITS), .FONT_ROWS(FONT_ROWS), .FONT_CHUNKS(FONT_CHUNKS)) u_font (
    .clk, .rst_n, .row_id, .place_valid, .place_ready, .px(place_x), .py(place_y),
    .width(font_width), .height(font_height), .rd_row(font_rd_row), .rd_chunk(font_rd_chunk),
    .shift, .shifted, .fill_valid(ff_valid), .fill_ready(ff_ready), .fill(ff), .idle(font_idle));

  // font processor first, then polygon processor
  assign f_valid  = ff_valid || pf_valid;
  assign f        = ff_valid ? ff : pf;
  assign ff_ready = f_ready;
  assign pf_ready = f_ready && !ff_valid;

  slp_bus_framer u_framer (
    .clk, .rst_n, .fill_valid(f_valid), .fill_ready(f_ready), .fill(f),
    .raw_valid, .raw_ready, .raw_words, .alu_op, .ht_mode, .hold, .held, .rp_d, .rp_c);

  assign idle = poly_idle && font_idle && !raw_valid && host_ready;

endmodule

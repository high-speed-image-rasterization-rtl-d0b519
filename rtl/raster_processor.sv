// raster_processor: the Smart Bulk Memory chip.  A 64-line by 256-pixel
// one-bit image is kept in a RAM array whose every access reads or writes a
// whole scan line; next to the sense amplifiers sits a one-cell-per-pixel
// ALU, so a four-word command (Y, Xs, Xe, 16-bit halftone pattern) fills any
// run of a scan line in one memory cycle whatever its length.
//
// Blocks: control (rp_control), halftone ALU, parallel comparator (Xs and Xe
// to pixel masks), scan line ALU with the L1/L2 latches, display latches and
// the memory array.
//
// Pins: the bidirectional data lines D0-D15 appear as d_in (bus to chip),
// d_out and d_oe (chip drives the bus); c = {C2, C1, C0} as c[2], c[1],
// c[0]; cs is the chip select.  A single rising-edge clock and an active-low
// reset are used.  Timing: see rp_control.  The structure follows the
// design's block diagram; the two-state split of the data lines, the single
// clock and the reset are this implementation's choices.
//
// Lint note: the scan line ALU's sel output (the span mask) is left
// unconnected here; it exists for observing the span in unit tests.
module raster_processor
  import raster_pkg::*;
#(
  parameter int ROWS    = 64,
  parameter int COLS    = 256,
  parameter int COORD_W = 13,
  localparam int ROW_W  = $clog2(ROWS),
  localparam int COL_W  = $clog2(COLS)
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic [15:0] d_in,
  output logic [15:0] d_out,
  output logic        d_oe,
  input  logic [2:0]  c,
  input  logic        cs
);

  logic [COL_W-1:0] cmp_b;
  logic             cmp_root_eq, cmp_root_lt;
  logic [COLS-1:0]  pclt;
  logic             load_l1, load_l2;
  alu_op_e          alu_op;
  ht_mode_e         ht_mode;
  logic [RP_HT_W-1:0]  halftone;
  logic             rd_en, wr_en;
  logic [ROW_W-1:0] rd_row, wr_row;
  logic [COLS-1:0]  ir, iw, sel;
  logic             disp_load, sel_clear, sel_next;
  logic [RP_HT_W-1:0]  cur_group, next_group;

  rp_control #(.ROWS(ROWS), .COLS(COLS), .COORD_W(COORD_W)) u_ctrl (
    .clk, .rst_n, .d_in, .c, .cs, .d_out, .d_oe,
    .cmp_b, .cmp_root_eq, .cmp_root_lt,
    .load_l1, .load_l2, .alu_op, .ht_mode,
    .rd_en, .rd_row, .wr_en, .wr_row,
    .disp_load, .sel_clear, .sel_next, .cur_group, .next_group
  );

  halftone_alu #(.HT_W(RP_HT_W)) u_htalu (
    .pattern_in(d_in), .mode(ht_mode), .pattern_out(halftone)
  );

  parallel_comparator #(.N(COL_W)) u_cmp (
    .b(cmp_b), .root_eq(cmp_root_eq), .root_lt(cmp_root_lt), .pclt
  );

  scan_line_alu #(.COLS(COLS), .HT_W(RP_HT_W)) u_alu (
    .clk, .rst_n, .pclt, .load_l1, .load_l2, .halftone, .op(alu_op),
    .ir, .iw, .sel
  );

  memory_array #(.ROWS(ROWS), .COLS(COLS)) u_mem (
    .clk, .rd_en, .rd_row, .rd_data(ir), .wr_en, .wr_row, .wr_data(iw)
  );

  display_latches #(.COLS(COLS), .HT_W(RP_HT_W)) u_disp (
    .clk, .rst_n, .load(disp_load), .line_in(ir), .sel_clear, .sel_next,
    .cur_group, .next_group
  );

endmodule

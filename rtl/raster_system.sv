// raster_system: a 1024 x 1024, one bit per pixel rasterizer built from
// Scan Line Processors and Raster Processors.
//
// N_ROWS rows, each one Scan Line Processor driving N_COLS Raster Processors
// on a shared four-word command bus.  The chips of a row sit side by side in
// X (high-order X interleave: chip c holds pixels 256c..256c+255) and the
// rows are interleaved in Y (low-order Y interleave: row r holds every
// N_ROWS-th line starting at r), so a primitive of any shape touches all
// rows and they fill their lines in parallel.  Every Scan Line Processor
// listens to the same host word stream; a word is taken only when all of
// them are ready.  The positions of the chips are not wired in: the host
// programs them with Set Address and Interleave commands sent as raw
// commands while it holds the chip select of the chip concerned (rp_cs).
//
// Imaging: disp_req asks every Scan Line Processor to stop at its next
// command boundary; once all have stopped disp_active is high and the mode
// lines of all Raster Processors come from disp_c ({C1,C2}, C0 = 1) with
// rp_cs as their chip selects; each chip's data lines are brought out as
// rp_dout / rp_doe for a display controller.
//
// Follows the original design's basic configuration (16 rows of 4 processors with
// 64 lines of 256 pixels, lines interleaved every 16th between rows); the
// host interface, the imaging switch-over and the port structure are this
// design's choices.
//
// Lint note: rst_n is an asynchronous reset everywhere; the protocol
// assertions in the hierarchy also use it in disable iff, which the linter
// reports as a reset used both ways. No flip-flop uses it synchronously.
module raster_system
  import raster_pkg::*;
#(
  parameter int N_ROWS = 16,
  parameter int N_COLS = 4,
  parameter int ROWS   = 64,
  parameter int COLS   = 256,
  localparam int ROW_BITS = $clog2(N_ROWS),
  localparam int RB_W = (ROW_BITS > 0) ? ROW_BITS : 1
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        host_valid,
  output logic        host_ready,
  input  logic [15:0] host_word,
  input  logic [N_ROWS-1:0][N_COLS-1:0]       rp_cs,
  input  logic        disp_req,
  output logic        disp_active,
  input  logic [1:0]  disp_c,          // {C1, C2} in imaging mode
  output logic [N_ROWS-1:0][N_COLS-1:0][15:0] rp_dout,
  output logic [N_ROWS-1:0][N_COLS-1:0]       rp_doe,
  output logic        idle
);

  logic [N_ROWS-1:0]       slp_ready, slp_held, slp_idle;
  logic [N_ROWS-1:0][15:0] bus_d;
  logic [N_ROWS-1:0][2:0]  bus_c;

  assign host_ready  = &slp_ready;
  assign disp_active = &slp_held;
  assign idle        = &slp_idle;

  for (genvar r = 0; r < N_ROWS; r++) begin : g_row
    logic [2:0] c_row;

    scan_line_processor #(.ROW_BITS(ROW_BITS)) u_slp (
      .clk, .rst_n,
      .host_valid(host_valid && host_ready), .host_ready(slp_ready[r]), .host_word,
      .row_id(RB_W'(r)), .hold(disp_req), .held(slp_held[r]),
      .rp_d(bus_d[r]), .rp_c(bus_c[r]), .idle(slp_idle[r]));

    assign c_row = disp_active ? {disp_c[0], disp_c[1], 1'b1} : bus_c[r];

    for (genvar k = 0; k < N_COLS; k++) begin : g_col
      raster_processor #(.ROWS(ROWS), .COLS(COLS)) u_rp (
        .clk, .rst_n, .d_in(bus_d[r]), .d_out(rp_dout[r][k]), .d_oe(rp_doe[r][k]),
        .c(c_row), .cs(rp_cs[r][k]));
    end
  end

endmodule

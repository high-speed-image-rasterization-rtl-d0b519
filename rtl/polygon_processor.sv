// polygon_processor: turns the left and right edges of a Y-monotone polygon
// into one Raster Fill command per scan line.
//
// Edges arrive on two valid/ready channels, one per side, each queued in a
// small FIFO (several vertices of one side may come before the next vertex
// of the other side).  Two edge processors hold the current left and right
// edge.  With both loaded and their slopes ready the processor walks the
// scan lines downward, one line per clock: on a line owned by its row of
// Raster Processors (Y mod 2^ROW_BITS = row_id) it offers the fill
// {Y, Xs = left X, Xe = right X, halftone memory row for Y} and waits until
// it is taken; then both edges step one line.  When an edge reaches its end
// line it is dropped and the next edge of that side is awaited.  Lines run
// from the top vertex down to, not including, the bottom vertex.
//
// Follows the original design in splitting work between a polygon processor and
// two edge processors and in waiting for the next edge when one ends; the
// FIFOs, the half-open line range and the interleave filter are this
// design's choices.
//
// Lint note: the assertions below use the asynchronous reset rst_n in
// disable iff; the linter reports this as a reset used both ways, while no
// flip-flop uses it synchronously.
module polygon_processor
  import raster_pkg::*;
#(
  parameter int ROW_BITS   = 4,
  parameter int FIFO_DEPTH = 4,
  localparam int CW = RP_COORD_W,
  localparam int RB_W = (ROW_BITS > 0) ? ROW_BITS : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [RB_W-1:0] row_id,
  input  logic            l_valid,
  output logic            l_ready,
  input  edge_t           l_edge,
  input  logic            r_valid,
  output logic            r_ready,
  input  edge_t           r_edge,
  output logic            fill_valid,
  input  logic            fill_ready,
  output rp_fill_t        fill,
  output logic [CW-1:0]   ht_y,
  input  logic [RP_HT_W-1:0] ht_pattern,
  output logic            idle
);

  logic  lq_valid, rq_valid, lq_pop, rq_pop;
  edge_t lq_edge, rq_edge;

  sync_fifo #(.W($bits(edge_t)), .DEPTH(FIFO_DEPTH)) u_lq (
    .clk, .rst_n, .in_valid(l_valid), .in_ready(l_ready), .in_data(l_edge),
    .out_valid(lq_valid), .out_ready(lq_pop), .out_data(lq_edge));
  sync_fifo #(.W($bits(edge_t)), .DEPTH(FIFO_DEPTH)) u_rq (
    .clk, .rst_n, .in_valid(r_valid), .in_ready(r_ready), .in_data(r_edge),
    .out_valid(rq_valid), .out_ready(rq_pop), .out_data(rq_edge));

  logic          l_act, r_act;
  logic          l_rdy, r_rdy, l_done, r_done;
  logic [CW-1:0] l_x, r_x, l_y, r_y;
  logic          step;
  logic          running, owned;

  edge_processor #(.COORD_W(CW)) u_left (
    .clk, .rst_n, .load(lq_pop), .x0(lq_edge.x0), .y0(lq_edge.y0), .x1(lq_edge.x1), .y1(lq_edge.y1),
    .step, .ready(l_rdy), .x(l_x), .y(l_y), .done(l_done));
  edge_processor #(.COORD_W(CW)) u_right (
    .clk, .rst_n, .load(rq_pop), .x0(rq_edge.x0), .y0(rq_edge.y0), .x1(rq_edge.x1), .y1(rq_edge.y1),
    .step, .ready(r_rdy), .x(r_x), .y(r_y), .done(r_done));

  assign lq_pop  = !l_act && lq_valid;
  assign rq_pop  = !r_act && rq_valid;
  assign running = l_act && r_act && l_rdy && r_rdy && !l_done && !r_done;
  if (ROW_BITS > 0) begin : g_own
    assign owned = l_y[ROW_BITS-1:0] == row_id;
  end else begin : g_all
    assign owned = 1'b1;
  end

  assign ht_y         = l_y;
  assign fill.y       = l_y;
  assign fill.xs      = l_x;
  assign fill.xe      = r_x;
  assign fill.pattern = ht_pattern;
  assign fill_valid   = running && owned;
  assign step         = running && (!owned || fill_ready);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l_act <= 1'b0;
      r_act <= 1'b0;
    end else begin
      if (lq_pop) l_act <= 1'b1;
      else if (l_act && l_rdy && l_done) l_act <= 1'b0;
      if (rq_pop) r_act <= 1'b1;
      else if (r_act && r_rdy && r_done) r_act <= 1'b0;
    end
  end

  assign idle = !l_act && !r_act && !lq_valid && !rq_valid;

  // Both edges describe the same scan line while they run.
  a_same_line: assert property (@(posedge clk) disable iff (!rst_n) running |-> l_y == r_y)
    else $error("left and right edge on different scan lines");
  // A fill offered stays offered, unchanged, until taken.
  a_fill_stable: assert property (@(posedge clk) disable iff (!rst_n)
    fill_valid && !fill_ready |=> fill_valid && $stable(fill))
    else $error("fill withdrawn before it was taken");

endmodule

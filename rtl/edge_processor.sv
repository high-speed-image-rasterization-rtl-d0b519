// edge_processor: follows one polygon edge down the scan lines.
//
// load takes an edge from (x0, y0) down to (x1, y1), y0 >= y1.  The slope
// dX per scan line is computed once as a fixed-point number with FRAC_W
// fraction bits, (x1 - x0) * 2^FRAC_W / (y0 - y1) truncated toward zero, by a
// restoring divider that produces one quotient bit per clock (COORD_W +
// FRAC_W clocks; ready is low meanwhile; a horizontal edge needs none).  The
// position starts at x0 exactly; each step moves one scan line down (y - 1)
// and adds the slope.  x is the integer part (floor) of the position, done is
// high when y has reached y1.  The incremental (DDA) method and the number
// format are this design's choice; the original design only says that two edge
// processors compute the start and end X of each scan line in parallel.
//
// Lint note: the top bit of the partial remainder is never read; it is
// kept so the subtract-and-compare step has its full width.
module edge_processor
  import raster_pkg::*;
#(
  parameter int COORD_W = 13,
  parameter int FRAC_W  = 16,
  localparam int QW     = COORD_W + FRAC_W
) (
  input  logic               clk,
  input  logic               rst_n,
  input  logic               load,
  input  logic [COORD_W-1:0] x0,
  input  logic [COORD_W-1:0] y0,
  input  logic [COORD_W-1:0] x1,
  input  logic [COORD_W-1:0] y1,
  input  logic               step,
  output logic               ready,
  output logic [COORD_W-1:0] x,
  output logic [COORD_W-1:0] y,
  output logic               done
);

  logic signed [QW+1:0] pos;       // position, FRAC_W fraction bits
  logic signed [QW+1:0] slope;
  logic [COORD_W-1:0]   y_end;
  // divider
  logic                 busy;
  logic                 neg;
  logic [COORD_W:0]     rem;
  logic [QW-1:0]        quo;
  logic [COORD_W-1:0]   dvs;
  logic [$clog2(QW+1)-1:0] cnt;

  logic [COORD_W:0]     rem_sh;
  logic [COORD_W:0]     dx_abs;

  assign rem_sh = {rem[COORD_W-1:0], quo[QW-1]};
  assign dx_abs = (x1 >= x0) ? {1'b0, x1 - x0} : {1'b0, x0 - x1};

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pos   <= '0;
      slope <= '0;
      y     <= '0;
      y_end <= '0;
      busy  <= 1'b0;
      neg   <= 1'b0;
      rem   <= '0;
      quo   <= '0;
      dvs   <= '0;
      cnt   <= '0;
    end else if (load) begin
      pos   <= (QW+2)'(x0) <<< FRAC_W;
      y     <= y0;
      y_end <= y1;
      slope <= '0;
      neg   <= x1 < x0;
      dvs   <= y0 - y1;
      rem   <= '0;
      quo   <= QW'(dx_abs) << FRAC_W;
      cnt   <= '0;
      busy  <= (y0 != y1);
    end else if (busy) begin
      // one restoring-division step
      if (rem_sh >= {1'b0, dvs}) begin
        rem <= rem_sh - {1'b0, dvs};
        quo <= {quo[QW-2:0], 1'b1};
      end else begin
        rem <= rem_sh;
        quo <= {quo[QW-2:0], 1'b0};
      end
      cnt <= cnt + 1'b1;
      if (int'(cnt) == QW - 1) begin
        busy  <= 1'b0;
        slope <= neg ? -$signed({2'b00, quo[QW-2:0], (rem_sh >= {1'b0, dvs})})
                     :  $signed({2'b00, quo[QW-2:0], (rem_sh >= {1'b0, dvs})});
      end
    end else if (step && !done) begin
      pos <= pos + slope;
      y   <= y - 1'b1;
    end
  end

  assign ready = !busy;
  assign done  = (y == y_end);
  assign x     = COORD_W'(pos >>> FRAC_W);

endmodule

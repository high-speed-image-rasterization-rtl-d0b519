// barrel_shifter: rotates a 16-pixel character chunk left by X mod 16.
//
// The Raster Processors place halftone bit k on every pixel whose X mod 16
// equals k, fixed to the raster.  A character chunk whose bit i is the pixel
// at X + i must therefore be rotated so that bit i lands on bit (X + i) mod
// 16.  Four stages rotate by 1, 2, 4 and 8 under control of the amount bits.
// Combinational.
module barrel_shifter #(
  parameter int W = 16,
  localparam int S_W = $clog2(W)
) (
  input  logic [W-1:0]   din,
  input  logic [S_W-1:0] amount,
  output logic [W-1:0]   dout
);

  logic [W-1:0] stage [S_W+1];

  assign stage[0] = din;
  for (genvar s = 0; s < S_W; s++) begin : g_stage
    localparam int SH = 1 << s;
    assign stage[s+1] = amount[s] ? {stage[s][W-SH-1:0], stage[s][W-1:W-SH]} : stage[s];
  end
  assign dout = stage[S_W];

endmodule

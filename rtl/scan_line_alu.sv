// scan_line_alu: one cell per pixel that computes the new scan line.
//
// Each cell j has two latches.  L1 is loaded with NOT PCLT(j) while the
// comparator sees the start coordinate Xs, so it holds j >= Xs; L2 is loaded
// with PCLT(j) while the comparator sees the end coordinate Xe, so it holds
// j < Xe.  SEL(j) = L1 AND L2 marks the half-open range [Xs, Xe).  The cell
// takes the pixel read from the array IR(j), the halftone bit for its
// position (halftone bit j mod 16: the 16-line halftone bus reaches every
// 16th pixel) and the operation, and gives the pixel written back IW(j):
//   No-op: IR    Replace: H    OR: IR | H    AND: IR & H      (SEL = 1)
//   IR unchanged where SEL = 0.
// The latches are clock-enabled flip-flops (load_l1 / load_l2); IW is
// combinational from IR, the latches, the halftone bus and op.
module scan_line_alu
  import raster_pkg::*;
#(
  parameter int COLS = 256,
  parameter int HT_W = 16
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic [COLS-1:0] pclt,
  input  logic            load_l1,
  input  logic            load_l2,
  input  logic [HT_W-1:0] halftone,
  input  alu_op_e         op,
  input  logic [COLS-1:0] ir,
  output logic [COLS-1:0] iw,
  output logic [COLS-1:0] sel
);

  logic [COLS-1:0] l1, l2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      l1 <= '0;
      l2 <= '0;
    end else begin
      if (load_l1) l1 <= ~pclt;
      if (load_l2) l2 <= pclt;
    end
  end

  assign sel = l1 & l2;

  for (genvar j = 0; j < COLS; j++) begin : g_cell
    logic h;
    assign h = halftone[j % HT_W];
    always_comb begin
      if (!sel[j]) iw[j] = ir[j];
      else begin
        unique case (op)
          ALU_NOP:     iw[j] = ir[j];
          ALU_REPLACE: iw[j] = h;
          ALU_OR:      iw[j] = ir[j] | h;
          ALU_AND:     iw[j] = ir[j] & h;
          default:     iw[j] = ir[j];
        endcase
      end
    end
  end

endmodule

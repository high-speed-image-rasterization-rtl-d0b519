// parallel_comparator: 2^N-output "less than" decoder of the Raster Processor.
//
// For an N-bit number B it raises PCLT(j) for every pixel position j < B, so
// a single X coordinate marks all pixels to its left in one step.  It is
// built as the comparison tree of the design: node (i, j) at level i (level
// N is a virtual root, level 0 the leaves) receives EQ and LT from its parent
// (i+1, j/2) plus bit B(i) and its complement, and produces
//   EQ(i,j) = EQ(i+1,j/2) AND (B(i) == LSB(j))
//   LT(i,j) = LT(i+1,j/2) OR (EQ(i+1,j/2) AND B(i) AND NOT LSB(j))
// so EQ(i,j) means j equals bits N-1..i of B and LT(i,j) that j is smaller.
// The leaves LT(0,j) are the outputs.
//
// The virtual root is a pair of input ports instead of constants (EQ true, LT
// false): the chip's control logic compares the coordinate bits above the
// N local bits with the chip's position and feeds the result in, which
// extends the same tree to the full 13-bit screen coordinate.  With
// root_eq=1 and root_lt=0 the block is exactly the N-bit comparator.
//
// Purely combinational; 2^(N+1)-2 nodes.
module parallel_comparator #(
  parameter int N = 8
) (
  input  logic [N-1:0]    b,
  input  logic            root_eq,
  input  logic            root_lt,
  output logic [2**N-1:0] pclt
);

  // eq[i] / lt[i] hold the 2^(N-i) nodes of level i in their low bits.
  logic [2**N-1:0] eq [N+1];
  logic [2**N-1:0] lt [N+1];

  always_comb begin
    for (int i = 0; i <= N; i++) begin
      eq[i] = '0;
      lt[i] = '0;
    end
    eq[N][0] = root_eq;
    lt[N][0] = root_lt;
    for (int i = N - 1; i >= 0; i--) begin
      for (int j = 0; j < 2**(N-i); j++) begin
        if (j % 2 == 0) begin
          // LSB(j) = 0: uses bc(i) for equality
          eq[i][j] = eq[i+1][j/2] & ~b[i];
          lt[i][j] = lt[i+1][j/2] | (eq[i+1][j/2] & b[i]);
        end else begin
          eq[i][j] = eq[i+1][j/2] & b[i];
          lt[i][j] = lt[i+1][j/2];
        end
      end
    end
  end

  assign pclt = lt[0];

endmodule

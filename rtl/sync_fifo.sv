// sync_fifo: small synchronous FIFO with valid/ready on both sides, used to
// queue polygon edges of one side.  DEPTH entries (power of two), registered
// storage, the head is visible combinationally (first-word fall-through).
module sync_fifo #(
  parameter int W     = 52,
  parameter int DEPTH = 4,
  localparam int A_W  = $clog2(DEPTH)
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [W-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [W-1:0] out_data
);

  logic [W-1:0] mem [DEPTH];
  logic [A_W:0] wp, rp;

  assign in_ready  = (wp - rp) != (A_W+1)'(DEPTH);
  assign out_valid = wp != rp;
  assign out_data  = mem[rp[A_W-1:0]];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      wp <= '0;
      rp <= '0;
    end else begin
      if (in_valid && in_ready) wp <= wp + 1'b1;
      if (out_valid && out_ready) rp <= rp + 1'b1;
    end
  end

  always_ff @(posedge clk) begin
    if (in_valid && in_ready) mem[wp[A_W-1:0]] <= in_data;
  end

endmodule

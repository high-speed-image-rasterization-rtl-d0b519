// display_latches: holds the scan line being sent to the display and picks
// 16-pixel groups of it for the data lines.
//
// load copies a whole scan line from the array.  A group pointer selects
// pixels 16g..16g+15 (pixel 16g+k on data line k, the halftone bus used in
// the reverse direction); sel_clear points it at the first group, sel_next
// advances it (wrapping after the last group).  cur_group is the selected
// group, next_group the one after it, both combinational from the latches.
module display_latches #(
  parameter int COLS = 256,
  parameter int HT_W = 16,
  localparam int GROUPS = COLS / HT_W,
  localparam int G_W = (GROUPS > 1) ? $clog2(GROUPS) : 1
) (
  input  logic            clk,
  input  logic            rst_n,
  input  logic            load,
  input  logic [COLS-1:0] line_in,
  input  logic            sel_clear,
  input  logic            sel_next,
  output logic [HT_W-1:0] cur_group,
  output logic [HT_W-1:0] next_group
);

  logic [COLS-1:0] line_q;
  logic [G_W-1:0]  ptr;
  logic [G_W-1:0]  ptr_n;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line_q <= '0;
      ptr    <= '0;
    end else begin
      if (load) line_q <= line_in;
      if (sel_clear)     ptr <= '0;
      else if (sel_next) ptr <= ptr_n;
    end
  end

  assign ptr_n      = (int'(ptr) == GROUPS - 1) ? '0 : ptr + 1'b1;
  assign cur_group  = line_q[ptr * HT_W +: HT_W];
  assign next_group = line_q[ptr_n * HT_W +: HT_W];

endmodule

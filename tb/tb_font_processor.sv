// tb_font_processor: places characters of random size (1..64 x 1..64) at
// random positions with a stand-in font memory and rotator in the
// testbench.  For each owned line (Y mod 16 = 9) of each character row and
// each chunk it expects span [X+16c, X+min(16c+16,W)) and the chunk rotated
// left by X mod 16.  Random back-pressure on the fill output.
module tb_font_processor;
  import raster_pkg::*;
  localparam int ROW_ID = 9;

  logic clk = 0, rst_n = 0;
  logic place_valid, place_ready, fill_valid, fill_ready, idle;
  logic [12:0] px, py;
  logic [7:0] width, height;
  logic [5:0] rd_row;
  logic [1:0] rd_chunk;
  logic [3:0] shift;
  logic [15:0] shifted;
  rp_fill_t fill;
  logic [15:0] font [64][4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  font_processor dut (.clk, .rst_n, .row_id(4'(ROW_ID)), .place_valid, .place_ready, .px, .py, .width, .height,
    .rd_row, .rd_chunk, .shift, .shifted, .fill_valid, .fill_ready, .fill, .idle);

  // stand-in font memory + rotation, written differently from the RTL
  always_comb begin
    logic [31:0] dbl;
    dbl = {font[rd_row][rd_chunk], font[rd_row][rd_chunk]} << shift;
    shifted = dbl[31:16];
  end

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  rp_fill_t got[$];
  always @(posedge clk) begin
    if (fill_valid && fill_ready) got.push_back(fill);
    fill_ready <= ($urandom_range(0, 3) != 0);
  end

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    place_valid = 0; px = 0; py = 0; width = 0; height = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 30; t++) begin
      int w, h, x, y;
      rp_fill_t exp_q[$];
      w = (t == 0) ? 64 : $urandom_range(1, 64);
      h = (t == 0) ? 64 : $urandom_range(1, 64);
      x = $urandom_range(0, 7000);
      y = $urandom_range(64, 8000);
      for (int r = 0; r < 64; r++) for (int c = 0; c < 4; c++) font[r][c] = 16'($urandom);
      for (int r = 0; r < h; r++) begin
        if ((y - r) % 16 != ROW_ID) continue;
        for (int c = 0; c * 16 < w; c++) begin
          logic [15:0] p;
          for (int b = 0; b < 16; b++) p[(b + x) % 16] = font[r][c][b];
          exp_q.push_back('{13'(y - r), 13'(x + 16 * c), 13'(x + ((16 * c + 16 < w) ? 16 * c + 16 : w)), p});
        end
      end
      @(negedge clk);
      place_valid = 1; px = 13'(x); py = 13'(y); width = 8'(w); height = 8'(h);
      @(posedge clk); while (!place_ready) @(posedge clk);
      @(negedge clk) place_valid = 0;
      repeat (2) @(posedge clk);
      while (!idle) @(posedge clk);
      check(got.size() == exp_q.size(), $sformatf("char %0d: %0d fills, expected %0d", t, got.size(), exp_q.size()));
      while (got.size() > 0 && exp_q.size() > 0) begin
        rp_fill_t g, e;
        g = got.pop_front(); e = exp_q.pop_front();
        check(g == e, $sformatf("char %0d: got y=%0d xs=%0d xe=%0d p=%h exp y=%0d xs=%0d xe=%0d p=%h",
              t, g.y, g.xs, g.xe, g.pattern, e.y, e.xs, e.xe, e.pattern));
      end
      got.delete();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

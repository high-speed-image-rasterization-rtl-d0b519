// tb_polygon_processor: random Y-monotone polygons given as a left and a
// right chain of three edges each, pushed alternately into the two edge
// channels, with random back-pressure on the fill output.  Expected fills
// (one per line with Y mod 16 = 5, from the top vertex down to, not
// including, the bottom one) are computed from the edge spanning each line
// with the documented fixed-point rule; the pattern comes from a stand-in
// halftone table.  Also checks that the block reports idle after each
// polygon and that back-pressure really stalled it.
module tb_polygon_processor;
  import raster_pkg::*;
  localparam int ROW_ID = 5;

  logic clk = 0, rst_n = 0;
  logic l_valid, l_ready, r_valid, r_ready;
  edge_t l_edge, r_edge;
  logic fill_valid, fill_ready, idle;
  rp_fill_t fill;
  logic [12:0] ht_y;
  logic [15:0] ht_pattern;
  int checks = 0, failures = 0, stalls = 0;

  always #5 clk = ~clk;

  polygon_processor dut (.clk, .rst_n, .row_id(4'(ROW_ID)), .l_valid, .l_ready, .l_edge,
    .r_valid, .r_ready, .r_edge, .fill_valid, .fill_ready, .fill, .ht_y, .ht_pattern, .idle);

  assign ht_pattern = {3'b101, ht_y} ^ 16'h3c5a;

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic int edge_x(edge_t e, int y);
    longint slope;
    if (e.y0 == e.y1) return int'(e.x0);
    slope = ((longint'(int'(e.x1)) - longint'(int'(e.x0))) * 65536) / (int'(e.y0) - int'(e.y1));
    return int'((longint'(int'(e.x0)) * 65536 + slope * (int'(e.y0) - y)) >>> 16);
  endfunction

  // capture
  rp_fill_t got[$];
  always @(posedge clk) begin
    if (fill_valid && fill_ready) got.push_back(fill);
    if (fill_valid && !fill_ready) stalls++;
    fill_ready <= ($urandom_range(0, 2) != 0);
  end

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    l_valid = 0; r_valid = 0; l_edge = '0; r_edge = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      int ys[4], lx[4], rx[4], ly[4], ry[4];
      edge_t le[3], re[3];
      rp_fill_t exp_q[$];
      ys[0] = $urandom_range(400, 3000);
      ys[3] = ys[0] - $urandom_range(20, 300);
      for (int k = 0; k < 4; k++) begin
        lx[k] = $urandom_range(0, 2000);
        rx[k] = lx[k] + $urandom_range(0, 3000);
      end
      rx[0] = lx[0]; rx[3] = lx[3] + 5;
      ly[0] = ys[0]; ry[0] = ys[0]; ly[3] = ys[3]; ry[3] = ys[3];
      ly[1] = $urandom_range(ys[3], ys[0]); ly[2] = $urandom_range(ys[3], ly[1]);
      ry[1] = $urandom_range(ys[3], ys[0]); ry[2] = $urandom_range(ys[3], ry[1]);
      for (int k = 0; k < 3; k++) begin
        le[k] = '{13'(lx[k]), 13'(ly[k]), 13'(lx[k+1]), 13'(ly[k+1])};
        re[k] = '{13'(rx[k]), 13'(ry[k]), 13'(rx[k+1]), 13'(ry[k+1])};
      end
      for (int y = ys[0]; y > ys[3]; y--) begin
        int xl, xr;
        if (y % 16 != ROW_ID) continue;
        xl = -1; xr = -1;
        for (int k = 0; k < 3; k++) begin
          if (xl < 0 && y <= ly[k] && y > ly[k+1]) xl = edge_x(le[k], y);
          if (xr < 0 && y <= ry[k] && y > ry[k+1]) xr = edge_x(re[k], y);
        end
        exp_q.push_back('{13'(y), 13'(xl), 13'(xr), {3'b101, 13'(y)} ^ 16'h3c5a});
      end
      // push the edges alternately
      for (int k = 0; k < 3; k++) begin
        @(negedge clk); l_valid = 1; l_edge = le[k];
        @(posedge clk); while (!l_ready) @(posedge clk);
        @(negedge clk); l_valid = 0; r_valid = 1; r_edge = re[k];
        @(posedge clk); while (!r_ready) @(posedge clk);
        @(negedge clk); r_valid = 0;
      end
      repeat (3) @(posedge clk);
      while (!idle) @(posedge clk);
      check(got.size() == exp_q.size(), $sformatf("polygon %0d: %0d fills, expected %0d", t, got.size(), exp_q.size()));
      while (got.size() > 0 && exp_q.size() > 0) begin
        rp_fill_t g, e;
        g = got.pop_front(); e = exp_q.pop_front();
        check(g == e, $sformatf("polygon %0d: fill y=%0d xs=%0d xe=%0d p=%h, expected y=%0d xs=%0d xe=%0d p=%h",
              t, g.y, g.xs, g.xe, g.pattern, e.y, e.xs, e.xe, e.pattern));
      end
      got.delete();
    end
    check(stalls > 0, "output back-pressure exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

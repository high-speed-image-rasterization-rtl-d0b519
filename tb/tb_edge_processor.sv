// tb_edge_processor: loads random edges (steep, shallow, leftward,
// rightward, horizontal), waits for the slope, then steps to the end line
// checking X and Y on every line against x0 + (x1-x0)(y0-y)/(y0-y1)
// evaluated with the documented 16-bit fixed-point rule, that the end X is
// within one pixel of x1, and that the divider takes COORD_W+16 = 29 clocks.
module tb_edge_processor;
  logic clk = 0, rst_n = 0;
  logic load, step, ready, done;
  logic [12:0] x0, y0, x1, y1, x, y;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  edge_processor dut (.clk, .rst_n, .load, .x0, .y0, .x1, .y1, .step, .ready, .x, .y, .done);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; step = 0; x0 = 0; y0 = 0; x1 = 0; y1 = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 60; t++) begin
      int dy, cyc;
      longint slope;
      @(negedge clk);
      x0 = 13'($urandom_range(0, 8191));
      x1 = 13'($urandom_range(0, 8191));
      if (t % 3 == 0) x1 = 13'($urandom_range(x0 > 20 ? x0 - 20 : 0, x0 + 20 > 8191 ? 8191 : x0 + 20));
      y0 = 13'($urandom_range(0, 8191));
      dy = (t % 7 == 0) ? 0 : $urandom_range(1, (y0 < 300) ? y0 : 300);
      if (dy > y0) dy = y0;
      y1 = y0 - 13'(dy);
      load = 1;
      @(negedge clk) load = 0;
      cyc = 0;
      while (!ready) begin
        @(negedge clk);
        cyc++;
      end
      check(dy == 0 ? cyc == 0 : cyc == 29, $sformatf("divider took %0d clocks", cyc));
      slope = (dy == 0) ? 0 : ((longint'(int'(x1)) - longint'(int'(x0))) * 65536) / dy;
      for (int k = 0; k <= dy; k++) begin
        int ex;
        ex = int'((longint'(int'(x0)) * 65536 + slope * k) >>> 16);
        check(x == 13'(ex) && y == y0 - 13'(k) && done == (k == dy),
              $sformatf("edge %0d line %0d: x %0d exp %0d y %0d done %0b", t, k, x, ex, y, done));
        if (k == dy && dy > 0) begin
          int d;
          d = int'(x) - int'(x1);
          check(d >= -1 && d <= 1, "end X within one pixel of x1");
        end
        step = 1;
        @(negedge clk) step = 0;
      end
      check(done && y == y1, "stays at the end line");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

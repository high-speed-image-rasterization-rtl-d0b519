// tb_workloads: memory cycles per primitive on the full 1024 x 1024 system.
//
// Draws the standard comparison shapes (horizontal, vertical and 45-degree
// lines of 1024 and 128 pixels, axis-aligned squares of 1024 and 128, 45-degree
// squares of 128 and 16, a 128-edge circle of radius 64, an equilateral
// triangle of edge 128 and characters of 16 x 8, 32 x 16 and 32 x 64) through
// the host port of raster_system at its default size.  A monitor on each
// row's Raster Processor bus counts Fill commands, each of which is one
// memory cycle of the chips on that row.  Rows run in parallel, so the cost
// of a shape is the largest count over the 16 rows; it is checked against
// the expected number (lines of the shape owned by the busiest row, times
// 16-pixel chunks per line for characters), and the total over all rows
// against the number of scan lines (times chunks).  The clocks each shape
// took at the host are printed for comparison.  Lines are drawn as thin
// polygons, squares and the circle as polygons with vertices from the top
// down; the expected numbers are this testbench's own arithmetic.
module tb_workloads;
  import raster_pkg::*;

  localparam int NR = 16, NC = 4;

  logic clk = 0, rst_n = 0;
  logic host_valid, host_ready;
  logic [15:0] host_word;
  logic [NR-1:0][NC-1:0] rp_cs;
  logic disp_req, disp_active, idle;
  logic [1:0] disp_c;
  logic [NR-1:0][NC-1:0][15:0] rp_dout;
  logic [NR-1:0][NC-1:0] rp_doe;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  raster_system dut (.clk, .rst_n, .host_valid, .host_ready, .host_word, .rp_cs,
    .disp_req, .disp_active, .disp_c, .rp_dout, .rp_doe, .idle);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  // Fill commands per row bus
  int fills [NR];
  int wph [NR];
  logic [2:0] opc [NR];
  initial for (int r = 0; r < NR; r++) begin fills[r] = 0; wph[r] = 0; end

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) begin
      if (dut.bus_c[r][0] == 1'b0) begin
        if (wph[r] == 0) opc[r] = dut.bus_d[r][15:13];
        if (wph[r] == 3) begin
          if (opc[r] == 3'd0) fills[r]++;
          wph[r] = 0;
        end else wph[r]++;
      end
    end
  end

  task automatic send(logic [15:0] w);
    @(negedge clk);
    host_valid = 1; host_word = w;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
  endtask

  task automatic wait_idle();
    repeat (4) @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (12) @(posedge clk);
  endtask

  int vx[$], vy[$], vs[$];   // side: 0 start, 1 left, 2 right, 3 end
  longint t0;

  task automatic begin_shape();
    for (int r = 0; r < NR; r++) fills[r] = 0;
    t0 = longint'($time);
  endtask

  task automatic end_shape(string name, int exp_max, int exp_total);
    int mx, tot;
    wait_idle();
    mx = 0; tot = 0;
    for (int r = 0; r < NR; r++) begin
      tot += fills[r];
      if (fills[r] > mx) mx = fills[r];
    end
    $display("%-34s memory cycles per row %3d (expected %3d), fills %5d, host clocks %0d",
             name, mx, exp_max, tot, (longint'($time) - t0) / 10);
    check(mx == exp_max, {name, ": memory cycles"});
    check(tot == exp_total, {name, ": fill count"});
  endtask

  task automatic polygon();
    send({SLP_POLY_START, 12'h0}); send(16'(vx[0])); send(16'(vy[0]));
    for (int i = 1; i < vx.size(); i++) begin
      send({SLP_VERTEX, 10'h0, vs[i] == 3, vs[i] == 2}); send(16'(vx[i])); send(16'(vy[i]));
    end
  endtask

  // a polygon covering lines y_top down to y_bot + 1: busiest row count
  function automatic int rows_max(int y_top, int y_bot);
    int cnt [NR];
    int mx;
    for (int r = 0; r < NR; r++) cnt[r] = 0;
    for (int y = y_top; y > y_bot; y--) cnt[y % NR]++;
    mx = 0;
    for (int r = 0; r < NR; r++) if (cnt[r] > mx) mx = cnt[r];
    return mx;
  endfunction

  task automatic box(string name, int x0, int x1, int y_top, int y_bot);
    begin_shape();
    vx = '{x0, x1, x0, x1}; vy = '{y_top, y_top, y_bot, y_bot}; vs = '{0, 2, 1, 3};
    polygon();
    end_shape(name, rows_max(y_top, y_bot), y_top - y_bot);
  endtask

  task automatic diag_line(string name, int x0, int y_top, int len);
    begin_shape();
    vx = '{x0, x0 + 2, x0 + len, x0 + len + 2};
    vy = '{y_top, y_top, y_top - len, y_top - len};
    vs = '{0, 2, 1, 3};
    polygon();
    end_shape(name, rows_max(y_top, y_top - len), len);
  endtask

  task automatic diamond(string name, int cx, int cy, int h);
    begin_shape();
    vx = '{cx, cx + h, cx - h, cx}; vy = '{cy + h, cy, cy, cy - h}; vs = '{0, 2, 1, 3};
    polygon();
    end_shape(name, rows_max(cy + h, cy - h), 2 * h);
  endtask

  task automatic circle(string name, int cx, int cy, int rad, int n);
    real a;
    int ky [$];
    begin_shape();
    vx = {}; vy = {}; vs = {};
    vx.push_back(cx); vy.push_back(cy + rad); vs.push_back(0);
    for (int k = 1; k < n / 2; k++) begin
      int dx, dy;
      a = 3.14159265358979 * 2.0 * real'(k) / real'(n);
      dx = int'($floor(real'(rad) * $sin(a) + 0.5));
      dy = int'($floor(real'(rad) * $cos(a) + 0.5));
      vx.push_back(cx + dx); vy.push_back(cy + dy); vs.push_back(2);   // right side
      vx.push_back(cx - dx); vy.push_back(cy + dy); vs.push_back(1);   // left side
    end
    vx.push_back(cx); vy.push_back(cy - rad); vs.push_back(3);
    polygon();
    end_shape(name, rows_max(cy + rad, cy - rad), 2 * rad);
  endtask

  task automatic character(string name, int w, int h, int px, int py);
    int nch;
    nch = (w + 15) / 16;
    begin_shape();
    send({SLP_FONT_DEF, 12'h0}); send({8'(w), 8'(h)});
    for (int r = 0; r < h * nch; r++) send(16'($urandom));
    t0 = longint'($time);
    send({SLP_CHAR, 12'h0}); send(16'(px)); send(16'(py));
    end_shape(name, rows_max(py, py - h) * nch, h * nch);
  endtask

  initial begin : watchdog
    repeat (500000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_valid = 0; host_word = 0; rp_cs = '0; disp_req = 0; disp_c = 2'b11;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    send({SLP_SET_MODE, 8'h0, 2'b00, 2'(ALU_OR)});

    box("horizontal line 1024", 0, 1024, 500, 499);
    check(rows_max(500, 499) == 1, "horizontal line 1024: 1 cycle");
    box("horizontal line 128", 300, 428, 77, 76);
    box("vertical line 1024", 500, 501, 1024, 0);
    check(rows_max(1024, 0) == 64, "vertical line 1024: 64 cycles");
    box("vertical line 128", 40, 41, 900, 772);
    diag_line("45-degree line 1024 (724 lines)", 100, 900, 724);
    check(rows_max(900, 900 - 724) == 46, "45-degree line 1024: 46 cycles");
    diag_line("45-degree line 128 (91 lines)", 600, 300, 91);
    check(rows_max(300, 300 - 91) == 6, "45-degree line 128: 6 cycles");
    box("axis-aligned square 1024", 0, 1024, 1024, 0);
    box("axis-aligned square 128", 200, 328, 700, 572);
    check(rows_max(700, 572) == 8, "square 128: 8 cycles");
    diamond("45-degree square 128 (180 lines)", 500, 600, 90);
    check(rows_max(690, 510) >= 12, "45-degree square 128: 12 cycles");
    diamond("45-degree square 16 (22 lines)", 200, 200, 11);
    check(rows_max(211, 189) == 2, "45-degree square 16: 2 cycles");
    circle("128-edge circle R=64", 512, 512, 64, 128);
    check(rows_max(576, 448) == 8, "circle: 8 cycles");
    begin_shape();
    vx = '{300, 236, 364}; vy = '{800, 689, 689}; vs = '{0, 1, 3};
    polygon();
    end_shape("equilateral triangle 128 (111 lines)", rows_max(800, 689), 111);
    character("character 16 x 8", 16, 8, 203, 400);
    character("character 32 x 16", 32, 16, 517, 333);
    character("character 32 x 64", 32, 64, 90, 1000);
    check(rows_max(1000, 936) * 2 == 8, "character 32 x 64: 8 cycles");

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

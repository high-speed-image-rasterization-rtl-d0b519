// tb_scan_line_processor: drives the host command stream of one Scan Line
// Processor (row 3 of 16) and decodes its Raster Processor bus.
//
// Expected fills are computed here from the vertex and character lists:
// for every owned line (Y mod 16 = 3) between the top and bottom vertex the
// left and right X come from the edges that span it, evaluated with the
// 16-bit fixed-point rule the design documents (slope truncated toward zero,
// start at x0, floor), and the pattern is halftone row Y mod 16; for
// characters each owned row and 16-pixel chunk gives span [X+16c,
// X+min(16c+16,W)) and the chunk rotated left by X mod 16.  The test checks
// the order and contents of every fill, the ALU op and C1 C2 sent with it,
// raw pass-through, Refresh filler while idle, whole four-word framing, the
// hold/held stop and the host back-pressure.
module tb_scan_line_processor;
  import raster_pkg::*;

  localparam int ROW_ID = 3;

  logic clk = 0, rst_n = 0;
  logic host_valid;
  logic host_ready;
  logic [15:0] host_word;
  logic hold, held, idle;
  logic [15:0] rp_d;
  logic [2:0] rp_c;
  int checks = 0, failures = 0;
  int n_refresh = 0, n_fill = 0, n_raw = 0, n_wait = 0;

  always #5 clk = ~clk;

  scan_line_processor dut (.clk, .rst_n, .host_valid, .host_ready, .host_word,
    .row_id(4'(ROW_ID)), .hold, .held, .rp_d, .rp_c, .idle);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL: %s", what);
    end
  endtask

  // ---------------- bus capture
  typedef struct { logic [15:0] w[4]; logic [1:0] c12; } frame_t;
  frame_t frames[$];
  logic [15:0] cur[4];
  int ph = 0;
  always @(posedge clk) if (rst_n) begin
    if (rp_c[0] == 1'b0) begin
      cur[ph] = rp_d;
      if (ph == 3) begin
        frame_t f;
        f.w = cur;
        f.c12 = {rp_c[1], rp_c[2]};
        if (cur[0][15:13] == 3'd3) n_refresh++;
        else frames.push_back(f);
        ph = 0;
      end else ph++;
    end else begin
      check(ph == 0, "bus stopped inside a command");
    end
    if (host_valid && !host_ready) n_wait++;
  end

  // ---------------- host side
  task automatic send(logic [15:0] w);
    @(negedge clk);
    host_valid = 1; host_word = w;
    @(posedge clk);
    while (!host_ready) @(posedge clk);
    @(negedge clk);
    host_valid = 0;
  endtask

  // ---------------- expected fills
  typedef struct { int y, xs, xe; logic [15:0] p; } fill_t;
  fill_t exp_q[$];
  logic [15:0] ht[16];

  function automatic int edge_x(int x0, int y0, int x1, int y1, int y);
    longint slope, pos;
    slope = ((longint'(x1) - x0) * 65536) / (y0 - y1);
    pos = longint'(x0) * 65536 + slope * (y0 - y);
    return int'(pos >>> 16);
  endfunction

  // vertices: x, y, side (0 start, 1 left, 2 right, 3 end)
  int vx[$], vy[$], vs[$];

  task automatic expect_polygon();
    int ytop, ybot;
    ytop = vy[0]; ybot = vy[vy.size() - 1];
    for (int y = ytop; y > ybot; y--) begin
      int xl, xr, lx0, ly0, rx0, ry0;
      if (y % 16 != ROW_ID) continue;
      lx0 = vx[0]; ly0 = vy[0]; rx0 = vx[0]; ry0 = vy[0];
      xl = -1; xr = -1;
      for (int i = 1; i < vx.size(); i++) begin
        if (vs[i] == 1 || vs[i] == 3) begin
          if (y <= ly0 && y > vy[i] && xl < 0) xl = edge_x(lx0, ly0, vx[i], vy[i], y);
          lx0 = vx[i]; ly0 = vy[i];
        end
        if (vs[i] == 2 || vs[i] == 3) begin
          if (y <= ry0 && y > vy[i] && xr < 0) xr = edge_x(rx0, ry0, vx[i], vy[i], y);
          rx0 = vx[i]; ry0 = vy[i];
        end
      end
      exp_q.push_back('{y, xl, xr, ht[y % 16]});
    end
  endtask

  task automatic send_polygon();
    send({SLP_POLY_START, 12'h0}); send(16'(vx[0])); send(16'(vy[0]));
    for (int i = 1; i < vx.size(); i++) begin
      send({SLP_VERTEX, 10'h0, vs[i] == 3, vs[i] == 2}); send(16'(vx[i])); send(16'(vy[i]));
    end
  endtask

  logic [15:0] font[64][4];

  task automatic char_test(int w, int h, int px, int py);
    int nch;
    nch = (w + 15) / 16;
    send({SLP_FONT_DEF, 12'h0}); send({8'(w), 8'(h)});
    for (int r = 0; r < h; r++)
      for (int c = 0; c < nch; c++) begin
        font[r][c] = 16'($urandom);
        send(font[r][c]);
      end
    send({SLP_CHAR, 12'h0}); send(16'(px)); send(16'(py));
    for (int r = 0; r < h; r++) begin
      int y;
      y = (py - r) & 16'h1fff;
      if (y % 16 != ROW_ID) continue;
      for (int c = 0; c < nch; c++) begin
        logic [15:0] p;
        int s;
        s = px % 16;
        p = (s == 0) ? font[r][c] : ((font[r][c] << s) | (font[r][c] >> (16 - s)));
        exp_q.push_back('{y, px + 16 * c, px + ((16 * c + 16 > w) ? w : 16 * c + 16), p});
      end
    end
  endtask

  task automatic wait_idle();
    repeat (4) @(posedge clk);
    while (!idle) @(posedge clk);
    repeat (12) @(posedge clk);
  endtask

  task automatic compare_fills(int op, logic [1:0] c12);
    check(frames.size() == exp_q.size(), $sformatf("fill count %0d expected %0d", frames.size(), exp_q.size()));
    while (frames.size() > 0 && exp_q.size() > 0) begin
      frame_t f;
      fill_t e;
      f = frames.pop_front();
      e = exp_q.pop_front();
      n_fill++;
      check(f.w[0] == {3'd0, 13'(e.y)} && f.w[1] == {1'b0, 2'(op), 13'(e.xs)} && f.w[2] == {3'd0, 13'(e.xe)}
            && f.w[3] == e.p && f.c12 == c12,
            $sformatf("fill y=%0d got %h %h %h %h c%0d, exp xs=%0d xe=%0d p=%h", e.y, f.w[0], f.w[1], f.w[2], f.w[3], f.c12, e.xs, e.xe, e.p));
    end
    frames.delete(); exp_q.delete();
  endtask

  initial begin : watchdog
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_valid = 0; host_word = 0; hold = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    repeat (40) @(posedge clk);
    check(n_refresh >= 8, "Refresh sent as filler while idle");

    // raw pass-through
    send({SLP_RAW, 12'h0}); send(16'h4123); send(16'h2345); send(16'h0678); send(16'h9abc);
    wait_idle();
    check(frames.size() == 1 && frames[0].w[0] == 16'h4123 && frames[0].w[1] == 16'h2345
          && frames[0].w[2] == 16'h0678 && frames[0].w[3] == 16'h9abc, "raw command passed through");
    n_raw += frames.size();
    frames.delete();

    // halftone memory and mode: OR, inverted pattern
    for (int i = 0; i < 16; i++) begin
      ht[i] = 16'($urandom);
      send({SLP_HT_LOAD, 8'h0, 4'(i)}); send(ht[i]);
    end
    send({SLP_SET_MODE, 8'h0, 2'b01, 2'(ALU_OR)});

    // the monotone polygon of the vertex-order example: start, right, left, right, left, left, end
    vx = '{300, 420, 250, 400, 270, 200, 280};
    vy = '{500, 470, 420, 380, 330, 290, 260};
    vs = '{0, 2, 1, 2, 1, 1, 3};
    send_polygon();
    expect_polygon();
    wait_idle();
    compare_fills(ALU_OR, 2'b01);

    // shallow edges (many pixels per line), a run of right vertices, replace
    send({SLP_SET_MODE, 8'h0, 2'b00, 2'(ALU_REPLACE)});
    vx = '{500, 1000, 980, 990, 20, 700};
    vy = '{300, 299, 250, 240, 200, 100};
    vs = '{0, 2, 2, 2, 1, 3};
    send_polygon();
    expect_polygon();
    // a mode change waits (host back-pressure) until the polygon is done
    send({SLP_SET_MODE, 8'h0, 2'b00, 2'(ALU_OR)});
    wait_idle();
    compare_fills(ALU_REPLACE, 2'b00);

    // characters: 20 x 40 at x = 1003 (two chunks, rotated), 64 x 32 at x = 64
    char_test(20, 40, 1003, 700);
    wait_idle();
    compare_fills(ALU_OR, 2'b00);
    char_test(64, 32, 64, 35);
    wait_idle();
    compare_fills(ALU_OR, 2'b00);

    // hold stops the bus at a command boundary, release restarts it
    @(negedge clk) hold = 1;
    repeat (8) @(posedge clk);
    check(held && rp_c == 3'b111, "held with imaging no-op on the mode lines");
    @(negedge clk) hold = 0;
    repeat (12) @(posedge clk);
    check(!held, "running again after hold");

    check(n_wait > 0, "host back-pressure seen");
    $display("mechanisms: fills=%0d raw=%0d refresh=%0d host_waits=%0d", n_fill, n_raw, n_refresh, n_wait);
    check(n_fill > 0 && n_raw > 0, "fill and raw commands seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

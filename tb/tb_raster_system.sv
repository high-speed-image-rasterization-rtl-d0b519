// tb_raster_system: end-to-end test of the 1024 x 1024 system at its full
// size (16 rows of a Scan Line Processor and 4 Raster Processors).
//
// The host programs all 64 chips (Set Address and Interleave, low-order Y
// interleave with Ny = 4 and the row number as offset, high-order X at
// 256 * column), clears the screen, draws a halftoned monotone polygon
// (OR), a 40 x 30 character across a chip boundary (OR), a thin diagonal
// line as a polygon with the inverted pattern (AND) and a rectangle with the
// all-ones pattern (Replace), then switches the chips to imaging mode and
// reads every line of every chip back.  A 1024 x 1024 reference image is
// painted here from the same primitives (edge X by the documented
// fixed-point rule, character chunks placed pixel by pixel) and compared
// with the image read back.  Each mechanism the design has is counted and
// must occur: Set Address, fills, Refresh filler, raw commands, every ALU
// operation and halftone mode, a polygon waiting for its next edge,
// multi-chunk characters, spans split between chips, host back-pressure,
// the stop at a command boundary for imaging, and display fetches.
module tb_raster_system;
  import raster_pkg::*;

  localparam int NR = 16, NC = 4, SCR = 1024;

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
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  // ---------------- mechanism counters (bus monitor on every row)
  int n_setaddr = 0, n_fill = 0, n_refresh = 0, n_split = 0, n_host_wait = 0;
  int n_op[4] = '{0, 0, 0, 0};
  int n_mode[4] = '{0, 0, 0, 0};
  int n_edge_wait = 0, n_multi_chunk = 0, n_held = 0, n_fetch = 0;
  logic [15:0] wbuf [NR][4];
  int wph [NR];
  initial for (int r = 0; r < NR; r++) wph[r] = 0;

  always @(posedge clk) if (rst_n) begin
    for (int r = 0; r < NR; r++) begin
      if (!disp_active && dut.bus_c[r][0] == 1'b0) begin
        wbuf[r][wph[r]] = dut.bus_d[r];
        if (wph[r] == 3) begin
          case (wbuf[r][0][15:13])
            3'd0: begin
              int xs, xe;
              n_fill++;
              n_op[wbuf[r][1][14:13]]++;
              n_mode[{dut.bus_c[r][1], dut.bus_c[r][2]}]++;
              xs = int'(wbuf[r][1][12:0]); xe = int'(wbuf[r][2][12:0]);
              if (xs / 256 != (xe - 1) / 256 && xe > xs) n_split++;
            end
            3'd2: n_setaddr++;
            3'd3: n_refresh++;
            default: ;
          endcase
          wph[r] = 0;
        end else wph[r]++;
      end
    end
    if (host_valid && !host_ready) n_host_wait++;
    if (dut.g_row[0].u_slp.u_poly.l_act != dut.g_row[0].u_slp.u_poly.r_act) n_edge_wait++;
    if (dut.g_row[0].u_slp.u_font.fill_valid && dut.g_row[0].u_slp.u_font.c != 0) n_multi_chunk++;
    if (disp_active) n_held++;
    if (dut.g_row[0].g_col[0].u_rp.u_ctrl.disp_load) n_fetch++;
  end

  // ---------------- host
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

  // ---------------- reference image
  bit img [SCR][SCR];
  logic [15:0] ht [16];
  int cur_op;
  logic [1:0] cur_mode;

  function automatic logic [15:0] mode_pat(logic [15:0] p);
    case (cur_mode)
      2'b00: return p;
      2'b01: return ~p;
      2'b10: return 16'h0000;
      default: return 16'hffff;
    endcase
  endfunction

  task automatic paint(int y, int xs, int xe, logic [15:0] pat);
    logic [15:0] h;
    h = mode_pat(pat);
    if (y < 0 || y >= SCR) return;
    for (int x = (xs < 0 ? 0 : xs); x < xe && x < SCR; x++) begin
      case (cur_op)
        1: img[y][x] = h[x % 16];
        2: img[y][x] = img[y][x] | h[x % 16];
        3: img[y][x] = img[y][x] & h[x % 16];
        default: ;
      endcase
    end
  endtask

  task automatic set_mode(int op, logic [1:0] mode);
    send({SLP_SET_MODE, 8'h0, mode, 2'(op)});
    cur_op = op; cur_mode = mode;
  endtask

  function automatic int edge_x(int x0, int y0, int x1, int y1, int y);
    longint slope;
    slope = ((longint'(x1) - x0) * 65536) / (y0 - y1);
    return int'((longint'(x0) * 65536 + slope * (y0 - y)) >>> 16);
  endfunction

  int vx[$], vy[$], vs[$];   // side: 0 start, 1 left, 2 right, 3 end

  task automatic polygon();
    send({SLP_POLY_START, 12'h0}); send(16'(vx[0])); send(16'(vy[0]));
    for (int i = 1; i < vx.size(); i++) begin
      send({SLP_VERTEX, 10'h0, vs[i] == 3, vs[i] == 2}); send(16'(vx[i])); send(16'(vy[i]));
    end
    for (int y = vy[0]; y > vy[vy.size() - 1]; y--) begin
      int xl, xr, lx0, ly0, rx0, ry0;
      lx0 = vx[0]; ly0 = vy[0]; rx0 = vx[0]; ry0 = vy[0];
      xl = -1; xr = -1;
      for (int i = 1; i < vx.size(); i++) begin
        if (vs[i] == 1 || vs[i] == 3) begin
          if (xl < 0 && y <= ly0 && y > vy[i]) xl = edge_x(lx0, ly0, vx[i], vy[i], y);
          lx0 = vx[i]; ly0 = vy[i];
        end
        if (vs[i] == 2 || vs[i] == 3) begin
          if (xr < 0 && y <= ry0 && y > vy[i]) xr = edge_x(rx0, ry0, vx[i], vy[i], y);
          rx0 = vx[i]; ry0 = vy[i];
        end
      end
      paint(y, xl, xr, ht[y % 16]);
    end
  endtask

  task automatic character(int w, int h, int px, int py);
    int nch;
    logic [15:0] f [64][4];
    nch = (w + 15) / 16;
    send({SLP_FONT_DEF, 12'h0}); send({8'(w), 8'(h)});
    for (int r = 0; r < h; r++)
      for (int c = 0; c < nch; c++) begin
        f[r][c] = 16'($urandom);
        send(f[r][c]);
      end
    send({SLP_CHAR, 12'h0}); send(16'(px)); send(16'(py));
    for (int r = 0; r < h; r++)
      for (int k = 0; k < w; k++) begin
        int x, y;
        x = px + k; y = py - r;
        if (f[r][k / 16][k % 16]) begin
          // placed with the pattern bit as halftone, through the ALU op
          case (cur_op)
            1: img[y][x] = 1'b1;
            2: img[y][x] = 1'b1;
            default: ;
          endcase
        end else if (cur_op == 1) img[y][x] = 1'b0;
        else if (cur_op == 3) img[y][x] = 1'b0;
      end
  endtask

  // ---------------- readout
  task automatic read_back();
    @(negedge clk) disp_req = 1;
    @(posedge clk);
    while (!disp_active) @(posedge clk);
    @(negedge clk);
    rp_cs = '1;
    for (int i = 0; i < 64; i++) begin
      disp_c = (i == 0) ? 2'b00 : 2'b01;
      for (int k = 0; k < 8; k++) begin
        @(negedge clk) disp_c = 2'b11;
      end
      for (int g = 0; g < 16; g++) begin
        @(posedge clk); #1;
        for (int r = 0; r < NR; r++)
          for (int c = 0; c < NC; c++) begin
            logic [15:0] e;
            for (int b = 0; b < 16; b++) e[b] = img[i * NR + r][c * 256 + g * 16 + b];
            check(rp_doe[r][c] && rp_dout[r][c] == e,
                  $sformatf("line %0d x %0d: got %h exp %h", i * NR + r, c * 256 + g * 16, rp_dout[r][c], e));
          end
        @(negedge clk) disp_c = (g < 15) ? 2'b10 : 2'b11;
      end
    end
    rp_cs = '0;
    @(negedge clk) disp_req = 0;
    repeat (8) @(posedge clk);
  endtask

  initial begin : watchdog
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    host_valid = 0; host_word = 0; rp_cs = '0; disp_req = 0; disp_c = 2'b11;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;

    // position of every chip: low-order Y (every 16th line from r), high-order X
    for (int r = 0; r < NR; r++)
      for (int c = 0; c < NC; c++) begin
        rp_cs = '0;
        rp_cs[r][c] = 1'b1;
        send({SLP_RAW, 12'h0});
        send({3'd2, 13'd0});
        send({2'b00, 1'b0, 13'(r)});
        send({2'b00, 1'b1, 13'(256 * c)});
        send({8'd0, 8'd4});
        wait_idle();
      end
    rp_cs = '0;

    // clear: rectangle over lines 1023..1, then line 0 with a raw fill
    set_mode(ALU_REPLACE, 2'b10);
    vx = '{0, 1024, 0, 1024}; vy = '{1023, 1023, 0, 0}; vs = '{0, 2, 1, 3};
    polygon();
    send({SLP_RAW, 12'h0}); send({3'd0, 13'd0}); send({3'd1, 13'd0}); send({3'd0, 13'd1024}); send(16'h0000);
    paint(0, 0, 1024, 16'h0000);

    // halftone patterns
    for (int i = 0; i < 16; i++) begin
      ht[i] = 16'($urandom);
      send({SLP_HT_LOAD, 8'h0, 4'(i)}); send(ht[i]);
    end

    // monotone polygon, OR, pattern as is
    set_mode(ALU_OR, 2'b00);
    vx = '{600, 1000, 150, 900, 300, 100, 500};
    vy = '{900, 850, 700, 500, 400, 200, 50};
    vs = '{0, 2, 1, 2, 1, 1, 3};
    polygon();

    // character across the chip boundary at x = 512
    character(40, 30, 490, 980);

    // thin 45-degree line as a polygon, AND with the inverted pattern
    set_mode(ALU_AND, 2'b01);
    vx = '{100, 104, 900, 904}; vy = '{1000, 1000, 200, 200}; vs = '{0, 2, 1, 3};
    polygon();

    // rectangle, replace with all ones
    set_mode(ALU_REPLACE, 2'b11);
    vx = '{700, 1020, 700, 1020}; vy = '{990, 990, 930, 930}; vs = '{0, 2, 1, 3};
    polygon();
    wait_idle();

    read_back();
    begin
      int ones = 0;
      for (int y = 0; y < SCR; y++) for (int x = 0; x < SCR; x++) ones += int'(img[y][x]);
      $display("pixels set in the image: %0d", ones);
      check(ones > 1000 && ones < SCR * SCR - 1000, "image has content");
    end

    $display("mechanisms: setaddr=%0d fills=%0d refresh=%0d split=%0d host_wait=%0d edge_wait=%0d multi_chunk=%0d held=%0d fetch=%0d",
             n_setaddr, n_fill, n_refresh, n_split, n_host_wait, n_edge_wait, n_multi_chunk, n_held, n_fetch);
    $display("ops nop/replace/or/and = %0d/%0d/%0d/%0d  modes asis/inv/zeros/ones = %0d/%0d/%0d/%0d",
             n_op[0], n_op[1], n_op[2], n_op[3], n_mode[0], n_mode[1], n_mode[2], n_mode[3]);
    check(n_setaddr >= 64, "Set Address commands");
    check(n_fill > 0, "fill commands");
    check(n_refresh > 0, "Refresh filler");
    check(n_split > 0, "spans split between chips");
    check(n_host_wait > 0, "host back-pressure");
    check(n_edge_wait > 0, "polygon waiting for the next edge");
    check(n_multi_chunk > 0, "multi-chunk character");
    check(n_held > 0, "stop for imaging mode");
    check(n_fetch >= 64, "display fetches");
    for (int k = 1; k < 4; k++) check(n_op[k] > 0, $sformatf("ALU op %0d used", k));
    for (int k = 0; k < 4; k++) check(n_mode[k] > 0, $sformatf("halftone mode %0d used", k));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

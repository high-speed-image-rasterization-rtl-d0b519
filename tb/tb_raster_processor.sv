// tb_raster_processor: self-checking test of the Raster Processor chip.
//
// Keeps its own image of the chip and its own copy of the chip's position and
// interleave.  The expected result of a fill is computed pixel by pixel from
// the screen coordinate that each internal pixel stands for (high order:
// base + j, low order: j * 2^n + offset), independently of the chip's
// comparator-based selection.  It checks: fills with every ALU operation and
// every halftone mode, the one-memory-cycle latency (row written at the end
// of word 4), spans partly off the chip, Set Address with and without chip
// select, low- and high-order interleave in X and Y, refresh (content kept,
// refresh counter advancing), and the whole image read back through the
// imaging-mode commands (8-clock fetch rule, next-16-pixel stepping, data
// lines off without chip select).
module tb_raster_processor;
  import raster_pkg::*;

  localparam int ROWS = 64, COLS = 256;

  logic clk = 0, rst_n = 0;
  logic [15:0] d_in;
  logic [15:0] d_out;
  logic d_oe;
  logic [2:0] c;
  logic cs;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  raster_processor dut (.clk, .rst_n, .d_in, .d_out, .d_oe, .c, .cs);

  // ---------------- reference model
  bit ref_img [ROWS][COLS];
  bit m_yhi = 1, m_xhi = 1;
  int m_ypos = 0, m_xpos = 0, m_nx = 0, m_ny = 0;

  function automatic int px_x(int j);
    if (m_xhi) return (m_xpos / COLS) * COLS + j;
    return j * (1 << m_nx) + (m_xpos % (1 << m_nx));
  endfunction
  function automatic int row_y(int r);
    if (m_yhi) return (m_ypos / ROWS) * ROWS + r;
    return r * (1 << m_ny) + (m_ypos % (1 << m_ny));
  endfunction

  function automatic logic [15:0] ht(logic [15:0] p, int mode);
    case (mode)
      0: return p;
      1: return ~p;
      2: return 16'h0000;
      default: return 16'hffff;
    endcase
  endfunction

  task automatic model_fill(int y, int op, int xs, int xe, logic [15:0] pat, int mode);
    logic [15:0] h;
    h = ht(pat, mode);
    for (int r = 0; r < ROWS; r++) begin
      if (row_y(r) != y) continue;
      for (int j = 0; j < COLS; j++) begin
        int x;
        x = px_x(j);
        if (x >= xs && x < xe) begin
          case (op)
            1: ref_img[r][j] = h[j % 16];
            2: ref_img[r][j] = ref_img[r][j] | h[j % 16];
            3: ref_img[r][j] = ref_img[r][j] & h[j % 16];
            default: ;
          endcase
        end
      end
    end
  endtask

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // ---------------- bus drivers (drive after the falling edge)
  task automatic word(logic [15:0] w, logic csv, logic [1:0] c12);
    @(negedge clk);
    d_in = w; cs = csv; c = {c12[0], c12[1], 1'b0};  // c[1]=C1, c[2]=C2
  endtask

  task automatic fill(int y, int op, int xs, int xe, logic [15:0] pat, int mode);
    logic [1:0] c12;
    c12 = 2'(mode);
    word({3'd0, 13'(y)}, 1'b0, 2'b00);
    word({3'(op), 13'(xs)}, 1'b0, 2'b00);
    word({3'd0, 13'(xe)}, 1'b0, 2'b00);
    word(pat, 1'b0, c12);
    model_fill(y, op, xs, xe, pat, mode);
  endtask

  task automatic set_addr(bit yhi, int ypos, bit xhi, int xpos, int nx, int ny, bit csv);
    word({3'd2, 13'd0}, csv, 2'b00);
    word({2'b00, yhi, 13'(ypos)}, 1'b0, 2'b00);
    word({2'b00, xhi, 13'(xpos)}, 1'b0, 2'b00);
    word({8'(nx), 8'(ny)}, 1'b0, 2'b00);
    if (csv) begin
      m_yhi = yhi; m_ypos = ypos; m_xhi = xhi; m_xpos = xpos; m_nx = nx; m_ny = ny;
    end
  endtask

  task automatic refresh();
    word({3'd3, 13'd0}, 1'b0, 2'b00);
    repeat (3) word(16'h0, 1'b0, 2'b00);
  endtask

  task automatic disp(logic [1:0] c12, logic csv);
    @(negedge clk);
    d_in = 16'h0; cs = csv; c = {c12[0], c12[1], 1'b1};
  endtask

  // Read the whole image through imaging mode and compare
  task automatic read_image();
    for (int r = 0; r < ROWS; r++) begin
      disp((r == 0) ? 2'b00 : 2'b01, 1'b1);
      @(posedge clk); #1;
      check(d_oe == 1'b0, "data lines off after a fetch command");
      for (int k = 0; k < 8; k++) disp(2'b11, 1'b1);
      for (int g = 0; g < COLS / 16; g++) begin
        @(posedge clk); #1;
        begin
          logic [15:0] exp;
          for (int b = 0; b < 16; b++) exp[b] = ref_img[r][g * 16 + b];
          check(d_oe && d_out == exp, $sformatf("image row %0d group %0d: got %h exp %h oe %0b", r, g, d_out, exp, d_oe));
        end
        if (g < COLS / 16 - 1) disp(2'b10, 1'b1);
      end
      disp(2'b11, 1'b0);   // no chip select: lines off
      @(posedge clk); #1;
      check(d_oe == 1'b0, "data lines off without chip select");
    end
    // stay in imaging mode (no chip select) until the next command word
    disp(2'b11, 1'b0);
  endtask

  initial begin : watchdog
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int rnd_ops;
  initial begin
    // imaging-mode no-op without chip select holds the word counter at 0
    d_in = 0; c = 3'b111; cs = 0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1;
    // clear the image (default: high order, position 0)
    for (int y = 0; y < ROWS; y++) fill(y, 1, 0, 256, 16'h0000, 0);

    // latency: a fill is in the array right after the clock edge ending word 4
    word({3'd0, 13'd7}, 1'b0, 2'b00);
    word({3'd1, 13'd3}, 1'b0, 2'b00);
    word({3'd0, 13'd40}, 1'b0, 2'b00);
    word(16'hffff, 1'b0, 2'b00);
    model_fill(7, 1, 3, 40, 16'hffff, 0);
    @(posedge clk); #1;
    check(dut.u_mem.mem[7][39:3] == {37{1'b1}} && dut.u_mem.mem[7][2:0] == 3'b000 && dut.u_mem.mem[7][40] == 1'b0,
          "fill written at the end of word 4");

    // every operation and halftone mode, random spans
    for (int i = 0; i < 300; i++) begin
      int y, xs, xe, op, mode;
      y = $urandom_range(0, 70);
      xs = $urandom_range(0, 300);
      xe = xs + $urandom_range(0, 120);
      op = $urandom_range(0, 3);
      mode = $urandom_range(0, 3);
      fill(y, op, xs, xe, 16'($urandom), mode);
    end
    read_image();

    // set address without chip select is ignored
    set_addr(1'b0, 1, 1'b0, 1, 1, 2, 1'b0);
    fill(64, 1, 0, 8, 16'hffff, 0);        // y=64 is not on this chip
    read_image();

    // low-order interleave: every 4th line from 1, every 2nd pixel from 1
    set_addr(1'b0, 1, 1'b0, 1, 1, 2, 1'b1);
    for (int i = 0; i < 200; i++) begin
      int y, xs, xe;
      y = $urandom_range(0, 300);
      xs = $urandom_range(0, 520);
      xe = xs + $urandom_range(0, 100);
      fill(y, $urandom_range(1, 3), xs, xe, 16'($urandom), $urandom_range(0, 3));
    end
    fill(253, 1, 0, 600, 16'hffff, 0);       // whole line 253 = row 63
    read_image();

    // high order at x 256..511, y 128..191
    set_addr(1'b1, 130, 1'b1, 300, 0, 0, 1'b1);
    for (int i = 0; i < 200; i++) begin
      int y, xs, xe;
      y = $urandom_range(100, 220);
      xs = $urandom_range(200, 560);
      xe = xs + $urandom_range(0, 200);
      fill(y, $urandom_range(0, 3), xs, xe, 16'($urandom), $urandom_range(0, 3));
    end

    // refresh keeps the image and advances the counter
    begin
      logic [5:0] rc;
      rc = dut.u_ctrl.refcnt;
      for (int i = 0; i < 10; i++) refresh();
      @(posedge clk); #1;
      check(dut.u_ctrl.refcnt == rc + 6'd10, "refresh counter advanced by 10");
    end
    read_image();

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_scan_line_alu: loads L1 and L2 from comparator patterns made for random
// Xs and Xe (PCLT(j) = j < X), then checks SEL and IW for every pixel and
// every operation against (Xs <= j < Xe) and the halftone bit j mod 16.
module tb_scan_line_alu;
  import raster_pkg::*;
  localparam int COLS = 256;
  logic clk = 0, rst_n = 0;
  logic [COLS-1:0] pclt, ir, iw, sel;
  logic load_l1, load_l2;
  logic [15:0] halftone;
  alu_op_e op;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  scan_line_alu #(.COLS(COLS)) dut (.clk, .rst_n, .pclt, .load_l1, .load_l2, .halftone, .op, .ir, .iw, .sel);

  function automatic logic [COLS-1:0] lt_mask(int x);
    logic [COLS-1:0] m;
    for (int j = 0; j < COLS; j++) m[j] = (j < x);
    return m;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load_l1 = 0; load_l2 = 0; pclt = '0; ir = '0; halftone = '0; op = ALU_NOP;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 400; i++) begin
      int xs, xe;
      xs = $urandom_range(0, 256);
      xe = $urandom_range(0, 256);
      @(negedge clk); pclt = lt_mask(xs); load_l1 = 1;
      @(negedge clk); pclt = lt_mask(xe); load_l1 = 0; load_l2 = 1;
      @(negedge clk); load_l2 = 0; pclt = '1;
      ir = {8{32'($urandom)}} ^ {COLS{1'b0}};
      for (int k = 0; k < COLS / 32; k++) ir[k*32 +: 32] = $urandom;
      halftone = 16'($urandom);
      op = alu_op_e'(i % 4);
      #1;
      for (int j = 0; j < COLS; j++) begin
        logic s, h, e;
        s = (j >= xs) && (j < xe);
        h = halftone[j % 16];
        case (i % 4)
          0: e = ir[j];
          1: e = s ? h : ir[j];
          2: e = s ? (ir[j] | h) : ir[j];
          default: e = s ? (ir[j] & h) : ir[j];
        endcase
        checks++;
        if (sel[j] !== s || iw[j] !== e) begin
          failures++;
          if (failures < 10) $display("FAIL op %0d xs %0d xe %0d j %0d sel %0b iw %0b exp %0b", i % 4, xs, xe, j, sel[j], iw[j], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

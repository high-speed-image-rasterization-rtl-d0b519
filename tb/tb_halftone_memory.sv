// tb_halftone_memory: checks the all-ones reset value, then writes random
// rows and reads them back through scan-line numbers (row = Y mod 16).
module tb_halftone_memory;
  logic clk = 0, rst_n = 0;
  logic wr_en;
  logic [3:0] wr_row;
  logic [15:0] wr_data, rd_data;
  logic [12:0] rd_y;
  logic [15:0] model [16];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  halftone_memory dut (.clk, .rst_n, .wr_en, .wr_row, .wr_data, .rd_y, .rd_data);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_row = 0; wr_data = 0; rd_y = 0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int y = 0; y < 16; y++) begin
      rd_y = 13'(y); #1;
      check(rd_data == 16'hffff, "reset value all ones");
      model[y] = 16'hffff;
    end
    for (int i = 0; i < 300; i++) begin
      @(negedge clk);
      wr_en = (i % 2 == 0); wr_row = 4'($urandom); wr_data = 16'($urandom);
      @(posedge clk); #1;
      if (wr_en) model[wr_row] = wr_data;
      wr_en = 0;
      rd_y = 13'($urandom);
      #1;
      check(rd_data == model[rd_y % 16], $sformatf("line %0d", rd_y));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

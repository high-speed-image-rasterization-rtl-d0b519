// tb_memory_array: writes random scan lines, reads them back one clock after
// the read request, and checks that a read and a write of the same row in one
// clock return the old line.
module tb_memory_array;
  localparam int ROWS = 64, COLS = 256;
  logic clk = 0;
  logic rd_en, wr_en;
  logic [5:0] rd_row, wr_row;
  logic [COLS-1:0] rd_data, wr_data;
  logic [COLS-1:0] model [ROWS];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  memory_array #(.ROWS(ROWS), .COLS(COLS)) dut (.clk, .rd_en, .rd_row, .rd_data, .wr_en, .wr_row, .wr_data);

  function automatic logic [COLS-1:0] rnd_line();
    logic [COLS-1:0] v;
    for (int k = 0; k < COLS / 32; k++) v[k*32 +: 32] = $urandom;
    return v;
  endfunction

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    rd_en = 0; wr_en = 0; rd_row = 0; wr_row = 0; wr_data = '0;
    for (int r = 0; r < ROWS; r++) begin
      @(negedge clk); wr_en = 1; wr_row = 6'(r); wr_data = rnd_line(); model[r] = wr_data;
    end
    @(negedge clk); wr_en = 0;
    for (int i = 0; i < 500; i++) begin
      int r, w;
      r = $urandom_range(0, ROWS - 1);
      w = (i % 3 == 0) ? r : $urandom_range(0, ROWS - 1);
      @(negedge clk);
      rd_en = 1; rd_row = 6'(r);
      wr_en = (i % 2 == 0); wr_row = 6'(w); wr_data = rnd_line();
      @(posedge clk); #1;
      checks++;
      if (rd_data !== model[r]) begin
        failures++;
        $display("FAIL row %0d", r);
      end
      if (wr_en) model[w] = wr_data;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

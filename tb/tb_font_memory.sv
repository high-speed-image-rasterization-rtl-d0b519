// tb_font_memory: fills all 64 rows x 4 chunks with random data and reads
// every location back, then overwrites random locations and rereads them.
module tb_font_memory;
  logic clk = 0;
  logic wr_en;
  logic [5:0] wr_row, rd_row;
  logic [1:0] wr_chunk, rd_chunk;
  logic [15:0] wr_data, rd_data;
  logic [15:0] model [64][4];
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  font_memory dut (.clk, .wr_en, .wr_row, .wr_chunk, .wr_data, .rd_row, .rd_chunk, .rd_data);

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wr_en = 0; wr_row = 0; wr_chunk = 0; wr_data = 0; rd_row = 0; rd_chunk = 0;
    for (int pass = 0; pass < 2; pass++) begin
      for (int i = 0; i < 256; i++) begin
        @(negedge clk);
        wr_en = 1;
        wr_row = (pass == 0) ? 6'(i / 4) : 6'($urandom);
        wr_chunk = (pass == 0) ? 2'(i % 4) : 2'($urandom);
        wr_data = 16'($urandom);
        model[wr_row][wr_chunk] = wr_data;
      end
      @(negedge clk) wr_en = 0;
      for (int i = 0; i < 256; i++) begin
        rd_row = 6'(i / 4); rd_chunk = 2'(i % 4);
        #1;
        checks++;
        if (rd_data !== model[i / 4][i % 4]) begin
          failures++;
          $display("FAIL row %0d chunk %0d", i / 4, i % 4);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

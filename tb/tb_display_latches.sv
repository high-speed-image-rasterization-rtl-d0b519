// tb_display_latches: latches random scan lines and steps the group pointer
// through all 16 groups and past the end, checking the selected and the
// following 16 pixels; also checks that sel_clear returns to group 0 and
// that the latches hold while load is low.
module tb_display_latches;
  localparam int COLS = 256;
  logic clk = 0, rst_n = 0;
  logic load, sel_clear, sel_next;
  logic [COLS-1:0] line_in, line_m;
  logic [15:0] cur_group, next_group;
  int checks = 0, failures = 0;

  always #5 clk = ~clk;

  display_latches #(.COLS(COLS)) dut (.clk, .rst_n, .load, .line_in, .sel_clear, .sel_next, .cur_group, .next_group);

  task automatic check(logic [15:0] got, logic [15:0] exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s got %h exp %h", what, got, exp);
    end
  endtask

  initial begin : watchdog
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    load = 0; sel_clear = 0; sel_next = 0; line_in = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 20; t++) begin
      @(negedge clk);
      for (int k = 0; k < COLS / 32; k++) line_in[k*32 +: 32] = $urandom;
      line_m = line_in; load = 1; sel_clear = 1;
      @(negedge clk);
      load = 0; sel_clear = 0; line_in = ~line_in;   // must not be latched
      for (int g = 0; g < 20; g++) begin
        #1;
        check(cur_group, line_m[(g % 16) * 16 +: 16], $sformatf("cur group %0d", g));
        check(next_group, line_m[((g + 1) % 16) * 16 +: 16], $sformatf("next group %0d", g));
        sel_next = 1;
        @(negedge clk);
        sel_next = 0;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

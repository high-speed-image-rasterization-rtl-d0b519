// tb_barrel_shifter: every shift amount on random words; the expected value
// is built bit by bit: output bit (i + amount) mod 16 = input bit i.
module tb_barrel_shifter;
  logic [15:0] din, dout;
  logic [3:0] amount;
  int checks = 0, failures = 0;

  barrel_shifter dut (.din, .amount, .dout);

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 320; i++) begin
      logic [15:0] exp;
      din = 16'($urandom);
      amount = 4'(i % 16);
      #1;
      for (int b = 0; b < 16; b++) exp[(b + i % 16) % 16] = din[b];
      checks++;
      if (dout !== exp) begin
        failures++;
        $display("FAIL din %h amount %0d got %h exp %h", din, amount, dout, exp);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

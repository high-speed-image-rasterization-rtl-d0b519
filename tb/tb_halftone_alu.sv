// tb_halftone_alu: random patterns through all four halftone modes, compared
// with as-is, inverted, all 0s and all 1s.
module tb_halftone_alu;
  import raster_pkg::*;
  logic [15:0] pin, pout;
  ht_mode_e mode;
  int checks = 0, failures = 0;

  halftone_alu dut (.pattern_in(pin), .mode, .pattern_out(pout));

  initial begin : watchdog
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 400; i++) begin
      logic [15:0] exp;
      pin = 16'($urandom);
      mode = ht_mode_e'(i % 4);
      #1;
      case (i % 4)
        0: exp = pin;
        1: exp = ~pin;
        2: exp = 16'h0000;
        default: exp = 16'hffff;
      endcase
      checks++;
      if (pout !== exp) begin
        failures++;
        $display("FAIL mode %0d in %h out %h", i % 4, pin, pout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

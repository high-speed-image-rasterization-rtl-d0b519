// tb_parallel_comparator: exhaustive check of the comparison tree.  For every
// 8-bit B and every virtual-root input pair it compares each of the 256
// outputs with j < B (root EQ true, LT false), all ones (LT true) or all zeros
// (EQ and LT false).
module tb_parallel_comparator;
  localparam int N = 8;
  logic [N-1:0] b;
  logic root_eq, root_lt;
  logic [2**N-1:0] pclt;
  int checks = 0, failures = 0;

  parallel_comparator #(.N(N)) dut (.b, .root_eq, .root_lt, .pclt);

  initial begin : watchdog
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int mode = 0; mode < 3; mode++) begin
      for (int v = 0; v < 2**N; v++) begin
        b = N'(v);
        root_eq = (mode == 0);
        root_lt = (mode == 1);
        #1;
        for (int j = 0; j < 2**N; j++) begin
          logic exp;
          exp = (mode == 0) ? (j < v) : (mode == 1);
          checks++;
          if (pclt[j] !== exp) begin
            failures++;
            if (failures < 10) $display("FAIL mode %0d B=%0d j=%0d got %0b", mode, v, j, pclt[j]);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

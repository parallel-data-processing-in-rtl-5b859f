// tb_comparator: exhaustive check of the 4-bit compare-and-swap element.
// Every operand pair is applied; max_value/min_value must be the larger and
// smaller operand, and for equal operands the outputs must equal the operands.
module tb_comparator;
  localparam int unsigned M = 4;
  logic [M-1:0] op1, op2, mx, mn;
  int checks = 0, failures = 0;

  comparator #(.M(M)) dut (.op1(op1), .op2(op2), .max_value(mx), .min_value(mn));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int a = 0; a < 2**M; a++) begin
      for (int b = 0; b < 2**M; b++) begin
        op1 = M'(a);
        op2 = M'(b);
        #1;
        checks++;
        if (mx !== M'((a > b) ? a : b) || mn !== M'((a > b) ? b : a)) begin
          failures++;
          $display("FAIL op1=%0d op2=%0d max=%0d min=%0d", a, b, mx, mn);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_completion_detector: exhaustive test of the 1-of-4 completion detector:
// d must be high exactly when some rail is high.
module tb_completion_detector;
  logic [3:0] a;
  logic d;
  int checks = 0, failures = 0;

  completion_detector dut (.a, .d);

  initial begin
    for (int v = 0; v < 16; v++) begin
      a = 4'(v);
      #1;
      checks++;
      if (d !== (v != 0)) begin failures++; $display("FAIL a=%b d=%b", a, d); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

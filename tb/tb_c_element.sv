// tb_c_element: random test of the Muller C-element (2 and 3 inputs).
// The expected output is kept by a reference model: set when all inputs
// are high, clear when all are low, hold otherwise, one clock later.
module tb_c_element;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0] in2 = '0;
  logic [2:0] in3 = '0;
  logic q2, q3;
  logic m2 = 1'b0, m3 = 1'b0;
  int checks = 0, failures = 0, n_hold = 0;

  c_element                u2 (.clk, .rst_n, .in(in2), .q(q2));
  c_element #(.NUM_IN(3))  u3 (.clk, .rst_n, .in(in3), .q(q3));

  always #5 clk = ~clk;

  initial begin
    repeat (2) @(negedge clk);
    checks++; if (q2 !== 1'b0 || q3 !== 1'b0) failures++;
    rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      @(negedge clk);
      in2 = 2'($urandom);
      in3 = 3'($urandom);
      @(posedge clk);
      if (&in2) m2 = 1'b1; else if (in2 == '0) m2 = 1'b0; else n_hold++;
      if (&in3) m3 = 1'b1; else if (in3 == '0) m3 = 1'b0;
      #1;
      checks += 2;
      if (q2 !== m2) begin failures++; $display("FAIL q2 in=%b q=%b exp=%b", in2, q2, m2); end
      if (q3 !== m3) begin failures++; $display("FAIL q3 in=%b q=%b exp=%b", in3, q3, m3); end
    end
    checks++; if (n_hold == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_onehot_adder: exhaustive test of the 1-of-4 and 1-of-2 adders.
// For every pair of values a 4-phase cycle is run: operands valid -> the sum
// (i + j) mod n must appear one clock later; one operand null -> the sum must
// be held; both null -> the sum must return to null.
module tb_onehot_adder;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a4 = '0, b4 = '0, s4;
  logic [1:0] a2 = '0, b2 = '0, s2;
  int checks = 0, failures = 0;

  onehot_adder               u4 (.clk, .rst_n, .a(a4), .b(b4), .s(s4));
  onehot_adder #(.RAILS(2))  u2 (.clk, .rst_n, .a(a2), .b(b2), .s(s2));

  always #5 clk = ~clk;

  task automatic expect4(input logic [3:0] e, input string what);
    checks++;
    if (s4 !== e) begin failures++; $display("FAIL 1-of-4 %s: a=%b b=%b s=%b exp=%b", what, a4, b4, s4, e); end
  endtask
  task automatic expect2(input logic [1:0] e, input string what);
    checks++;
    if (s2 !== e) begin failures++; $display("FAIL 1-of-2 %s: a=%b b=%b s=%b exp=%b", what, a2, b2, s2, e); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int i = 0; i < 4; i++)
      for (int j = 0; j < 4; j++) begin
        logic [3:0] e;
        e = 4'b0001 << ((i + j) % 4);
        @(negedge clk); a4 = 4'b0001 << i; b4 = 4'b0001 << j;
        @(negedge clk); expect4(e, "sum");
        a4 = '0;
        @(negedge clk); expect4(e, "hold");
        b4 = '0;
        @(negedge clk); expect4('0, "null");
      end
    for (int i = 0; i < 2; i++)
      for (int j = 0; j < 2; j++) begin
        logic [1:0] e;
        e = 2'b01 << ((i + j) % 2);
        @(negedge clk); a2 = 2'b01 << i; b2 = 2'b01 << j;
        @(negedge clk); expect2(e, "sum");
        b2 = '0;
        @(negedge clk); expect2(e, "hold");
        a2 = '0;
        @(negedge clk); expect2('0, "null");
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

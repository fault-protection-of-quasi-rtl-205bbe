// tb_error_filter: test of the C-element error filter (1-of-4).
// Directed part: a spurious rail on the received copy alone, or on the
// recomputed copy alone, never reaches the output; the output takes the value
// both copies agree on only while en is high, holds it while one copy drops,
// and returns to null only when both copies are null and en is low.
// Random part: every rail is compared with a reference 3-input C-element.
module tb_error_filter;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [3:0] a = '0, a_p = '0, a_f;
  logic en = 1'b1;
  logic [3:0] m = '0;
  int checks = 0, failures = 0;

  error_filter dut (.clk, .rst_n, .a, .a_p, .en, .a_f);

  always #5 clk = ~clk;

  task automatic step_expect(input logic [3:0] e, input string what);
    @(negedge clk);
    checks++;
    if (a_f !== e) begin failures++; $display("FAIL %s: a=%b a_p=%b en=%b out=%b exp=%b", what, a, a_p, en, a_f, e); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    // value 2 arrives, received copy carries two extra rails (fault)
    a = 4'b1100; a_p = 4'b0100;
    step_expect(4'b0100, "filter spurious rail in received copy");
    a = 4'b0000;                       // received rail drops (fault), value held
    step_expect(4'b0100, "hold on dropped rail");
    a = 4'b0100; en = 1'b0;
    step_expect(4'b0100, "hold while en low");
    a = '0;
    step_expect(4'b0100, "hold while recomputed copy valid");
    a_p = '0;
    step_expect(4'b0000, "return to null");
    // en low: a new value must not be taken
    a = 4'b0010; a_p = 4'b0010;
    step_expect(4'b0000, "no capture while en low");
    en = 1'b1; a_p = 4'b1010;          // spurious rail in recomputed copy
    step_expect(4'b0010, "filter spurious rail in recomputed copy");
    en = 1'b0; a = '0; a_p = '0;
    step_expect(4'b0000, "null again");
    // random part against a reference model
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      a = 4'($urandom); a_p = 4'($urandom); en = 1'($urandom);
      @(posedge clk);
      for (int k = 0; k < 4; k++)
        if (a[k] && a_p[k] && en) m[k] = 1'b1;
        else if (!a[k] && !a_p[k] && !en) m[k] = 1'b0;
      #1;
      checks++;
      if (a_f !== m) begin failures++; $display("FAIL random out=%b exp=%b", a_f, m); end
    end
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

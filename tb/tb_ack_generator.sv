// tb_ack_generator: test of the ACK generator of one group (3 words).
// Directed: iack is high after reset, stays high while only two words are
// complete, falls 2 clocks after the third completes, stays low while any
// word is still complete, and rises 2 clocks after the last word is null.
// Random: compared with a reference model of the pair C-elements and the
// combining C-element.
module tb_ack_generator;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [0:0][2:0] d = '0;
  logic iack;
  logic [2:0] mp = '0;
  logic mall = 1'b0;
  int checks = 0, failures = 0;

  ack_generator dut (.clk, .rst_n, .d, .iack);

  always #5 clk = ~clk;

  task automatic expect_iack(input logic e, input string what);
    checks++;
    if (iack !== e) begin failures++; $display("FAIL %s: d=%b iack=%b", what, d, iack); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    expect_iack(1'b1, "reset");
    rst_n = 1'b1;
    d = 3'b011;
    repeat (4) @(negedge clk);
    expect_iack(1'b1, "two of three complete");
    d = 3'b111;
    @(negedge clk); expect_iack(1'b1, "1 clock after full");
    @(negedge clk); expect_iack(1'b0, "2 clocks after full");
    d = 3'b100;
    repeat (4) @(negedge clk);
    expect_iack(1'b0, "one word still complete");
    d = 3'b000;
    @(negedge clk); expect_iack(1'b0, "1 clock after null");
    @(negedge clk); expect_iack(1'b1, "2 clocks after null");
    @(negedge clk);
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      // mostly hold, sometimes move one word, like a real stage
      if ($urandom_range(3) == 0) d[0][$urandom_range(2)] ^= 1'b1;
      @(posedge clk);
      begin
        logic [2:0] np;
        for (int k = 0; k < 3; k++) begin
          logic x, y;
          x = d[0][k]; y = d[0][(k + 1) % 3];
          np[k] = (x && y) ? 1'b1 : (!x && !y) ? 1'b0 : mp[k];
        end
        if (&mp) mall = 1'b1; else if (mp == '0) mall = 1'b0;
        mp = np;
      end
      #1;
      checks++;
      if (iack !== !mall) begin failures++; $display("FAIL random d=%b iack=%b", d, iack); end
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

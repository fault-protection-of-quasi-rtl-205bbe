// tb_dirc_sender: the check word of every group must be the modulo-n sum of
// its data words (checked against the code tables for 1-of-2 and 1-of-4,
// e.g. 1-of-4: 0010 + 1000 -> 0001), valid one clock after the data and
// null one clock after the data return to null.
module tb_dirc_sender;
  import dirc_pkg::*;
  localparam int unsigned G = DEF_GROUPS;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [G-1:0][1:0][3:0] a4 = '0;
  logic [G-1:0][3:0]      c4;
  logic [3:0][2:0][1:0]   a2 = '0;   // 1-of-2, CN = 3, 4 groups
  logic [3:0][1:0]        c2;
  int checks = 0, failures = 0;

  dirc_sender                                   u4 (.clk, .rst_n, .a(a4), .c(c4));
  dirc_sender #(.RAILS(2), .CN(3), .GROUPS(4))  u2 (.clk, .rst_n, .a(a2), .c(c2));

  always #5 clk = ~clk;

  initial begin
    int v [G][2];
    int w [4][3];
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 200; t++) begin
      @(negedge clk);
      for (int g = 0; g < G; g++)
        for (int k = 0; k < 2; k++) begin v[g][k] = $urandom_range(3); a4[g][k] = 4'b0001 << v[g][k]; end
      for (int g = 0; g < 4; g++)
        for (int k = 0; k < 3; k++) begin w[g][k] = $urandom_range(1); a2[g][k] = 2'b01 << w[g][k]; end
      @(negedge clk);   // 1-of-4 with CN = 2: one adder level
      for (int g = 0; g < G; g++) begin
        checks++;
        if (c4[g] !== 4'b0001 << ((v[g][0] + v[g][1]) % 4)) begin
          failures++; $display("FAIL 1-of-4 g%0d a=%b c=%b", g, a4[g], c4[g]);
        end
      end
      @(negedge clk);   // 1-of-2 with CN = 3: two adder levels
      for (int g = 0; g < 4; g++) begin
        checks++;
        if (c2[g] !== 2'b01 << ((w[g][0] + w[g][1] + w[g][2]) % 2)) begin
          failures++; $display("FAIL 1-of-2 g%0d a=%b c=%b", g, a2[g], c2[g]);
        end
      end
      a4 = '0; a2 = '0;
      @(negedge clk);
      checks++; if (c4 !== '0) failures++;
      @(negedge clk);
      checks++; if (c2 !== '0) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

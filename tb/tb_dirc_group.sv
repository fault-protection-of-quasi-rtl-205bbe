// tb_dirc_group: test of one DIRC group (1-of-4, CN = 2) on its own.
// Every round presents a correct code word (A_0, A_1, C = A_0 + A_1) with a
// transient fault on one randomly chosen word: extra rails raised, the valid
// rail dropped, or both, for a few clocks. The filtered outputs must equal
// the fault-free words, each exactly one-hot, with all three completion bits
// high. Then en falls, the inputs return to null (sometimes with a fault
// on the null word), and every output and completion bit must return to
// null. A word must not be taken while en is low.
module tb_dirc_group;
  logic clk = 1'b0, rst_n = 1'b0;
  logic [1:0][3:0] a = '0, a_in, a_f;
  logic [3:0] c = '0, c_in, c_f;
  logic [2:0][3:0] f = '0;           // fault masks: words 0, 1, check
  logic en = 1'b0;
  logic [2:0] d;
  int checks = 0, failures = 0;
  int n_raise = 0, n_drop = 0, n_null_fault = 0;

  assign a_in[0] = a[0] ^ f[0];
  assign a_in[1] = a[1] ^ f[1];
  assign c_in    = c ^ f[2];

  dirc_group dut (.clk, .rst_n, .a(a_in), .c(c_in), .en, .a_f, .c_f, .d);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s at %0t: a_f=%b c_f=%b d=%b", what, $time, a_f, c_f, d); end
  endtask

  initial begin
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    for (int t = 0; t < 1000; t++) begin
      int v0, v1, w;
      logic [3:0] m;
      v0 = $urandom_range(3); v1 = $urandom_range(3);
      // offered while en is low: must not be taken
      a[0] = 4'b0001 << v0; a[1] = 4'b0001 << v1; c = 4'b0001 << ((v0 + v1) % 4);
      repeat (3) @(negedge clk);
      chk(a_f == '0 && c_f == '0 && d == '0, "no capture while en low");
      // fault on one word, then en rises
      w = $urandom_range(2);
      m = 4'($urandom_range(15, 1));
      f[w] = m;
      if ((m & ~(w == 2 ? c : a[w])) != 0) n_raise++;
      if ((m & (w == 2 ? c : a[w])) != 0) n_drop++;
      en = 1'b1;
      repeat ($urandom_range(4, 1)) @(negedge clk);
      f = '0;
      repeat (4) @(negedge clk);
      chk(a_f[0] == a[0] && a_f[1] == a[1] && c_f == c, "corrected words");
      chk(d == 3'b111, "completion");
      // return to null, sometimes with a fault on the null word
      en = 1'b0;
      a = '0; c = '0;
      if ($urandom_range(1)) begin
        f[$urandom_range(2)] = 4'($urandom_range(15, 1));
        n_null_fault++;
        repeat ($urandom_range(3, 1)) @(negedge clk);
        f = '0;
      end
      repeat (4) @(negedge clk);
      chk(a_f == '0 && c_f == '0 && d == '0, "return to null");
    end
    chk(n_raise > 0 && n_drop > 0 && n_null_fault > 0, "all fault kinds applied");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (30000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

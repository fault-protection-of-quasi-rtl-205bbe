// tb_dirc_stage: 4-phase test of one DIRC stage at its default size
// (1-of-4, 64 groups of 2 data words).
// The source presents code words (check words computed here) and, as in a
// fault-injection run, flips rails of one random word in about half of the
// groups for 1 to 3 clocks while the word is offered. A sink with random
// delays drives oack. Every word leaving the stage must equal the fault-free
// word. Also checked: iack high after reset, iack falls only after the stage
// holds the word, outputs wait while oack is low, and the unloaded latency
// (data out 2 clocks after the code word is presented).
module tb_dirc_stage;
  import dirc_pkg::*;
  localparam int unsigned G = DEF_GROUPS;
  localparam int unsigned TOKENS = 600;

  typedef logic [G-1:0][1:0][3:0] data_t;
  typedef logic [G-1:0][3:0]      chk_t;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t a = '0, fa = '0, o_a;
  chk_t  c = '0, fc = '0, o_c;
  logic  oack = 1'b1, iack;
  int checks = 0, failures = 0, n_fault = 0, n_stall = 0, n_recv = 0;
  bit done_src = 0;
  data_t exp_q[$];

  dirc_stage dut (.clk, .rst_n, .a(a ^ fa), .c(c ^ fc), .oack, .o_a, .o_c, .iack);

  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s at %0t", what, $time); end
  endtask

  function automatic bit all_valid();
    for (int g = 0; g < G; g++)
      if (!$onehot(o_a[g][0]) || !$onehot(o_a[g][1]) || !$onehot(o_c[g])) return 0;
    return 1;
  endfunction

  initial begin : source
    repeat (2) @(negedge clk);
    chk(iack === 1'b1, "iack high after reset");
    rst_n = 1'b1;
    for (int t = 0; t < TOKENS; t++) begin
      while (!iack) @(negedge clk);
      for (int g = 0; g < G; g++) begin
        int v0, v1;
        v0 = $urandom_range(3); v1 = $urandom_range(3);
        a[g][0] = 4'b0001 << v0; a[g][1] = 4'b0001 << v1; c[g] = 4'b0001 << ((v0 + v1) % 4);
        if (t > 0 && $urandom_range(1)) begin
          int w;
          w = $urandom_range(2);
          if (w == 2) fc[g] = 4'($urandom_range(15, 1)); else fa[g][w] = 4'($urandom_range(15, 1));
          n_fault++;
        end
      end
      exp_q.push_back(a);
      if (t == 0) begin
        int lat;
        lat = 0;
        do begin @(negedge clk); lat++; end while (!all_valid() && lat < 50);
        chk(lat == 2, $sformatf("latency %0d, expected 2", lat));
      end else begin
        repeat ($urandom_range(3, 1)) @(negedge clk);
        fa = '0; fc = '0;
      end
      while (iack) @(negedge clk);
      chk(all_valid(), "iack fell with the stage full");
      a = '0; c = '0;
    end
    done_src = 1;
  end

  initial begin : sink
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (oack && all_valid()) begin
        data_t e;
        e = exp_q.pop_front();
        chk(o_a == e, "data words");
        for (int g = 0; g < G; g++) begin
          int s;
          s = 0;
          for (int k = 0; k < 2; k++) for (int r = 0; r < 4; r++) if (e[g][k][r]) s += r;
          chk(o_c[g] == 4'b0001 << (s % 4), "check word");
        end
        n_recv++;
        if ($urandom_range(2) == 0) begin
          n_stall++;
          repeat ($urandom_range(5, 1)) @(negedge clk);
        end
        oack = 1'b0;
        while (o_a != '0 || o_c != '0) @(negedge clk);
        repeat ($urandom_range(3)) @(negedge clk);
        oack = 1'b1;
      end
    end
  end

  initial begin
    wait (done_src && exp_q.size() == 0);
    repeat (5) @(negedge clk);
    chk(n_recv == TOKENS, "all tokens received");
    chk(n_fault > 0 && n_stall > 0, "faults and stalls happened");
    $display("tokens=%0d faults=%0d stalls=%0d", n_recv, n_fault, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOKENS * 40 + 1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

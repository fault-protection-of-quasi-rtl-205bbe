// tb_dirc_link_rail2: end-to-end test of the DIRC-protected link with 1-of-2
// (dual-rail) words, the other configuration evaluated for the design: 64
// groups of 2 data words (N = 128 channels), 4 stages.
//
// Same environment as tb_dirc_link: a 4-phase source of random tokens, a
// 4-phase sink with random delays, and a fault injector that flips rails of
// one word of one group on the link into each stage (at most one faulty word
// per group, link and handshake). Every token must arrive unchanged with
// check words equal to the modulo-2 sum of their group; the unloaded latency
// and the occurrence of every fault kind, sink stall and source wait are
// checked.
module tb_dirc_link_rail2;
  import dirc_pkg::*;

  localparam int unsigned RAILS  = 2;
  localparam int unsigned CN     = DEF_CN;
  localparam int unsigned GROUPS = DEF_GROUPS;
  localparam int unsigned STAGES = DEF_STAGES;
  localparam int unsigned TOKENS = 1500;
  // unloaded latency: check word 1 clock behind the data at the sender; in
  // every stage the data copies need the check word (1 clock) and the filter
  // (1 clock) -> 2 clocks per stage after the check word: 1 + 2 * STAGES
  localparam int unsigned LATENCY = 1 + 2 * STAGES;

  typedef logic [GROUPS-1:0][CN-1:0][RAILS-1:0] data_t;
  typedef logic [GROUPS-1:0][RAILS-1:0]         chk_t;

  logic clk = 1'b0, rst_n = 1'b0;
  data_t a = '0, o_a;
  chk_t  o_c;
  logic  iack, oack = 1'b1;
  logic [STAGES-1:0][GROUPS-1:0][CN-1:0][RAILS-1:0] fault_a = '0;
  logic [STAGES-1:0][GROUPS-1:0][RAILS-1:0]         fault_c = '0;

  dirc_link #(.RAILS(RAILS)) dut (.clk, .rst_n, .a, .iack, .fault_a, .fault_c, .o_a, .o_c, .oack);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_raise = 0, n_drop = 0, n_multi = 0, n_chk = 0, n_stall = 0, n_wait = 0;
  int n_recv = 0;
  bit done_src = 0;
  data_t exp_q[$];

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 10) $display("FAIL %s at %0t", what, $time);
    end
  endtask

  function automatic bit all_valid();
    for (int g = 0; g < GROUPS; g++) begin
      if (!$onehot(o_c[g])) return 0;
      for (int k = 0; k < CN; k++) if (!$onehot(o_a[g][k])) return 0;
    end
    return 1;
  endfunction

  function automatic int unsigned rail_of(input logic [RAILS-1:0] w);
    for (int unsigned i = 0; i < RAILS; i++) if (w[i]) return i;
    return 0;
  endfunction

  // ---------------- source ----------------
  initial begin : source
    int t_start;
    repeat (3) @(negedge clk);
    check(iack === 1'b1, "iack high after reset");
    check(o_a == '0 && o_c == '0, "outputs null after reset");
    rst_n = 1'b1;
    for (int t = 0; t < TOKENS; t++) begin
      int w;
      w = 0;
      while (!iack) begin @(negedge clk); w++; end
      if (w > 0) n_wait++;
      for (int g = 0; g < GROUPS; g++)
        for (int k = 0; k < CN; k++)
          a[g][k] = RAILS'(1) << $urandom_range(RAILS - 1);
      exp_q.push_back(a);
      if (t == 0) begin
        // first token: unloaded, no faults yet -> measure latency
        t_start = 0;
        do begin @(negedge clk); t_start++; end while (!all_valid() && t_start < 100);
        check(t_start == LATENCY, $sformatf("latency %0d, expected %0d", t_start, LATENCY));
      end
      while (iack) @(negedge clk);
      a = '0;
    end
    done_src = 1;
  end

  // ---------------- sink ----------------
  initial begin : sink
    @(posedge rst_n);
    forever begin
      @(negedge clk);
      if (oack && all_valid()) begin
        data_t e;
        int unsigned sum;
        if (exp_q.size() == 0) begin
          check(0, "token without a sent token");
        end else begin
          e = exp_q.pop_front();
          for (int g = 0; g < GROUPS; g++) begin
            sum = 0;
            for (int k = 0; k < CN; k++) begin
              check(o_a[g][k] == e[g][k], $sformatf("data g%0d w%0d", g, k));
              sum += rail_of(e[g][k]);
            end
            check(rail_of(o_c[g]) == sum % RAILS, $sformatf("check g%0d", g));
          end
        end
        n_recv++;
        if ($urandom_range(3) == 0) begin
          n_stall++;
          repeat ($urandom_range(6, 1)) @(negedge clk);
        end
        oack = 1'b0;
        while (o_a != '0 || o_c != '0) @(negedge clk);
        if ($urandom_range(3) == 0) repeat ($urandom_range(4, 1)) @(negedge clk);
        oack = 1'b1;
      end
    end
  end

  // ---------------- fault injector ----------------
  // One fault process per link. It flips rails of one word of a random group,
  // and hits a group again only after that group's link has been null and
  // fault-free for 3 clocks, i.e. at most one faulty word per group and
  // handshake: two faulty words of one group within one handshake are a
  // double fault, outside what one check word can correct.
  for (genvar s = 0; s < STAGES; s++) begin : g_inj
    bit          hit   [GROUPS];
    int unsigned quiet [GROUPS];
    always @(negedge clk)
      for (int g = 0; g < GROUPS; g++) begin
        if (dut.u_pipe.link_a[s][g] == '0 && dut.u_pipe.link_c[s][g] == '0 &&
            fault_a[s][g] == '0 && fault_c[s][g] == '0) quiet[g]++;
        else quiet[g] = 0;
        if (quiet[g] >= 3) hit[g] = 0;
      end
    initial begin
      wait (n_recv > 0);   // the first token measures the unloaded latency
      forever begin
        int g, w, dur;
        logic [RAILS-1:0] m;
        logic [RAILS-1:0] cur;
        repeat ($urandom_range(4, 1)) @(negedge clk);
        g = $urandom_range(GROUPS - 1);
        if (!hit[g]) begin
          hit[g] = 1;
          w = $urandom_range(CN);
          m = RAILS'($urandom_range((1 << RAILS) - 1, 1));
          dur = $urandom_range(3, 1);
          cur = (w == CN) ? dut.u_pipe.link_c[s][g] : dut.u_pipe.link_a[s][g][w];
          if ((m & ~cur) != 0) n_raise++;
          if ((m & cur) != 0) n_drop++;
          if ($countones(m) > 1) n_multi++;
          if (w == CN) begin
            n_chk++;
            fault_c[s][g] = m;
          end else begin
            fault_a[s][g][w] = m;
          end
          repeat (dur) @(negedge clk);
          fault_a[s][g] = '0;
          fault_c[s][g] = '0;
        end
      end
    end
  end

  // ---------------- end and watchdog ----------------
  initial begin
    wait (done_src && exp_q.size() == 0);
    repeat (5) @(negedge clk);
    check(n_recv == TOKENS, $sformatf("received %0d of %0d", n_recv, TOKENS));
    check(n_raise > 0, "rail-raising fault happened");
    check(n_drop > 0, "rail-dropping fault happened");
    check(n_multi > 0, "multi-rail fault happened");
    check(n_chk > 0, "check-word fault happened");
    check(n_stall > 0, "sink stall happened");
    check(n_wait > 0, "source waited for iack");
    $display("tokens=%0d faults: raise=%0d drop=%0d multi=%0d check=%0d stalls=%0d waits=%0d",
             n_recv, n_raise, n_drop, n_multi, n_chk, n_stall, n_wait);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (TOKENS * 60 + 1000) @(posedge clk);
    failures++;
    $display("watchdog: timeout");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// dirc_group: error corrector of one DIRC group inside a pipeline stage.
//
// A group carries CN data words A_0..A_CN-1 and the check word
// C = A_0 + ... + A_CN-1 (sum modulo n of 1-of-n words). The group recomputes
// every word from the others:
//   C'   = A_0 + ... + A_CN-1
//   A_k' = C - (sum of the other data words)
// with 1-of-n adders (onehot_adder). Subtraction is addition of the negated
// word, and negation modulo n is a renaming of rails (rail v to rail
// (n - v) mod n), so it costs no gates; for 1-of-2 it is the identity. For
// CN = 2 the group therefore has exactly three adders: A_0' = C - A_1,
// A_1' = C - A_0 and C' = A_0 + A_1. Each received word then meets its
// recomputed copy in an error filter, A_k'' = C(A_k, A_k', en), which
// masks a transient fault on any single word of the group. A completion
// detector per filtered word gives d (d[CN] belongs to the check word).
//
// Timing: each recomputed copy is ready one adder level (one clock) after the
// words it is computed from (CN - 1 levels for CN > 2), and each filter adds
// one clock: a complete code word reaches a_f / c_f 2 clocks after it is
// presented when CN = 2 and en is high.
module dirc_group #(
  parameter int unsigned RAILS = dirc_pkg::DEF_RAILS,
  parameter int unsigned CN    = dirc_pkg::DEF_CN
) (
  input  logic                     clk,
  input  logic                     rst_n,
  input  logic [CN-1:0][RAILS-1:0] a,     // received data words
  input  logic [RAILS-1:0]         c,     // received check word
  input  logic                     en,    // acknowledge of the next stage
  output logic [CN-1:0][RAILS-1:0] a_f,   // filtered data words
  output logic [RAILS-1:0]         c_f,   // filtered check word
  output logic [CN:0]              d      // completion of each filtered word
);

  logic [CN-1:0][RAILS-1:0] a_p;          // recomputed data words
  logic [RAILS-1:0]         c_p;          // recomputed check word

  // ---- check copy: running sum of all data words ----
  logic [CN-1:0][RAILS-1:0] csum;
  assign csum[0] = a[0];
  for (genvar m = 1; m < CN; m++) begin : g_csum
    onehot_adder #(.RAILS(RAILS)) u_add (
      .clk(clk), .rst_n(rst_n), .a(csum[m-1]), .b(a[m]), .s(csum[m]));
  end
  assign c_p = csum[CN-1];

  // ---- data copies: C minus the sum of the other data words ----
  for (genvar k = 0; k < CN; k++) begin : g_word
    logic [CN-2:0][RAILS-1:0] part;       // partial sums of the other words
    logic [RAILS-1:0]         neg;        // -(sum of the other words)
    assign part[0] = a[(k == 0) ? 1 : 0];
    for (genvar m = 1; m < CN - 1; m++) begin : g_part
      localparam int unsigned OTHER = (m < k) ? m : m + 1;
      onehot_adder #(.RAILS(RAILS)) u_add (
        .clk(clk), .rst_n(rst_n), .a(part[m-1]), .b(a[OTHER]), .s(part[m]));
    end
    for (genvar v = 0; v < RAILS; v++) begin : g_neg
      assign neg[(RAILS - v) % RAILS] = part[CN-2][v];
    end
    onehot_adder #(.RAILS(RAILS)) u_sub (
      .clk(clk), .rst_n(rst_n), .a(c), .b(neg), .s(a_p[k]));
  end

  // ---- error filters and completion detectors ----
  for (genvar k = 0; k < CN; k++) begin : g_ef
    error_filter #(.RAILS(RAILS)) u_ef (
      .clk(clk), .rst_n(rst_n), .a(a[k]), .a_p(a_p[k]), .en(en), .a_f(a_f[k]));
    completion_detector #(.RAILS(RAILS)) u_cd (.a(a_f[k]), .d(d[k]));
  end
  error_filter #(.RAILS(RAILS)) u_ef_c (
    .clk(clk), .rst_n(rst_n), .a(c), .a_p(c_p), .en(en), .a_f(c_f));
  completion_detector #(.RAILS(RAILS)) u_cd_c (.a(c_f), .d(d[CN]));

endmodule

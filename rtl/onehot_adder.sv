// onehot_adder: 1-of-n adder, the sum of two 1-of-n words modulo n.
//
// For every pair of rails (a_i, b_j) a 2-input C-element fires, and output
// rail s_k is the OR of the C-elements whose rails satisfy (i + j) mod n = k.
// For n = 2 this is four C-elements and two ORs, for n = 4 sixteen
// C-elements and four ORs, the structure given for the design. Because the
// gates are C-elements, the sum stays valid until both operands have
// returned to null, and it returns to null only then (4-phase, return to
// zero).
//
// Interface: a, b and s are 1-of-RAILS words (rail v high = value v, all low =
// null). Timing: s follows a and b one clock later (one C-element level).
module onehot_adder #(
  parameter int unsigned RAILS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RAILS-1:0] a,
  input  logic [RAILS-1:0] b,
  output logic [RAILS-1:0] s
);

  // pair[i][j] = C(a_i, b_j)
  logic [RAILS-1:0][RAILS-1:0] pair;

  for (genvar i = 0; i < RAILS; i++) begin : g_a
    for (genvar j = 0; j < RAILS; j++) begin : g_b
      c_element #(.NUM_IN(2)) u_c (
        .clk  (clk),
        .rst_n(rst_n),
        .in   ({a[i], b[j]}),
        .q    (pair[i][j])
      );
    end
  end

  always_comb begin
    s = '0;
    for (int unsigned i = 0; i < RAILS; i++)
      for (int unsigned j = 0; j < RAILS; j++)
        if (pair[i][j]) s[(i + j) % RAILS] = 1'b1;
  end

endmodule

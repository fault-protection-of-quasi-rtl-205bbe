// error_filter: C-element error filter (EF) of one 1-of-n word.
//
// Each rail of the received word `a` meets the same rail of the word `a_p`
// that the receiver recomputed from the other words of the group, together
// with the enable `en` (the acknowledge coming back from the next stage), in a
// 3-input C-element: a_f[k] = C(a[k], a_p[k], en). A transient fault that
// raises or drops a rail of only one of the two copies cannot change the
// output, because a C-element only moves when all its inputs agree. The
// C-element also makes the filter the storage of the QDI pipeline stage: it
// takes a new word only while `en` is high (next stage empty) and returns to
// null only while `en` is low (next stage has taken the word).
//
// Timing: a_f follows its inputs one clock later.
module error_filter #(
  parameter int unsigned RAILS = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [RAILS-1:0] a,     // word as received
  input  logic [RAILS-1:0] a_p,   // word recomputed from the rest of the group
  input  logic             en,    // acknowledge of the next stage, high = ready
  output logic [RAILS-1:0] a_f    // filtered word
);

  for (genvar k = 0; k < RAILS; k++) begin : g_rail
    c_element #(.NUM_IN(3)) u_c (
      .clk  (clk),
      .rst_n(rst_n),
      .in   ({a[k], a_p[k], en}),
      .q    (a_f[k])
    );
  end

endmodule

// ack_generator: ACK generator of a DIRC pipeline stage.
//
// Inputs are the completion signals d of every word of every group of the
// stage (CN data words plus one check word per group). Within each group the
// d signals are taken in pairs by 2-input C-elements, ack_k = C(d_k, d_k+1),
// closing the ring with C(d_last, d_0); for one group of CN = 2 these are the
// three C-elements ack0..ack2 of the design. A single d that glitches cannot
// move any of these C-elements on its own.
//
// The acks are then combined into iack, which is high when the stage is ready
// for new data. The pairwise C-elements follow the DIRC ACK generator as
// drawn; its last gate is drawn as a NAND. A NAND lets
// iack rise as soon as one pair of words has returned to null, while another
// word may still hold the previous value: a transient fault that delays the
// reset of one word then lets the next token meet a filter that is still
// full, which either merges two values in one word or deadlocks the stage
// (both seen in simulation). Here the last gate is therefore an inverting
// C-element: iack falls when every ack is high (NAND behaviour) and rises
// only when every ack is low. With no fault both gates give the same
// handshake. This gate is this design's own choice.
//
// Timing: iack falls two clocks after the last d rises and rises two clocks
// after the last d falls (pair C-element, then combining C-element).
module ack_generator #(
  parameter int unsigned GROUPS = 1,
  parameter int unsigned WORDS  = 3   // CN + 1 words per group
) (
  input  logic                         clk,
  input  logic                         rst_n,
  input  logic [GROUPS-1:0][WORDS-1:0] d,
  output logic                         iack
);

  logic [GROUPS-1:0][WORDS-1:0] ack;

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    for (genvar k = 0; k < WORDS; k++) begin : g_pair
      c_element #(.NUM_IN(2)) u_c (
        .clk  (clk),
        .rst_n(rst_n),
        .in   ({d[g][k], d[g][(k + 1) % WORDS]}),
        .q    (ack[g][k])
      );
    end
  end

  logic all_ack;

  c_element #(.NUM_IN(GROUPS * WORDS)) u_done (
    .clk  (clk),
    .rst_n(rst_n),
    .in   (ack),
    .q    (all_ack)
  );

  assign iack = ~all_ack;

endmodule

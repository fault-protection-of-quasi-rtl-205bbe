// dirc_stage: one stage of the DIRC-protected QDI pipeline.
//
// The N = GROUPS * CN data channels of the stage are split into GROUPS DIRC
// groups, each with its own check word and its own error corrector
// (dirc_group). One ACK generator collects the completion signals of all
// groups and produces iack for the previous stage.
//
// Handshake (4-phase, return to zero): the previous stage presents a code word
// on a/c while iack is high; the stage's filters take it once oack is high,
// after which iack falls; the previous stage then returns a/c to null, and
// the filters return to null once oack has fallen, after which iack rises.
// oack is the iack of the next stage (high = next stage ready).
//
// Timing in clocks of the C-element sampling clock: with oack high, a code
// word presented complete reaches the outputs 2 clocks later (adder level,
// then filter); iack falls 2 clocks after the last filtered word is complete
// and rises 2 clocks after the last one is null (ACK generator).
module dirc_stage #(
  parameter int unsigned RAILS  = dirc_pkg::DEF_RAILS,
  parameter int unsigned CN     = dirc_pkg::DEF_CN,
  parameter int unsigned GROUPS = dirc_pkg::DEF_GROUPS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [GROUPS-1:0][CN-1:0][RAILS-1:0] a,      // data words in
  input  logic [GROUPS-1:0][RAILS-1:0]         c,      // check words in
  input  logic                                 oack,   // ack from the next stage
  output logic [GROUPS-1:0][CN-1:0][RAILS-1:0] o_a,    // corrected data words
  output logic [GROUPS-1:0][RAILS-1:0]         o_c,    // corrected check words
  output logic                                 iack    // ack to the previous stage
);

  logic [GROUPS-1:0][CN:0] d;

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    dirc_group #(.RAILS(RAILS), .CN(CN)) u_group (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (a[g]),
      .c    (c[g]),
      .en   (oack),
      .a_f  (o_a[g]),
      .c_f  (o_c[g]),
      .d    (d[g])
    );

    // An output word never carries more than one value.
    for (genvar k = 0; k < CN; k++) begin : g_chk
      a_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(o_a[g][k]));
    end
    c_onehot: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(o_c[g]));
  end

  ack_generator #(.GROUPS(GROUPS), .WORDS(CN + 1)) u_ack (
    .clk  (clk),
    .rst_n(rst_n),
    .d    (d),
    .iack (iack)
  );

endmodule

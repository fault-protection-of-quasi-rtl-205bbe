// dirc_link: DIRC-protected asynchronous 1-of-n link (top level).
//
// A source hands N = GROUPS * CN 1-of-n data words to the sender, which adds
// one check word per group of CN words; the code word then crosses a pipeline
// of STAGES DIRC stages, each of which corrects transient faults on its input
// wires, and the receiver takes the corrected data (o_a) and check words (o_c)
// from the last stage. This is the link meant to join the routers of an
// asynchronous network-on-chip.
//
// Protocol (4-phase, return to zero, 1-of-n): the source drives a with one
// rail high per word while iack is high, and returns a to all-zero after iack
// falls; the next word may follow once iack is high again. The receiver
// holds oack high while it is ready, lowers it after taking a complete word
// from o_a/o_c, and raises it again once o_a/o_c are null.
// fault_a / fault_c flip rails on the link into each stage, for fault
// injection; tie them to zero in normal use. clk is the sampling clock of the
// C-elements and rst_n (active low) puts every C-element in the null state.
module dirc_link #(
  parameter int unsigned RAILS  = dirc_pkg::DEF_RAILS,
  parameter int unsigned CN     = dirc_pkg::DEF_CN,
  parameter int unsigned GROUPS = dirc_pkg::DEF_GROUPS,
  parameter int unsigned STAGES = dirc_pkg::DEF_STAGES
) (
  input  logic                                              clk,
  input  logic                                              rst_n,
  input  logic [GROUPS-1:0][CN-1:0][RAILS-1:0]              a,
  output logic                                              iack,
  input  logic [STAGES-1:0][GROUPS-1:0][CN-1:0][RAILS-1:0]  fault_a,
  input  logic [STAGES-1:0][GROUPS-1:0][RAILS-1:0]          fault_c,
  output logic [GROUPS-1:0][CN-1:0][RAILS-1:0]              o_a,
  output logic [GROUPS-1:0][RAILS-1:0]                      o_c,
  input  logic                                              oack
);

  logic [GROUPS-1:0][RAILS-1:0] c;

  dirc_sender #(.RAILS(RAILS), .CN(CN), .GROUPS(GROUPS)) u_sender (
    .clk  (clk),
    .rst_n(rst_n),
    .a    (a),
    .c    (c)
  );

  dirc_pipeline #(.RAILS(RAILS), .CN(CN), .GROUPS(GROUPS), .STAGES(STAGES)) u_pipe (
    .clk    (clk),
    .rst_n  (rst_n),
    .a      (a),
    .c      (c),
    .fault_a(fault_a),
    .fault_c(fault_c),
    .oack   (oack),
    .o_a    (o_a),
    .o_c    (o_c),
    .iack   (iack)
  );

endmodule

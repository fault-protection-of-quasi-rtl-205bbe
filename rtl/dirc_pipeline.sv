// dirc_pipeline: QDI pipeline of STAGES DIRC stages.
//
// Stage s passes its corrected words to stage s + 1 and takes its enable from
// the iack of stage s + 1; the last stage takes oack from the receiver, the
// first stage's iack goes back to the sender. Because each stage re-derives
// every word from the rest of its group, a transient fault on the link into a
// stage is removed there and does not travel further, and the last stage
// plays the part of the receiver's error corrector.
//
// fault_a / fault_c model transient faults on the wires into each stage: a
// high bit flips that rail (XOR). They exist for fault-injection tests and
// are tied to zero in normal use.
module dirc_pipeline #(
  parameter int unsigned RAILS  = dirc_pkg::DEF_RAILS,
  parameter int unsigned CN     = dirc_pkg::DEF_CN,
  parameter int unsigned GROUPS = dirc_pkg::DEF_GROUPS,
  parameter int unsigned STAGES = dirc_pkg::DEF_STAGES
) (
  input  logic                                              clk,
  input  logic                                              rst_n,
  input  logic [GROUPS-1:0][CN-1:0][RAILS-1:0]              a,
  input  logic [GROUPS-1:0][RAILS-1:0]                      c,
  input  logic [STAGES-1:0][GROUPS-1:0][CN-1:0][RAILS-1:0]  fault_a,
  input  logic [STAGES-1:0][GROUPS-1:0][RAILS-1:0]          fault_c,
  input  logic                                              oack,
  output logic [GROUPS-1:0][CN-1:0][RAILS-1:0]              o_a,
  output logic [GROUPS-1:0][RAILS-1:0]                      o_c,
  output logic                                              iack
);

  // link s feeds stage s; link STAGES is the pipeline output
  logic [STAGES:0][GROUPS-1:0][CN-1:0][RAILS-1:0] link_a;
  logic [STAGES:0][GROUPS-1:0][RAILS-1:0]         link_c;
  logic [STAGES:0]                                ack;   // ack[s] = iack of stage s

  assign link_a[0] = a;
  assign link_c[0] = c;
  assign ack[STAGES] = oack;

  for (genvar s = 0; s < STAGES; s++) begin : g_stage
    dirc_stage #(.RAILS(RAILS), .CN(CN), .GROUPS(GROUPS)) u_stage (
      .clk  (clk),
      .rst_n(rst_n),
      .a    (link_a[s] ^ fault_a[s]),
      .c    (link_c[s] ^ fault_c[s]),
      .oack (ack[s+1]),
      .o_a  (link_a[s+1]),
      .o_c  (link_c[s+1]),
      .iack (ack[s])
    );
  end

  assign o_a  = link_a[STAGES];
  assign o_c  = link_c[STAGES];
  assign iack = ack[0];

endmodule

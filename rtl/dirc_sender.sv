// dirc_sender: check generator on the sending side of a DIRC link.
//
// The DIRC code is systematic: the data words travel unchanged and every
// group of CN data words gets one extra 1-of-n check word
// C = A_0 + A_1 + ... + A_CN-1 (sum modulo n). The check word is formed by a
// chain of CN - 1 1-of-n adders, so it also follows the 4-phase protocol: it
// becomes valid after all data words of its group are valid and returns to
// null after all of them are null. Example for 1-of-4: A_0 = 0010 (1),
// A_1 = 1000 (3) give C = 0001 (0).
//
// Timing: C follows the data words by CN - 1 clocks. The sender has no
// acknowledge of its own; the source uses the iack of the first stage.
module dirc_sender #(
  parameter int unsigned RAILS  = dirc_pkg::DEF_RAILS,
  parameter int unsigned CN     = dirc_pkg::DEF_CN,
  parameter int unsigned GROUPS = dirc_pkg::DEF_GROUPS
) (
  input  logic                                 clk,
  input  logic                                 rst_n,
  input  logic [GROUPS-1:0][CN-1:0][RAILS-1:0] a,      // data words from the source
  output logic [GROUPS-1:0][RAILS-1:0]         c       // check word of each group
);

  for (genvar g = 0; g < GROUPS; g++) begin : g_grp
    logic [CN-1:0][RAILS-1:0] sum;
    assign sum[0] = a[g][0];
    for (genvar m = 1; m < CN; m++) begin : g_add
      onehot_adder #(.RAILS(RAILS)) u_add (
        .clk(clk), .rst_n(rst_n), .a(sum[m-1]), .b(a[g][m]), .s(sum[m]));
    end
    assign c[g] = sum[CN-1];
  end

endmodule

// completion_detector: completion detector (CD) of one 1-of-n word.
//
// d is the OR of the word's rails: high once the word carries a value, low
// once it has returned to null. Purely combinational.
module completion_detector #(
  parameter int unsigned RAILS = 4
) (
  input  logic [RAILS-1:0] a,
  output logic             d
);

  assign d = |a;

endmodule

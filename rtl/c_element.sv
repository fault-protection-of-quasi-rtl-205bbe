// c_element: Muller C-element with NUM_IN inputs.
//
// The output rises when every input is high, falls when every input is low,
// and otherwise keeps its value. This is the state-holding gate from which the
// 1-of-n adders, the error filters and the ACK generator are built.
//
// Realisation: the asynchronous gate is modelled as a state holder that
// samples its inputs on a free-running clock `clk`, so that the whole
// pipeline can be simulated with a cycle-based simulator and mapped to
// ordinary flip-flops. Every C-element thus adds one clock of delay. The
// pipeline built from it is quasi-delay-insensitive, so its function does not
// depend on that delay; only the latency in clocks is a property of this
// realisation. `rst_n` (asynchronous, active low) clears the output, which
// is the null state of the 4-phase protocol.
module c_element #(
  parameter int unsigned NUM_IN = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic [NUM_IN-1:0] in,
  output logic              q
);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)      q <= 1'b0;
    else if (&in)    q <= 1'b1;
    else if (!(|in)) q <= 1'b0;
  end

endmodule

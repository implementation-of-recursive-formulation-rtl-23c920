// mux2: dual-input multiplexer of the PASTA bit stage.
//
// Passes in0 when sel is 0 and in1 when sel is 1. In the adder, in0 carries
// an operand bit and in1 the feedback path (the stage's own sum, or the carry
// of the bit below), and sel is the SEL signal of the controller: 0 in the
// starting phase, 1 during the recursion. Purely combinational, no timing of
// its own. The width W (default 1, one bit per path as in the design) is a
// parameter so that the same block can switch a whole bus.
module mux2 #(
  parameter int unsigned W = 1
) (
  input  logic         sel,  // 0: in0, 1: in1
  input  logic [W-1:0] in0,  // operand path (starting phase)
  input  logic [W-1:0] in1,  // feedback path (iterative phase)
  output logic [W-1:0] y
);

  always_comb y = sel ? in1 : in0;

endmodule

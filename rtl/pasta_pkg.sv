// pasta_pkg: types shared by the parallel self-timed adder (PASTA) blocks.
//
// The adder runs in two phases. In the starting phase the operand
// multiplexers pass the operands a and b to the half adders (SEL = 0); in the
// iterative phase they pass each bit's own sum and the carry of the bit below
// back into the half adders (SEL = 1), until no carry is left anywhere. The
// controller state below names those phases. Its encoding is this design's
// own choice.
package pasta_pkg;

  // Controller phase. PH_START: waiting for a request, multiplexers select
  // the operands. PH_ITER: recursion running, multiplexers select the
  // feedback paths.
  typedef enum logic {
    PH_START = 1'b0,
    PH_ITER  = 1'b1
  } phase_e;

  // State of one bit stage, the pair (C[i+1], S[i]) used by the state
  // diagrams of the design. The pair (1,1) cannot occur because each stage
  // is a half adder.
  typedef struct packed {
    logic c;  // carry out of the stage, C[i+1]
    logic s;  // sum of the stage, S[i]
  } bit_state_t;

endpackage

// completion_detect: termination test of the PASTA recursion.
//
// The recursion ends at the step k where every carry is zero:
//   C[n] + C[n-1] + ... + C[1] = 0                                 (eq. 4)
// This block is that N-input NOR over the carry vector. carry[i-1] holds
// C[i], so carry[N-1] is C[N], the carry out of the top bit. The output is
// combinational. The document gives the condition; building it as one flat
// reduction is this design's choice.
module completion_detect #(
  parameter int unsigned N = 32
) (
  input  logic [N-1:0] carry,     // C[N:1]
  output logic         all_zero   // 1 when no carry is left
);

  always_comb all_zero = ~|carry;

endmodule

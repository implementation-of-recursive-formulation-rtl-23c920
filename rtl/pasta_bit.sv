// pasta_bit: one bit stage of the parallel self-timed adder.
//
// A stage is two dual-input multiplexers followed by a half adder, as in the
// design's block diagram. With sel = 0 (starting phase) the multiplexers pass
// the operand bits a and b, so the stage computes
//   S[i] = a[i] ^ b[i],  C[i+1] = a[i] & b[i]                      (eq. 1)
// With sel = 1 (iterative phase) they pass the stage's own previous sum
// s_fb and the previous carry from the bit below c_fb, so the stage computes
//   S[i] = S_prev[i] ^ C_prev[i],  C[i+1] = S_prev[i] & C_prev[i]  (eq. 2, 3)
// The stage is combinational. In this implementation the previous values
// are held in registers of the enclosing adder, so each clock cycle is one
// step of the recursion; the document's stage feeds back without a clock.
module pasta_bit (
  input  logic sel,     // SEL: 0 operands, 1 feedback
  input  logic a,       // operand bit a[i]
  input  logic b,       // operand bit b[i]
  input  logic s_fb,    // previous sum of this stage, S[i]
  input  logic c_fb,    // previous carry into this stage, C[i]
  output logic s,       // new sum S[i]
  output logic c_out    // new carry to the next stage, C[i+1]
);

  logic x, y;

  mux2 #(.W(1)) u_mux_a (.sel(sel), .in0(a), .in1(s_fb), .y(x));
  mux2 #(.W(1)) u_mux_b (.sel(sel), .in0(b), .in1(c_fb), .y(y));

  half_adder u_ha (.x(x), .y(y), .s(s), .c(c_out));

endmodule

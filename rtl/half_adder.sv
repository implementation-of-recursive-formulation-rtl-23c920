// half_adder: the one-bit adder element of PASTA.
//
// s = x XOR y, c = x AND y. The design uses half adders instead of full
// adders: each stage adds only two bits at a time (either a[i] and b[i], or
// its previous sum and the incoming carry), which is why a stage can never
// be in the state (c, s) = (1, 1). Purely combinational.
module half_adder (
  input  logic x,
  input  logic y,
  output logic s,  // sum bit
  output logic c   // carry bit
);

  always_comb begin
    s = x ^ y;
    c = x & y;
  end

endmodule

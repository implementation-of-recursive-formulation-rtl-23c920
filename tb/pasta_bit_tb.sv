// pasta_bit_tb: exhaustive self-checking test of one PASTA bit stage.
// For all 32 input combinations it checks the starting step (sel = 0:
// sum and carry of a + b) and the iterative step (sel = 1: sum and carry of
// previous sum + incoming carry), using integer additions as reference.
module pasta_bit_tb;
  int checks = 0, failures = 0;
  logic sel, a, b, s_fb, c_fb, s, c_out;

  pasta_bit dut (.sel(sel), .a(a), .b(b), .s_fb(s_fb), .c_fb(c_fb),
                 .s(s), .c_out(c_out));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 32; v++) begin
      int total;
      {sel, a, b, s_fb, c_fb} = 5'(v);
      #1;
      total = sel ? int'(s_fb) + int'(c_fb) : int'(a) + int'(b);
      checks++;
      if ({c_out, s} !== 2'(total)) begin
        failures++;
        $display("FAIL sel=%0b a=%0b b=%0b s_fb=%0b c_fb=%0b got c=%0b s=%0b",
                 sel, a, b, s_fb, c_fb, c_out, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

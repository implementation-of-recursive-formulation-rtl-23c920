// half_adder_tb: exhaustive self-checking test of the half adder.
// Expected sum and carry come from the integer sum x + y.
module half_adder_tb;
  int checks = 0, failures = 0;
  logic x, y, s, c;

  half_adder dut (.x(x), .y(y), .s(s), .c(c));

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 4; v++) begin
      int total;
      {x, y} = 2'(v);
      #1;
      total = int'(x) + int'(y);
      checks++;
      if ({c, s} !== 2'(total)) begin
        failures++;
        $display("FAIL x=%0b y=%0b got c=%0b s=%0b", x, y, c, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// mux2_tb: self-checking test of the dual-input multiplexer.
// Exhaustive for the default 1-bit width, random for an 8-bit instance.
// The expected value is worked out from sel directly.
module mux2_tb;
  int checks = 0, failures = 0;

  logic       sel1, i0_1, i1_1, y1;
  logic       sel8;
  logic [7:0] i0_8, i1_8, y8;

  mux2          u1 (.sel(sel1), .in0(i0_1), .in1(i1_1), .y(y1));
  mux2 #(.W(8)) u8 (.sel(sel8), .in0(i0_8), .in1(i1_8), .y(y8));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int v = 0; v < 8; v++) begin
      {sel1, i1_1, i0_1} = 3'(v);
      #1;
      checks++;
      if (y1 !== (v[2] ? v[1] : v[0])) begin
        failures++;
        $display("FAIL W=1 sel=%0b in0=%0b in1=%0b y=%0b", sel1, i0_1, i1_1, y1);
      end
    end
    for (int n = 0; n < 200; n++) begin
      sel8 = 1'($urandom);
      i0_8 = 8'($urandom);
      i1_8 = 8'($urandom);
      #1;
      checks++;
      if (y8 !== (sel8 ? i1_8 : i0_8)) begin
        failures++;
        $display("FAIL W=8 sel=%0b in0=%h in1=%h y=%h", sel8, i0_8, i1_8, y8);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

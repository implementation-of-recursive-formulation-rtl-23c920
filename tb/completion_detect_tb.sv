// completion_detect_tb: self-checking test of the all-carries-zero detector
// at its default width (32). Checks the all-zero vector, every one-hot
// vector, the all-ones vector and random vectors against a bit-by-bit loop.
module completion_detect_tb;
  localparam int N = 32;
  int checks = 0, failures = 0;
  logic [N-1:0] carry;
  logic         all_zero;

  completion_detect dut (.carry(carry), .all_zero(all_zero));

  task automatic check();
    logic any;
    #1;
    any = 1'b0;
    for (int i = 0; i < N; i++) any = any | carry[i];
    checks++;
    if (all_zero !== !any) begin
      failures++;
      $display("FAIL carry=%h all_zero=%0b", carry, all_zero);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    carry = '0;  check();
    carry = '1;  check();
    for (int i = 0; i < N; i++) begin
      carry = '0;
      carry[i] = 1'b1;
      check();
    end
    for (int n = 0; n < 200; n++) begin
      carry = N'($urandom) & N'($urandom) & N'($urandom);
      check();
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

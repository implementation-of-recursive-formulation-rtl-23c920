// pasta_adder_tb: end-to-end test of the PASTA adder at its default width
// (32 bits, no parameter overrides). 4000 additions through the handshake,
// random and directed (no carries, 32-step carry chain, carry out, request
// while busy, back-to-back requests), each checked for sum, carry out and a
// latency of exactly 1 + k cycles; see pasta_adder_driver.
module pasta_adder_tb;
  localparam int W = 32;
  logic clk = 1'b0;
  logic rst_n, req, ready, done, cout;
  logic [W-1:0] a, b, sum;
  int checks, failures;
  logic finished;

  always #5 clk = ~clk;

  pasta_adder dut (.clk(clk), .rst_n(rst_n), .req(req), .a(a), .b(b),
                   .ready(ready), .done(done), .sum(sum), .cout(cout));

  pasta_adder_driver #(.W(W), .NTRANS(4000)) drv (
    .clk(clk), .rst_n(rst_n), .req(req), .a(a), .b(b), .ready(ready),
    .done(done), .sum(sum), .cout(cout), .checks(checks),
    .failures(failures), .finished(finished));

  initial begin
    repeat (400000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures + 1);
    $finish;
  end

  initial begin
    #1;
    wait (finished === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

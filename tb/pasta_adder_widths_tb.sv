// pasta_adder_widths_tb: the 8-bit and 16-bit configurations of the PASTA
// adder side by side. The 8-bit adder is checked on all 65536 operand pairs,
// the 16-bit one on 20000 random and directed pairs; each addition is
// checked for sum, carry out and a latency of 1 + k cycles (see
// pasta_adder_driver).
module pasta_adder_widths_tb;
  logic clk = 1'b0;
  always #5 clk = ~clk;

  logic        rst8, req8, rdy8, done8, cout8, fin8;
  logic [7:0]  a8, b8, sum8;
  int          chk8, fail8;
  logic        rst16, req16, rdy16, done16, cout16, fin16;
  logic [15:0] a16, b16, sum16;
  int          chk16, fail16;

  pasta_adder #(.N(8)) u8 (.clk(clk), .rst_n(rst8), .req(req8), .a(a8), .b(b8),
    .ready(rdy8), .done(done8), .sum(sum8), .cout(cout8));
  pasta_adder_driver #(.W(8), .NTRANS(65536), .EXHAUSTIVE(1'b1)) d8 (
    .clk(clk), .rst_n(rst8), .req(req8), .a(a8), .b(b8), .ready(rdy8),
    .done(done8), .sum(sum8), .cout(cout8), .checks(chk8), .failures(fail8),
    .finished(fin8));

  pasta_adder #(.N(16)) u16 (.clk(clk), .rst_n(rst16), .req(req16), .a(a16), .b(b16),
    .ready(rdy16), .done(done16), .sum(sum16), .cout(cout16));
  pasta_adder_driver #(.W(16), .NTRANS(20000)) d16 (
    .clk(clk), .rst_n(rst16), .req(req16), .a(a16), .b(b16), .ready(rdy16),
    .done(done16), .sum(sum16), .cout(cout16), .checks(chk16), .failures(fail16),
    .finished(fin16));

  initial begin
    repeat (2000000) @(posedge clk);
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", chk8 + chk16, fail8 + fail16 + 1);
    $finish;
  end

  initial begin
    #1;
    wait (fin8 === 1'b1 && fin16 === 1'b1);
    $display("TB_RESULT checks=%0d failures=%0d", chk8 + chk16, fail8 + fail16);
    $finish;
  end
endmodule

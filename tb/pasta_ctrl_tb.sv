// pasta_ctrl_tb: self-checking test of the PASTA controller.
// Random req and all_zero are applied every cycle; a two-state reference
// model (idle / iterating) predicts sel, load, ready and done, which are
// compared in the middle of each cycle. It also checks that reset leaves
// the controller idle and counts both phase changes.
module pasta_ctrl_tb;
  int checks = 0, failures = 0;
  int starts = 0, finishes = 0;
  logic clk = 1'b0, rst_n = 1'b0;
  logic req = 1'b0, all_zero = 1'b0;
  logic sel, load, ready, done;
  logic busy_ref;  // reference: 1 while iterating

  pasta_ctrl dut (.clk(clk), .rst_n(rst_n), .req(req), .all_zero(all_zero),
                  .sel(sel), .load(load), .ready(ready), .done(done));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_out(logic e_sel, logic e_load, logic e_ready, logic e_done);
    checks++;
    if ({sel, load, ready, done} !== {e_sel, e_load, e_ready, e_done}) begin
      failures++;
      $display("FAIL t=%0t req=%0b all_zero=%0b got sel=%0b load=%0b ready=%0b done=%0b exp %0b%0b%0b%0b",
               $time, req, all_zero, sel, load, ready, done, e_sel, e_load, e_ready, e_done);
    end
  endtask

  initial begin
    busy_ref = 1'b0;
    repeat (2) @(posedge clk);
    #1;
    expect_out(1'b0, 1'b0, 1'b1, 1'b0);   // idle in reset, req low
    rst_n = 1'b1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      req      = ($urandom % 3) == 0;
      all_zero = ($urandom % 4) == 0;
      #1;
      if (!busy_ref) expect_out(1'b0, req, 1'b1, 1'b0);
      else           expect_out(1'b1, !all_zero, 1'b0, all_zero);
      @(posedge clk);
      if (!busy_ref && req)           begin busy_ref = 1'b1; starts++;   end
      else if (busy_ref && all_zero)  begin busy_ref = 1'b0; finishes++; end
    end
    checks++;
    if (starts == 0 || finishes == 0) begin
      failures++;
      $display("FAIL no phase change seen: starts=%0d finishes=%0d", starts, finishes);
    end
    $display("starts=%0d finishes=%0d", starts, finishes);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// pasta_adder_driver: stimulus and checker for one pasta_adder instance,
// shared by the adder testbenches.
//
// It runs NTRANS additions through the adder's req/ready/done handshake and,
// for each, compares sum and cout with the integer sum a + b and the latency
// with 1 + k cycles, where k is the step count of an independent model of the
// recursion (bitwise: S ^= C, C = (S & C) << 1, until C[W:1] is 0). It also
// checks k <= W, that done lasts one cycle and that the result stays put
// until the next request.
//
// Operands mix random values with cases that force each mechanism: no carry
// at all (k = 0), the longest carry chain (k = W), a carry out, a request
// while the adder is busy (must be ignored), and a request in the cycle
// right after done. With EXHAUSTIVE = 1 (for small W) the operands sweep all
// 2**(2W) pairs instead. Each mechanism is counted; one that never occurred
// counts as a failure.
module pasta_adder_driver #(
  parameter int unsigned W          = 8,
  parameter int unsigned NTRANS     = 1000,
  parameter bit          EXHAUSTIVE = 1'b0
) (
  input  logic         clk,
  output logic         rst_n,
  output logic         req,
  output logic [W-1:0] a,
  output logic [W-1:0] b,
  input  logic         ready,
  input  logic         done,
  input  logic [W-1:0] sum,
  input  logic         cout,
  output int           checks,
  output int           failures,
  output logic         finished
);

  int n_zero_step, n_iterate, n_full_chain, n_carry_out, n_ignored_req,
      n_back_to_back, max_k;

  function automatic int ref_steps(logic [W-1:0] x, logic [W-1:0] y);
    logic [W-1:0] s;
    logic [W:0]   c;   // c[i] = carry into bit i, c[W] = carry out
    int k;
    s = x ^ y;
    c = {x & y, 1'b0};
    k = 0;
    while (c[W:1] != '0) begin
      logic [W-1:0] s_old;
      s_old = s;
      s = s_old ^ c[W-1:0];
      c = {s_old & c[W-1:0], 1'b0};
      k++;
    end
    return k;
  endfunction

  task automatic check(logic cond, string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL W=%0d %s", W, what);
    end
  endtask

  task automatic pick(int n, output logic [W-1:0] x, output logic [W-1:0] y);
    if (EXHAUSTIVE) begin
      {x, y} = (2*W)'(n);
    end else begin
      x = W'({$urandom, $urandom});
      y = W'({$urandom, $urandom});
      unique case (n % 8)
        0: y = ~x & W'({$urandom, $urandom});         // no carry: k = 0
        1: begin x = '1; y = W'(1); end                // longest chain: k = W
        2: begin x = '1; y[0] = 1'b1; end             // carry out
        3: y = x;                                       // doubling
        default: ;                                      // random
      endcase
    end
  endtask

  initial begin
    logic [W-1:0] x, y;
    logic [W:0]   full;
    int k, lat, gap;
    logic poked;
    checks = 0; failures = 0; finished = 1'b0;
    n_zero_step = 0; n_iterate = 0; n_full_chain = 0; n_carry_out = 0;
    n_ignored_req = 0; n_back_to_back = 0; max_k = 0;
    rst_n = 1'b0; req = 1'b0; a = '0; b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    @(negedge clk);
    check(ready === 1'b1 && done === 1'b0, "not idle after reset");
    gap = 1;
    for (int n = 0; n < NTRANS; n++) begin
      pick(n, x, y);
      full = {1'b0, x} + {1'b0, y};
      k = ref_steps(x, y);
      if (k > max_k) max_k = k;
      check(k <= W, $sformatf("model needs %0d > W steps", k));
      // request
      check(ready === 1'b1, "ready low before request");
      if (gap == 0) n_back_to_back++;
      req = 1'b1; a = x; b = y;
      @(negedge clk);
      // operands are free to change once taken
      req = 1'b0; a = W'({$urandom, $urandom}); b = W'({$urandom, $urandom});
      lat = 1;
      poked = 1'b0;
      while (done !== 1'b1 && lat < 4 * W + 8) begin
        // a request while busy must be ignored
        if (!poked && ($urandom % 2 == 0)) begin
          check(ready === 1'b0, "ready high while busy");
          req = 1'b1;
          poked = 1'b1;
          n_ignored_req++;
        end
        @(negedge clk);
        req = 1'b0;
        lat++;
      end
      check(done === 1'b1, $sformatf("no done for %h + %h", x, y));
      check(lat == 1 + k, $sformatf("%h + %h: latency %0d, expected %0d", x, y, lat, 1 + k));
      check(sum === full[W-1:0] && cout === full[W],
            $sformatf("%h + %h = %h%h, got %b %h", x, y, full[W], full[W-1:0], cout, sum));
      if (k == 0) n_zero_step++; else n_iterate++;
      if (k == W) n_full_chain++;
      if (full[W]) n_carry_out++;
      // idle for 0..2 cycles; result and ready must hold
      gap = (n % 5 == 4) ? 1 + $urandom % 2 : 0;
      @(negedge clk);
      check(done === 1'b0 && ready === 1'b1, "done longer than one cycle");
      for (int g = 0; g < gap; g++) begin
        @(negedge clk);
      end
      check(sum === full[W-1:0] && cout === full[W], "result not held");
    end
    check(n_zero_step   > 0, "mechanism never seen: completion without carries");
    check(n_iterate     > 0, "mechanism never seen: recursion step");
    check(n_full_chain  > 0, "mechanism never seen: carry chain of W steps");
    check(n_carry_out   > 0, "mechanism never seen: carry out");
    check(n_ignored_req > 0, "mechanism never seen: request while busy");
    check(n_back_to_back > 0, "mechanism never seen: back-to-back requests");
    $display("W=%0d additions=%0d zero_step=%0d iterate=%0d full_chain=%0d carry_out=%0d ignored_req=%0d back_to_back=%0d max_k=%0d",
             W, NTRANS, n_zero_step, n_iterate, n_full_chain, n_carry_out,
             n_ignored_req, n_back_to_back, max_k);
    finished = 1'b1;
  end
endmodule

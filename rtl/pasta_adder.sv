// pasta_adder: N-bit parallel self-timed adder (PASTA), recursive form.
//
// Idea: instead of rippling a carry through full adders, every bit is a half
// adder whose inputs can be switched from the operands to feedback. The
// first step adds a and b bitwise without carries (eq. 1). Every further
// step adds, in all bits at once, each bit's previous sum to the carry the
// bit below produced in the previous step (eq. 2, 3). A carry is either
// absorbed by a bit (sum 0 -> 1) or moves one place up, so the recursion
// ends after k <= N steps, when no carry is left (eq. 4). k is the length of
// the longest carry chain of the operands, so the latency depends on the
// data: random operands finish after few steps.
//
// Structure: N pasta_bit stages (two multiplexers and a half adder each), a
// completion detector over the carries C[N:1], and the controller that makes
// SEL. The stages are combinational; their sums and carries are held in
// registers, so in this clocked implementation each cycle is one recursion
// step. The carry out of the top stage, C[N], has no stage above it; it is
// collected in a sticky cout register. There is no carry in (C[0] = 0).
//
// Interface and timing (see pasta_ctrl): while ready = 1, a cycle with
// req = 1 takes a and b. done is 1 for one cycle, t + 1 + k cycles after
// the request in cycle t; sum and cout are valid from then until the next
// request is taken.
//
// The recursion, the stage structure and the widths 8, 16 and 32 follow the
// document. The register placement, the synchronous handshake, the sticky
// carry out and the missing carry in are this design's choices.
module pasta_adder
  import pasta_pkg::*;
#(
  parameter int unsigned N = 32   // operand width (>= 2); 8, 16 and 32 are evaluated
) (
  input  logic         clk,
  input  logic         rst_n,  // asynchronous, active low
  input  logic         req,    // start an addition of a and b
  input  logic [N-1:0] a,
  input  logic [N-1:0] b,
  output logic         ready,  // idle, req is accepted
  output logic         done,   // one-cycle completion pulse
  output logic [N-1:0] sum,    // a + b modulo 2**N, valid from done on
  output logic         cout    // carry out of bit N-1, valid from done on
);

  logic         sel, load, all_zero;
  logic [N-1:0] s_q, c_q;      // S[N-1:0] and C[N:1] of the last step
  logic [N-1:0] s_d, c_d;      // stage outputs for the next step
  logic [N-1:0] c_in;          // C[N-1:0] fed to the stages
  logic         cout_q;

  // Carry into each stage: C[0] is 0, C[i] comes from stage i-1.
  assign c_in = {c_q[N-2:0], 1'b0};

  for (genvar i = 0; i < N; i++) begin : g_bit
    pasta_bit u_bit (
      .sel  (sel),
      .a    (a[i]),
      .b    (b[i]),
      .s_fb (s_q[i]),
      .c_fb (c_in[i]),
      .s    (s_d[i]),
      .c_out(c_d[i])
    );
  end

  completion_detect #(.N(N)) u_done (.carry(c_q), .all_zero(all_zero));

  pasta_ctrl u_ctrl (
    .clk     (clk),
    .rst_n   (rst_n),
    .req     (req),
    .all_zero(all_zero),
    .sel     (sel),
    .load    (load),
    .ready   (ready),
    .done    (done)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      s_q    <= '0;
      c_q    <= '0;
      cout_q <= 1'b0;
    end else if (load) begin
      s_q    <= s_d;
      c_q    <= c_d;
      // Starting step clears the carry out; later steps keep any carry that
      // left the top stage.
      cout_q <= (sel & cout_q) | c_d[N-1];
    end
  end

  assign sum  = s_q;
  assign cout = cout_q;

  // A half adder stage never holds (C[i+1], S[i]) = (1, 1).
  a_no_11 : assert property (@(posedge clk) disable iff (!rst_n)
      (s_q & c_q) == '0);

endmodule

// pasta_ctrl: request handshake and SEL generation for the PASTA adder.
//
// The request of the handshake is the 0-to-1 transition of SEL: the adder
// first selects the operands (SEL = 0), then switches every stage's
// multiplexers to the feedback paths (SEL = 1) and stays there until the
// completion detector reports that all carries are zero.
//
// This implementation is clocked, one recursion step per cycle, and the
// request/acknowledge pair is a synchronous req/ready/done protocol, which
// is this design's own choice:
//   PH_START  sel = 0, ready = 1. A cycle with req = 1 loads the starting
//             values into the state registers (load = 1) and moves to PH_ITER.
//             req while ready = 0 is ignored.
//   PH_ITER   sel = 1. While carries remain, every cycle is one recursion
//             step (load = 1). In the first cycle in which all_zero is 1,
//             done is 1 for that cycle, nothing is loaded, and the
//             controller returns to PH_START.
// So a request in cycle t is acknowledged by done in cycle t + 1 + k, where k
// is the number of recursion steps (0 <= k <= N).
module pasta_ctrl
  import pasta_pkg::*;
(
  input  logic clk,
  input  logic rst_n,     // asynchronous, active low
  input  logic req,       // start an addition (sampled when ready = 1)
  input  logic all_zero,  // completion detector: no carry left
  output logic sel,       // SEL to all bit stages
  output logic load,      // state registers take the stages' outputs
  output logic ready,     // idle, a request is accepted
  output logic done       // one-cycle acknowledge, sum and carry out valid
);

  phase_e phase_q, phase_d;

  always_comb begin
    phase_d = phase_q;
    sel     = 1'b0;
    load    = 1'b0;
    ready   = 1'b0;
    done    = 1'b0;
    unique case (phase_q)
      PH_START: begin
        ready = 1'b1;
        if (req) begin
          load    = 1'b1;
          phase_d = PH_ITER;
        end
      end
      PH_ITER: begin
        sel = 1'b1;
        if (all_zero) begin
          done    = 1'b1;
          phase_d = PH_START;
        end else begin
          load = 1'b1;
        end
      end
      default: phase_d = PH_START;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) phase_q <= PH_START;
    else        phase_q <= phase_d;
  end

  // SEL only rises from a request and falls only on completion.
  a_sel_rise : assert property (@(posedge clk) disable iff (!rst_n)
      (phase_q == PH_START && phase_d == PH_ITER) |-> req);
  a_sel_fall : assert property (@(posedge clk) disable iff (!rst_n)
      (phase_q == PH_ITER && phase_d == PH_START) |-> all_zero);

endmodule

# PASTA: a recursive parallel self-timed adder

A ripple-carry adder passes one carry through a chain of full adders, so it
always waits for the longest possible chain. PASTA (parallel self-timed
adder) instead gives every bit a **half adder** whose inputs can be switched
between the operands and feedback. All bits work in parallel, and the
addition repeats until no carry is left anywhere. How long it takes depends
on the data: it is the length of the longest carry chain the two operands
actually produce. For random operands that is short, and it is never more
than N steps.

This repository holds a synthesizable SystemVerilog version of the adder. It
is parameterised by width: 32 bits by default, with 8 and 16 bits tested as
well. In this version each recursion step takes one clock cycle, and a small
controller provides the request/acknowledge handshake.

## The recursion

Write `S[i]^j` and `C[i+1]^j` for the sum bit and the outgoing carry of bit
`i` after step `j`. The first step adds the operands bitwise and ignores
carries:

    S[i]^0   = a[i] XOR b[i]
    C[i+1]^0 = a[i] AND b[i]

Every later step adds, in each bit at once, the bit's previous sum to the
carry that the bit below produced in the previous step:

    S[i]^j   = S[i]^(j-1) XOR C[i]^(j-1)
    C[i+1]^j = S[i]^(j-1) AND C[i]^(j-1)

The recursion stops at the first step `k` where every carry is zero:

    C[N]^k = C[N-1]^k = ... = C[1]^k = 0

`S^k` is then `a + b`. Here is why it ends. Take the pair
`(C[i+1], S[i])` as the state of a bit. A half adder never produces
`(1, 1)`. So a bit that emits a carry has a sum of 0. In the next step its
own carry is cleared. The carry it sent up either lands on a 0 sum (it is
absorbed and the sum becomes 1) or on a 1 sum (the carry moves up one more
place). Each carry therefore moves up by one place per step, or disappears.
This gives `k <= N`, and `k = 0` when `a AND b` is zero.

Example, 4 bits, `a = 0111`, `b = 0001` (C is written as `C[4:1]`):

| step | S    | C[4:1] |
|------|------|--------|
| 0    | 0110 | 0001   |
| 1    | 0100 | 0010   |
| 2    | 0000 | 0100   |
| 3    | 1000 | 0000   |

The recursion stops after `k = 3` steps with sum `1000`.

The carry out of the top bit, `C[N]`, has no bit above it. If it stayed in
the termination test it would never clear. So each time it is produced it is
moved into a separate, sticky `cout` register. There is no carry in, so
`C[0]` is 0 in every step.

## Structure

```
pasta_adder (top, parameter N)
 ├─ pasta_bit  x N      one stage: two mux2 + one half_adder
 │   ├─ mux2  (a side)  SEL=0: a[i]     SEL=1: S[i] (own previous sum)
 │   ├─ mux2  (b side)  SEL=0: b[i]     SEL=1: C[i] (carry from bit i-1)
 │   └─ half_adder      S = x XOR y, C[i+1] = x AND y
 ├─ completion_detect   all_zero = NOR of C[N:1]
 ├─ pasta_ctrl          SEL / load / ready / done
 └─ registers           S[N-1:0], C[N:1], cout
```

`pasta_pkg` holds the controller phase enum (`PH_START`, `PH_ITER`) and a
struct for the `(C[i+1], S[i])` bit state.

The stages are purely combinational. Their outputs go into the `S` and `C`
registers, and the registers feed the multiplexers' `SEL = 1` inputs. A
feedback loop that would run freely in an asynchronous circuit thus becomes
one step per clock edge.

## Handshake and timing

| port    | dir | width | meaning |
|---------|-----|-------|---------|
| `clk`   | in  | 1 | clock, one recursion step per rising edge |
| `rst_n` | in  | 1 | asynchronous reset, active low |
| `req`   | in  | 1 | start an addition; taken when `ready` is 1 |
| `a`,`b` | in  | N | operands; sampled only in the cycle `req` is taken |
| `ready` | out | 1 | idle, a request is accepted |
| `done`  | out | 1 | one-cycle acknowledge |
| `sum`   | out | N | `a + b` mod 2^N |
| `cout`  | out | 1 | carry out |

Turning SEL from 0 to 1 is the request of the handshake. The controller has
two phases:

* **PH_START** (`SEL = 0`, `ready = 1`). A cycle with `req = 1` loads
  `a XOR b` and `a AND b` into the registers.
* **PH_ITER** (`SEL = 1`). While any registered carry is 1, each cycle does
  one recursion step. In the first cycle in which all carries are 0, `done`
  is 1. The controller then returns to PH_START.

If `req` is taken in cycle `t`, `done` is 1 in cycle `t + 1 + k`, with
`0 <= k <= N`. For a 32-bit adder that is 1 to 33 cycles. `sum` and `cout`
stay valid from `done` until the next request is taken. A new request may be
given in the cycle right after `done`. `req` while `ready = 0` is ignored.
The operands need not be held after the request cycle.

Assertions check the rules above:

* SEL rises only on a request.
* SEL falls only when all carries are zero.
* No bit ever holds the state `(C[i+1], S[i]) = (1, 1)`.

## Design choices

These parts are fixed by the adder's definition:

* the recursion;
* the stage structure (two multiplexers and a half adder);
* the SEL behaviour;
* the termination condition;
* the widths 8, 16 and 32.

The rest is chosen here:

* **Clocked rather than self-timed.** A truly self-timed loop needs
  delay-matched timing that no RTL simulator or FPGA flow reproduces.
  Registering the stage outputs keeps the recursion and its data-dependent
  step count exact. What changes is that time is counted in cycles rather
  than gate delays.
* **Flip-flops.** The adder uses 2N+2 flip-flops: S, C[N:1], cout and the
  phase bit, so 66 at N = 32. A published FPGA build of this adder reported
  N flip-flops (8, 16 and 32) but did not say where they are placed.
* **Carry in and carry out.** There is no carry in. The carry out is kept in
  a sticky register.
* **Handshake.** The synchronous `req`/`ready`/`done` protocol and the
  asynchronous reset are chosen here.
* **Completion detector.** It is a single N-input NOR. Its fan-in grows with
  N. Splitting it into a tree would not change its function.
* **Gates.** XOR and AND are operators inside `half_adder`, not separate
  modules.

Area, delay and power depend on the target technology and were not measured.

## Verification

Each module has a self-checking testbench in `tb/`. All of them print
`TB_RESULT checks=N failures=M` and have a watchdog.

| testbench | what it checks |
|-----------|----------------|
| `mux2_tb` | exhaustive at W=1, random at W=8 |
| `half_adder_tb` | exhaustive |
| `pasta_bit_tb` | all 32 input combinations, both SEL values, against integer addition |
| `completion_detect_tb` | zero, all ones, every one-hot vector, random |
| `pasta_ctrl_tb` | 2000 cycles of random `req`/`all_zero` against a reference model |
| `pasta_adder_tb` | 4000 additions at the default N = 32 |
| `pasta_adder_widths_tb` | N = 8 on all 65536 operand pairs, and N = 16 on 20000 pairs |

The two adder testbenches share `pasta_adder_driver`. For each addition it
checks:

* `sum` and `cout` against `a + b`;
* the latency against `1 + k`, where `k` comes from a separate bit-vector
  model of the recursion;
* `k <= N`;
* that `done` lasts one cycle;
* that the result is held until the next request.

It also forces and counts each mechanism: no carries (`k = 0`), recursion
steps, the full N-step chain (`a = all ones, b = 1`), carry out, a request
while busy, and back-to-back requests. A mechanism that never occurs counts
as a failure.

To run a testbench with Verilator (from the repository root):

```
verilator --binary --timing --assert -Wno-fatal --top-module pasta_adder_tb \
  -y rtl -y tb +libext+.sv rtl/pasta_pkg.sv tb/pasta_adder_tb.sv
./obj_dir/Vpasta_adder_tb
```

Every testbench finishes in well under a second.

## Changing it

* Width: override `N` on `pasta_adder` (N >= 2). The worst-case latency is
  N + 1 cycles.
* To add a carry in, drive `C[0]` in the starting step instead of tying it
  to 0. The worst case then becomes N + 1 steps.

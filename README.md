# Bit-serial handshaking half adder, at the level of SFQ pulses

Superconducting single-flux-quantum (SFQ) logic runs at tens of GHz. At those
speeds one global clock is hard to distribute without skew. This design uses
no global clock. Each module has its own short local clock. Modules pass data
to each other in bit-serial words under a request/acknowledge handshake, so
that a word moves only when the module after it has room.

The RTL here describes one such system. It has three handshaking stages in a
pipeline. The first stage takes two 4-bit operand words, `a` and `b`. A
dual-rail half adder at its output turns them into a sum word (`a ^ b`) and a
carry word (`a & b`). The results move through stages 2 and 3 into two
read-out shift registers, from which a slow `read` pulse takes them one bit
at a time. The interesting part is not the addition. It is the handshake:
a stage with two inputs must wait until both input words are complete, and
the acknowledges must keep words in order through the pipeline without a
global clock.

## How the SFQ circuit is modelled

An SFQ circuit works on pulses, not levels. The RTL keeps that view:

* Every signal is sampled on one time-step clock `clk`. A **pulse** is a signal
  that is high for exactly one step. One step stands for one period of the
  local 20 GHz clock (50 ps). The model is synchronous; the asynchrony of the
  real circuit shows up as pulses arriving at arbitrary steps.
* Data travel on **dual-rail** lines (`bshs_pkg::dr_t`, fields `t` and `f`). A
  pulse on `t` is a 1; a pulse on `f` is a 0. The OR of the two rails is the
  bit's own clock: a receiver knows a bit has come because one rail pulsed.
  This is data-driven self-timing (DDST). Both rails pulsing at once is
  illegal, and assertions flag it.
* Reset is synchronous and active low (`rst_n`). The real circuit has no reset
  line. It has to be brought into a known state before use, and getting that
  state right matters: a stray pulse leaves a C-element half set.

The latencies below are counted in steps of this model. They are not the
picosecond delays of the superconducting cells; see *Timing*.

## The building blocks

| Module | Role |
|---|---|
| `c_element` | Muller C-element for pulses: one output pulse once every input has had a pulse, in any order |
| `completion_detector` | Chain of T flip-flops that counts a word's bits and pulses after the last one |
| `clock_generator` | Fires a burst of `NPULSE` clock pulses on one trigger pulse |
| `ddst_sr` | Shift register filled by the data's own clock and emptied by the burst |
| `ddst_half_adder` | Dual-rail half adder that fires when it holds both operand bits |
| `bshs_module` | One handshaking stage, built from the four modules above |
| `readout_sr` | Output shift register, read one bit per `read` pulse, with toggle outputs |
| `bshs_half_adder_system` | The top: three stages, the half adder and two read-out registers |

**C-element.** Each input has a state bit that records "a pulse came". When
every state bit is set (a pulse in the current step counts), the element
emits a pulse one step later and clears all state bits. `N` sets the number
of inputs; an N-input element stands for a tree of two-input ones. `INIT`
presets state bits at reset. A second pulse on an input that is already set
is lost, and an assertion reports it.

**Completion detector.** Each T flip-flop toggles on a pulse. It passes a
pulse to the next flip-flop when it goes from 1 back to 0. So a chain of
`STAGES` flip-flops emits one pulse every `2**STAGES` bits. That pulse,
registered, is `done`, one step after the last bit. The chain is then back
at zero and ready for the next word.

**Clock generator.** A down-counter of pulses still to issue. The first pulse
comes one step after the trigger, then one every `PERIOD` steps. `busy` is
high during the burst. A trigger during a burst is ignored and flagged.

**DDST shift register.** One `DEPTH`-bit shift register, shifted by either of
two clocks: the incoming bit's rail-OR (which shifts the bit in) and the burst
pulse (which moves the oldest bit out as a dual-rail pulse one step later).
Bits leave in the order they came.

## One handshaking stage (`bshs_module`)

```
 din[c] ──┬──> ddst_sr[c] ──────────────────────────────> dout[c]
          └──> completion_detector[c] ─┐          ^ shift
                                       C (NCH) ── req ──┬──> ack_out
 ack_in[NACK] ──> C (NACK) ── ack_all ─────────┐        │
                                               C (2) <──┘
                                               └─ trig ─> clock_generator
```

Each input channel has its own shift register and completion detector. A
C-element joins the channels' completion pulses into **REQ**, so REQ comes
only when every input word is complete. This is how a stage with two inputs
waits for operands that arrive at different times. A second C-element joins
REQ with the **ACK** input. When both have come, it triggers the clock
generator, and the burst pushes all channels out in parallel, one bit per
pulse. If the stage feeds several successors, `NACK > 1` joins all their
ACKs in one more C-element first.

The logic block that processes the outgoing words is not inside
`bshs_module`. The top places it between stages. In the original circuit it
is counted as part of the stage.

### Where the acknowledge comes from

This is the least obvious part of the design. A stage holds one word. Stage
*k* may send only when stage *k+1* is empty. Stage *k+1* becomes empty when
it has sent its word to stage *k+2*, and that is detected by stage *k+2*: its
REQ says that a complete word has arrived. So:

* a stage's `ack_out` is its own REQ;
* `ack_out` of stage *k+2* drives `ack_in` of stage *k*, two places upstream.

In the system, the ACK of stage 3 goes back to stage 1. The original circuit
uses a passive transmission line for that long link; here it is a wire.
Stages 2 and 3 have no stage two places further down. Their ACKs (`ack_in2`,
`ack_in3`) come from outside, so the pipeline can be stepped by hand. Stage 1
also needs an acknowledge to start, because stage 2 is empty after reset.
That is `ack_in1`, merged with the ACK of stage 3. An assertion checks that
the two never pulse in the same step. Alternatively, `bshs_module`'s
`ACK_INIT` parameter presets the acknowledge at reset.

An ACK may come before or after its REQ; the C-element remembers whichever
came first. An ACK must not come twice before the stage has used it. The
environment must respect that, and assertions flag it if it does not.

## The half-adder system (`bshs_half_adder_system`)

```
 a, b ─> [BSHS 1] ─> half adder ─> sum, carry ─> [BSHS 2] ─> [BSHS 3] ─> readout_sr x2 ─> sum, carry
            ^ ack_in1 | ack_out of BSHS 3         ^ ack_in2   ^ ack_in3      ^ read
```

Ports: dual-rail `a`, `b` in; pulses `ack_in1..3` and `read` in; dual-rail
`sum`, `carry` pulses out, plus their toggle outputs `sum_level` and
`carry_level`. Each rail drives a toggle flip-flop, which turns a pulse into a
change of DC level, as an SFQ-to-DC converter on a chip does. `ack_out2` tells
the operand source that stage 1 has emptied and may take the next pair.
`ack_out1` is stage 1's own ACK output. `req` and `busy` show each stage's
REQ and burst.

The bench sequence this system was built for runs as follows:

1. Pulse `ack_in1`. Send `a = 0011`, `b = 0101`. Stage 1 fires at once: the
   sum `0110` and carry `0001` move into stage 2.
2. Send `a = 1001`, `b = 1010`. They wait in stage 1, because stage 2 is full.
3. Pulse `ack_in2`. Stage 2 moves its words to stage 3. Stage 3's REQ
   acknowledges stage 1, which then sends the second result (`0011`, `1000`)
   to stage 2 by itself.
4. Pulse `ack_in3`, then `read` four times: out come sum `0110`, carry `0001`.
5. Pulse `ack_in2`, `ack_in3` and four `read`s: out come sum `0011`, carry
   `1000`.

Words are sent and read out leftmost bit first. The results are bitwise, so
the order does not change them.

## Timing

With the default `CG_PERIOD = 1`, a word crosses from one stage to the next
in `NBITS` consecutive steps, one bit per generated clock pulse. That is the
20 GHz transfer rate if a step is 50 ps. Latencies of one stage, in steps:

| Event | Model (steps) | Original circuit |
|---|---|---|
| ACK in → first output bit (REQ waiting) | 3 | 348 ps |
| last input bit → first output bit (ACK waiting) | 5 | 682 ps |
| last input bit → ACK out | 2 | 333 ps |

The right-hand column is the delay of the superconducting cells. The model
does not try to reproduce it. Every element of the model takes one step, so
only the order of events and the bit rate carry over. In the system, it takes
9 steps from stage 3's ACK to a complete word in stage 2: 3 steps to the
first bit, 1 through the half adder, 3 more bits, 1 for the completion
detector, and 1 for the C-element joining the channels.

## Parameters

| Parameter | Default | Where | Meaning |
|---|---|---|---|
| `NBITS` | 4 | system, `bshs_module`, `readout_sr` | word length; a power of two, since the completion detector is a T flip-flop chain |
| `CG_PERIOD` | 1 | system, `bshs_module` | steps between burst pulses |
| `NCH` | 2 | `bshs_module` | input channels joined into REQ |
| `NACK` | 1 | `bshs_module` | acknowledges joined before the trigger |
| `ACK_INIT` | 0 | `bshs_module` | acknowledge preset at reset |

The 4-bit words, the two-input stages and the three-stage depth come from the
original system. `CG_PERIOD`, `ACK_INIT` and the step model are choices of
this RTL.

## How far to trust it, and where it departs

* It is a functional, pulse-level model. It says nothing about bias margins,
  junction counts, the chip's picosecond delays, or how well it behaves when
  pulses arrive nearly together. Those are properties of the superconducting
  circuit.
* The half adder in the original is built from binary-decision-diagram SFQ
  cells. Here it is the simplest dual-rail equivalent: it holds the first
  operand to arrive and fires when it has both.
* The read-out registers take one bit per `read` pulse. That reading of the
  bench test is a choice of this RTL.
* The passive transmission line for the long ACK link is a plain wire.
* The shift register shifts on either of its clocks. Under the handshake the
  two never meet. If they do, one shift takes the new bit in and pushes the
  oldest out.
* Protocol misuse (a second pulse into a set C-element input, a retrigger
  during a burst, both rails at once) is reported by assertions. The hardware
  model ignores the extra pulse, as the SFQ cell would.

## Simulating

Each module has a self-checking testbench `tb/tb_<module>.sv`. It prints
`TB_RESULT checks=N failures=M` and finishes. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/bshs_pkg.sv \
    tb/tb_bshs_half_adder_system.sv --top-module tb_bshs_half_adder_system
./obj_dir/Vtb_bshs_half_adder_system
```

`tb_bshs_half_adder_system` runs the top at its default size. First it
replays the bench sequence above and checks both results. Then it streams
300 random operand pairs. The testbench plays the environment, which gives
ACKs only when the downstream stage has emptied. It compares every result
and toggle level with `a ^ b` and `a & b`. It checks the bit rate and the
9-step automatic transfer. It also counts each mechanism and fails if one
never happens: a REQ waiting for its ACK and an ACK waiting for its REQ in
every stage, the automatic transfer via stage 3's ACK, operands completing
at different steps, all four half-adder input cases, and read-outs.

`tb_bshs_module` checks the stage's latencies step by step with random skews
and ACK times. It also checks a one-channel, two-ACK stage with preset
acknowledges. The other testbenches check their block the same way, against
reference values computed in the testbench.

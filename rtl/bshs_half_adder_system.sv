// Bit-serial handshaking half-adder system: three BSHS stages, a dual-rail
// half adder and two read-out shift registers.
//
// Two NBITS-bit operand words a and b arrive bit-serially on dual-rail lines
// into BSHS 1, which has one channel for each. When BSHS 1 holds both words
// and is acknowledged, its clock generator pushes them out together through
// the DDST half adder, whose sum and carry words go into the two channels of
// BSHS 2. BSHS 2 passes them to BSHS 3, and BSHS 3 into the two read-out
// shift registers, from which an external Read pulse takes them one bit at a
// time. The result is the bitwise half-adder of the two words:
// sum = a XOR b and carry = a AND b, one independent addition per bit.
//
// Handshake wiring: a stage may send when the stage after it has emptied,
// which is seen as the arrival of a complete word in the stage after that.
// So the acknowledge output of BSHS 3 goes back to BSHS 1 (a passive
// transmission line in the superconducting circuit, a wire here). BSHS 1 can
// also be acknowledged from outside (`ack_in1`), which starts the system; the
// two are merged. BSHS 2 and BSHS 3 have no stages two places downstream and
// take their acknowledges from outside (`ack_in2`, `ack_in3`), so the test
// can move data forward step by step.
//
// Interface: `a`, `b` dual-rail operand inputs; `ack_in1..3`, `read` pulses;
// `sum`, `carry` dual-rail read-out pulses and `sum_level`, `carry_level`
// their toggle outputs; `ack_out2` (from BSHS 2) tells the operand source
// that BSHS 1 has emptied and may take the next pair, `ack_out1` (from
// BSHS 1) that BSHS 1 holds a complete pair, for a source two stages up; `req` shows each stage's request (a complete
// word has arrived) and `busy` which stage's clock generator runs.
// Timing: all signals are sampled on `clk`, one step per local clock period;
// a word moves between stages in NBITS consecutive steps (CG_PERIOD = 1).
module bshs_half_adder_system #(
  parameter int unsigned NBITS     = 4,
  parameter int unsigned CG_PERIOD = 1
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bshs_pkg::dr_t a,
  input  bshs_pkg::dr_t b,
  input  logic          ack_in1,
  input  logic          ack_in2,
  input  logic          ack_in3,
  input  logic          read,
  output bshs_pkg::dr_t sum,
  output bshs_pkg::dr_t carry,
  output bshs_pkg::dr_t sum_level,
  output bshs_pkg::dr_t carry_level,
  output logic          ack_out1,
  output logic          ack_out2,
  output logic [2:0]    req,
  output logic [2:0]    busy
);

  import bshs_pkg::*;

  dr_t [1:0] s1_out;        // BSHS 1 outputs: [1] = a, [0] = b
  dr_t [1:0] ha_out;        // half adder: [1] = sum, [0] = carry
  dr_t [1:0] s2_out;
  dr_t [1:0] s3_out;
  logic      s1_ack, s3_ack_out;

  // External start-up acknowledge merged with the one from BSHS 3.
  assign s1_ack = ack_in1 | s3_ack_out;

  bshs_module #(.NCH(2), .NBITS(NBITS), .CG_PERIOD(CG_PERIOD)) u_bshs1 (
    .clk, .rst_n,
    .din({a, b}), .ack_in(s1_ack), .dout(s1_out),
    .req(req[0]), .ack_out(ack_out1), .busy(busy[0])
  );

  ddst_half_adder u_ha (
    .clk, .rst_n,
    .a(s1_out[1]), .b(s1_out[0]), .sum(ha_out[1]), .carry(ha_out[0])
  );

  bshs_module #(.NCH(2), .NBITS(NBITS), .CG_PERIOD(CG_PERIOD)) u_bshs2 (
    .clk, .rst_n,
    .din(ha_out), .ack_in(ack_in2), .dout(s2_out),
    .req(req[1]), .ack_out(ack_out2), .busy(busy[1])
  );

  bshs_module #(.NCH(2), .NBITS(NBITS), .CG_PERIOD(CG_PERIOD)) u_bshs3 (
    .clk, .rst_n,
    .din(s2_out), .ack_in(ack_in3), .dout(s3_out),
    .req(req[2]), .ack_out(s3_ack_out), .busy(busy[2])
  );

  readout_sr #(.NBITS(NBITS)) u_sr_sum (
    .clk, .rst_n, .din(s3_out[1]), .read(read), .dout(sum), .level(sum_level)
  );

  readout_sr #(.NBITS(NBITS)) u_sr_carry (
    .clk, .rst_n, .din(s3_out[0]), .read(read), .dout(carry), .level(carry_level)
  );

  // The acknowledge of BSHS 1 must never arrive twice from the two sources
  // in the same step.
  a_ack1_merge : assert property (@(posedge clk) disable iff (!rst_n)
    !(ack_in1 && s3_ack_out))
    else $error("bshs_half_adder_system: start-up ACK collides with ACK from BSHS 3");

endmodule

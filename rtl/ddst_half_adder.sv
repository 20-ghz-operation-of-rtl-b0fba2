// Dual-rail data-driven self-timed (DDST) one-bit half adder.
//
// The logic block of the first BSHS stage. Each operand arrives as a
// dual-rail pulse; the adder keeps an operand that comes first and fires as
// soon as it holds both, so the operands need not arrive in the same step.
// It then emits the sum (a XOR b) and the carry (a AND b) as dual-rail
// pulses and is ready for the next pair. The gate-level cell this stands for
// is built from binary-decision-diagram (BDD) SFQ elements; only its
// function is modelled here.
//
// Interface: `a`, `b` dual-rail operands; `sum`, `carry` dual-rail results.
// Timing: the results pulse one step after the step in which the second
// operand arrives. A second pulse on an operand that is already held is a
// protocol error (assertion); it replaces the held value.
module ddst_half_adder (
  input  logic          clk,
  input  logic          rst_n,
  input  bshs_pkg::dr_t a,
  input  bshs_pkg::dr_t b,
  output bshs_pkg::dr_t sum,
  output bshs_pkg::dr_t carry
);

  logic a_held, b_held;     // an operand is held
  logic a_val,  b_val;      // its value
  logic a_have, b_have;     // held or arriving now
  logic a_bit,  b_bit;
  logic fire;

  always_comb begin
    a_have = a_held | bshs_pkg::dr_clk(a);
    b_have = b_held | bshs_pkg::dr_clk(b);
    a_bit  = bshs_pkg::dr_clk(a) ? a.t : a_val;
    b_bit  = bshs_pkg::dr_clk(b) ? b.t : b_val;
    fire   = a_have & b_have;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      a_held <= 1'b0;
      b_held <= 1'b0;
      a_val  <= 1'b0;
      b_val  <= 1'b0;
      sum    <= '0;
      carry  <= '0;
    end else begin
      a_held <= a_have & ~fire;
      b_held <= b_have & ~fire;
      a_val  <= a_bit;
      b_val  <= b_bit;
      sum    <= bshs_pkg::dr_pulse(fire, a_bit ^ b_bit);
      carry  <= bshs_pkg::dr_pulse(fire, a_bit & b_bit);
    end
  end

  a_no_overrun : assert property (@(posedge clk) disable iff (!rst_n)
    !(a_held && bshs_pkg::dr_clk(a)) && !(b_held && bshs_pkg::dr_clk(b)))
    else $error("ddst_half_adder: new operand before the previous one was used");

  a_dual_rail : assert property (@(posedge clk) disable iff (!rst_n)
    !(a.t && a.f) && !(b.t && b.f))
    else $error("ddst_half_adder: both rails pulsed at once");

endmodule

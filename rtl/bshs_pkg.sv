// Shared types for the bit-serial handshaking (BSHS) design.
//
// The design is modelled at the level of single-flux-quantum (SFQ) pulses:
// every signal is sampled on a common time-step clock `clk`, and a pulse is a
// signal that is high for exactly one step. One step stands for one period of
// the local high-speed clock (50 ps at the 20 GHz target rate). Resets are
// synchronous and active low (rst_n).
//
// Data between modules travel on dual-rail lines, as in data-driven
// self-timed (DDST) SFQ logic: a logical 1 is a pulse on the true rail, a
// logical 0 a pulse on the false rail, and the OR of the two rails is the
// local clock that marks each bit. Both rails pulsing at once is illegal.
package bshs_pkg;

  // One dual-rail line: t pulses for a 1, f pulses for a 0.
  typedef struct packed {
    logic t;
    logic f;
  } dr_t;

  // The local clock recovered from a dual-rail line (logical OR of the rails).
  function automatic logic dr_clk(dr_t d);
    return d.t | d.f;
  endfunction

  // A dual-rail pulse that carries bit `v` when `fire` is high.
  function automatic dr_t dr_pulse(logic fire, logic v);
    dr_t d;
    d.t = fire & v;
    d.f = fire & ~v;
    return d;
  endfunction

endpackage

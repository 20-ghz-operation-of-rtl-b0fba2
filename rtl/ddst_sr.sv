// DDST shift register: the data store of a BSHS module.
//
// A DEPTH-bit shift register that is shifted by either of two clocks: the
// local clock of the incoming dual-rail data (the OR of its rails), which
// shifts the arriving bit in, and the shift clock from the module's clock
// generator, which pushes the oldest bit out as a dual-rail pulse. Bits leave
// in the order they arrived. Under the handshake the register is filled
// while idle and emptied by one burst of DEPTH clock pulses, so the two
// clocks do not meet; if they do, one shift both takes in the new bit and
// pushes out the oldest one. A shift without input data shifts in a 0.
//
// Interface: `din` dual-rail data in, `shift` clock pulse from the CG,
// `dout` dual-rail data out.
// Timing: the bit appears on `dout` one step after the `shift` pulse.
module ddst_sr #(
  parameter int unsigned DEPTH = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bshs_pkg::dr_t din,
  input  logic          shift,
  output bshs_pkg::dr_t dout
);

  logic [DEPTH-1:0] sr;
  logic             din_clk;

  assign din_clk = bshs_pkg::dr_clk(din);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      sr   <= '0;
      dout <= '0;
    end else begin
      if (din_clk || shift)
        sr <= (sr << 1) | DEPTH'(din.t);
      dout <= bshs_pkg::dr_pulse(shift, sr[DEPTH-1]);
    end
  end

  a_dual_rail : assert property (@(posedge clk) disable iff (!rst_n)
    !(din.t && din.f))
    else $error("ddst_sr: both rails pulsed at once");

endmodule

// Read-out shift register at the end of the BSHS chain.
//
// The last BSHS stage pushes a word into this register at full speed; a slow
// external Read pulse then takes it out one bit per pulse, oldest bit first,
// so that a room-temperature instrument can follow it. Each output rail also
// drives a toggle flip-flop, the SFQ-to-voltage converter that turns every
// output pulse into a change of a DC level.
//
// Interface: `din` dual-rail data from the last stage, `read` the read pulse,
// `dout` the dual-rail bit that was read, `level` the two toggle outputs
// (t toggles on each 1 read, f on each 0 read).
// Timing: `dout` pulses one step after `read`; `level` changes one step later.
module readout_sr #(
  parameter int unsigned NBITS = 4
) (
  input  logic          clk,
  input  logic          rst_n,
  input  bshs_pkg::dr_t din,
  input  logic          read,
  output bshs_pkg::dr_t dout,
  output bshs_pkg::dr_t level
);

  ddst_sr #(.DEPTH(NBITS)) u_sr (
    .clk, .rst_n, .din(din), .shift(read), .dout(dout)
  );

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      level <= '0;
    end else begin
      level.t <= level.t ^ dout.t;
      level.f <= level.f ^ dout.f;
    end
  end

endmodule

// Clock generator (CG) of a BSHS module.
//
// A trigger pulse starts a burst of exactly NPULSE clock pulses, one every
// PERIOD steps; the burst is what pushes one whole bit-serial word out of the
// module's shift registers. With PERIOD = 1 a pulse comes every step, which
// is the 20 GHz transfer rate when a step is 50 ps.
//
// Interface: `trig` is the trigger pulse, `clk_out` the burst, `busy` is high
// from the first pulse of the burst to the last one.
// Timing: the first pulse of the burst appears one step after the trigger.
// A trigger while a burst is running is a protocol error (assertion) and is
// ignored.
module clock_generator #(
  parameter int unsigned NPULSE = 4,
  parameter int unsigned PERIOD = 1
) (
  input  logic clk,
  input  logic rst_n,
  input  logic trig,
  output logic clk_out,
  output logic busy
);

  localparam int unsigned CW = $clog2(NPULSE + 1);
  localparam int unsigned PW = (PERIOD > 1) ? $clog2(PERIOD) : 1;

  logic [CW-1:0] remaining;
  logic [PW-1:0] phase;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      remaining <= '0;
      phase     <= '0;
      clk_out   <= 1'b0;
    end else if (trig && !busy) begin
      // First pulse of the burst at once, NPULSE - 1 still to come.
      remaining <= CW'(NPULSE - 1);
      phase     <= PW'(PERIOD - 1);
      clk_out   <= 1'b1;
    end else if (remaining != '0 && phase == '0) begin
      remaining <= remaining - 1'b1;
      phase     <= PW'(PERIOD - 1);
      clk_out   <= 1'b1;
    end else begin
      if (phase != '0) phase <= phase - 1'b1;
      clk_out <= 1'b0;
    end
  end

  assign busy = (remaining != '0) | clk_out;

  a_no_retrigger : assert property (@(posedge clk) disable iff (!rst_n)
    !(trig && busy))
    else $error("clock_generator: trigger during a burst");

endmodule

// Muller C-element for SFQ pulses, with N inputs.
//
// Each input has a one-bit state that records that a pulse has arrived on it.
// When every input has seen a pulse (the pulses may arrive in any order and
// in any steps, or together), the element emits one output pulse and clears
// all its states. This is the synchronising element of the BSHS design: it
// merges the completion signals of several input channels into one request,
// merges several acknowledgements into one, and joins request with
// acknowledge to start a data transfer. The two-input form is the one the
// design uses between REQ and ACK; the N-input form stands for the chain of
// two-input elements that a module with more inputs is built from.
//
// Interface: `in` carries N pulse inputs, `y` the output pulse.
// Timing: `y` pulses one step after the step in which the last input pulse
// arrives. `INIT` presets input states at reset, so that an input can start
// out as if it had already received its pulse (used to start a pipeline with
// its acknowledge already given). A second pulse on an input whose state is
// already set is a protocol error and is flagged by an assertion; the real
// element would ignore it, and so does this model.
module c_element #(
  parameter int unsigned  N    = 2,
  parameter logic [N-1:0] INIT = '0
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic [N-1:0] in,
  output logic         y
);

  logic [N-1:0] state;
  logic [N-1:0] seen;
  logic         fire;

  always_comb begin
    seen = state | in;
    fire = &seen;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= INIT;
      y     <= 1'b0;
    end else begin
      state <= fire ? '0 : seen;
      y     <= fire;
    end
  end

  // A pulse on an input that has already fired is lost.
  a_no_double_pulse : assert property (@(posedge clk) disable iff (!rst_n)
    (in & state) == '0)
    else $error("c_element: second pulse on an input that is already set");

endmodule

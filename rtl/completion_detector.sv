// Completion detector (CD) for a bit-serial dual-rail word.
//
// The detector is a ripple chain of STAGES T flip-flops, as in the BSHS
// module it belongs to. The local clock of the dual-rail input (the OR of its
// two rails) toggles the first flip-flop; each flip-flop passes a pulse to the
// next when it toggles from 1 back to 0. The last stage therefore emits one
// pulse for every 2**STAGES input bits, which marks the end of a word. After
// that pulse every stage is back at 0, so the detector is ready for the next
// word without being reset.
//
// Interface: `din` is the dual-rail data line being watched, `done` the
// completion pulse.
// Timing: `done` pulses one step after the step that carried the last bit.
// The ripple through the chain is taken to settle within that one step.
module completion_detector #(
  parameter int unsigned STAGES = 2     // 4-bit words
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  bshs_pkg::dr_t        din,
  output logic                 done
);

  logic [STAGES-1:0] tff;
  logic [STAGES:0]   carry;   // pulse into each stage; carry[STAGES] is the output

  assign carry[0] = bshs_pkg::dr_clk(din);
  for (genvar i = 0; i < STAGES; i++) begin : g_stage
    assign carry[i+1] = carry[i] & tff[i];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      tff  <= '0;
      done <= 1'b0;
    end else begin
      for (int i = 0; i < STAGES; i++)
        if (carry[i]) tff[i] <= ~tff[i];
      done <= carry[STAGES];
    end
  end

  a_dual_rail : assert property (@(posedge clk) disable iff (!rst_n)
    !(din.t && din.f))
    else $error("completion_detector: both rails pulsed at once");

endmodule

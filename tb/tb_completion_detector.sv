// Self-checking testbench for completion_detector.
//
// Dual-rail bits of random value arrive with random gaps (0 to 3 idle steps)
// at a 2-stage detector (4-bit words) and a 3-stage detector (8-bit words).
// A reference counter, kept in the testbench, predicts a completion pulse one
// step after every 4th, respectively 8th, bit; every step's output is
// compared with it.
module tb_completion_detector;
  import bshs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  dr_t  din;
  logic done4, done8;

  completion_detector dut4 (.clk, .rst_n, .din(din), .done(done4));
  completion_detector #(.STAGES(3)) dut8 (.clk, .rst_n, .din(din), .done(done8));

  int checks = 0;
  int failures = 0;
  int bits = 0;
  logic exp4 = 1'b0, exp8 = 1'b0;

  initial begin
    din = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int step = 0; step < 3000; step++) begin
      @(negedge clk);
      checks += 2;
      if (done4 !== exp4) begin
        failures++;
        $display("FAIL 4-bit done=%0b expected %0b after %0d bits", done4, exp4, bits);
      end
      if (done8 !== exp8) begin
        failures++;
        $display("FAIL 8-bit done=%0b expected %0b after %0d bits", done8, exp8, bits);
      end
      if ($urandom_range(0, 3) == 0 || step > 2990) begin
        din  = '0;
        exp4 = 1'b0;
        exp8 = 1'b0;
      end else begin
        din  = dr_pulse(1'b1, 1'($urandom_range(0, 1)));
        bits++;
        exp4 = (bits % 4 == 0);
        exp8 = (bits % 8 == 0);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

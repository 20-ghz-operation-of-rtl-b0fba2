// Self-checking testbench for readout_sr.
//
// A random 4-bit word is loaded at full speed (one bit per step), then read
// out by four slow Read pulses spaced 5 to 20 steps apart. Each Read must give,
// one step later, the next bit in arrival order as a dual-rail pulse, and the
// matching toggle output must have changed state by the step after that.
module tb_readout_sr;
  import bshs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  dr_t  din, dout, level;
  logic read;

  readout_sr dut (.clk, .rst_n, .din(din), .read(read), .dout(dout), .level(level));

  int checks = 0;
  int failures = 0;

  initial begin
    logic [3:0] word;
    dr_t exp_level;
    din = '0;
    read = 1'b0;
    exp_level = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 100; w++) begin
      word = 4'($urandom);
      for (int i = 3; i >= 0; i--) begin
        @(negedge clk);
        din = dr_pulse(1'b1, word[i]);
      end
      @(negedge clk);
      din = '0;
      for (int i = 3; i >= 0; i--) begin
        repeat ($urandom_range(5, 20)) @(negedge clk);
        read = 1'b1;
        @(negedge clk);
        read = 1'b0;
        checks++;
        if (dout !== dr_pulse(1'b1, word[i])) begin
          failures++;
          $display("FAIL word %0d bit %0d: got t=%0b f=%0b", w, i, dout.t, dout.f);
        end
        if (word[i]) exp_level.t = ~exp_level.t;
        else         exp_level.f = ~exp_level.f;
        @(negedge clk);
        checks++;
        if (level !== exp_level || dout !== '0) begin
          failures++;
          $display("FAIL word %0d bit %0d: level %b expected %b", w, i, level, exp_level);
        end
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

// Self-checking testbench for ddst_sr.
//
// Random 4-bit words are written bit by bit on the dual-rail input with
// random gaps, then pushed out by a burst of four shift pulses in
// consecutive steps. Each shift must produce, one step later, exactly one
// dual-rail pulse carrying the next bit in arrival order; no pulse may appear
// without a shift.
module tb_ddst_sr;
  import bshs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  dr_t  din, dout;
  logic shift;

  ddst_sr dut (.clk, .rst_n, .din(din), .shift(shift), .dout(dout));

  int checks = 0;
  int failures = 0;

  initial begin
    logic [3:0] word;
    din = '0;
    shift = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 300; w++) begin
      word = 4'($urandom);
      for (int i = 3; i >= 0; i--) begin
        @(negedge clk);
        din = dr_pulse(1'b1, word[i]);
        @(negedge clk);
        din = '0;
        checks++;
        if (dout !== '0) begin
          failures++;
          $display("FAIL output pulse while loading word %0d", w);
        end
        repeat ($urandom_range(0, 2)) @(negedge clk);
      end
      repeat ($urandom_range(0, 2)) @(negedge clk);
      for (int i = 3; i >= -1; i--) begin
        @(negedge clk);
        if (i < 3) begin
          checks++;
          if (dout !== dr_pulse(1'b1, word[i + 1])) begin
            failures++;
            $display("FAIL word %0d bit %0d: got t=%0b f=%0b", w, i + 1, dout.t, dout.f);
          end
        end
        shift = (i >= 0);
      end
      shift = 1'b0;
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

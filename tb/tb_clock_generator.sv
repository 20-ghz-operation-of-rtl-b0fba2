// Self-checking testbench for clock_generator.
//
// Each trigger must yield exactly NPULSE pulses, the first one step after
// the trigger and the rest every PERIOD steps, with `busy` high until the
// last pulse has been issued. Two instances are checked: the default
// (4 pulses, one per step, the 20 GHz rate) and 5 pulses every 3 steps.
// Triggers are spaced randomly after each burst ends.
module tb_clock_generator;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic trig_a, trig_b;
  logic out_a, out_b, busy_a, busy_b;

  clock_generator dut_a (.clk, .rst_n, .trig(trig_a), .clk_out(out_a), .busy(busy_a));
  clock_generator #(.NPULSE(5), .PERIOD(3)) dut_b (
    .clk, .rst_n, .trig(trig_b), .clk_out(out_b), .busy(busy_b)
  );

  int checks = 0;
  int failures = 0;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Trigger at step 0 of the burst and watch until well after it.
  task automatic burst(bit sel, int npulse, int period);
    int last = 1 + (npulse - 1) * period;
    for (int c = 0; c <= last + 4; c++) begin
      @(negedge clk);
      if (sel == 0) begin
        check(out_a, (c >= 1 && c <= last && (c - 1) % period == 0), $sformatf("A pulse step %0d", c));
        check(busy_a, (c >= 1 && c <= last), $sformatf("A busy step %0d", c));
        trig_a = (c == 0);
      end else begin
        check(out_b, (c >= 1 && c <= last && (c - 1) % period == 0), $sformatf("B pulse step %0d", c));
        check(busy_b, (c >= 1 && c <= last), $sformatf("B busy step %0d", c));
        trig_b = (c == 0);
      end
    end
  endtask

  initial begin
    trig_a = 1'b0;
    trig_b = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 30; k++) begin
      burst(0, 4, 1);
      repeat ($urandom_range(0, 3)) @(negedge clk);
      burst(1, 5, 3);
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

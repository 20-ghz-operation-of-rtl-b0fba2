// Self-checking testbench for c_element.
//
// A two-input element receives its two pulses in every order and spacing
// (together, a first, b first, up to 6 steps apart); the output must pulse
// exactly once, one step after the later input pulse, and stay quiet
// otherwise. A three-input element with one input preset at reset checks the
// INIT parameter: its first firing needs only the other two inputs, later
// firings need all three.
module tb_c_element;
  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  logic [1:0] in2;
  logic       y2;
  logic [2:0] in3;
  logic       y3;

  c_element dut2 (.clk, .rst_n, .in(in2), .y(y2));
  c_element #(.N(3), .INIT(3'b100)) dut3 (.clk, .rst_n, .in(in3), .y(y3));

  int checks = 0;
  int failures = 0;

  task automatic check(logic got, logic exp, string what);
    checks++;
    if (got !== exp) begin
      failures++;
      $display("FAIL %s: got %0b expected %0b at %0t", what, got, exp, $time);
    end
  endtask

  // Pulse in2[0] at step d0 and in2[1] at step d1 of the trial.
  task automatic trial2(int d0, int d1);
    int last = (d0 > d1) ? d0 : d1;
    for (int c = 0; c <= last + 3; c++) begin
      @(negedge clk);
      check(y2, (c == last + 1), $sformatf("two-input d0=%0d d1=%0d step %0d", d0, d1, c));
      in2 = {(c == d1), (c == d0)};
    end
    in2 = '0;
  endtask

  // Pulse in3[i] at step d[i]; a negative step means no pulse.
  task automatic trial3(int d0, int d1, int d2);
    int last = d0;
    if (d1 > last) last = d1;
    if (d2 > last) last = d2;
    for (int c = 0; c <= last + 3; c++) begin
      @(negedge clk);
      check(y3, (c == last + 1), $sformatf("three-input step %0d", c));
      in3 = {(c == d2), (c == d1), (c == d0)};
    end
    in3 = '0;
  endtask

  initial begin
    in2 = '0;
    in3 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    // Preset input: first firing needs only inputs 0 and 1.
    trial3(2, 0, -1);
    trial3(1, 4, 3);
    trial3(0, 0, 0);
    for (int d0 = 0; d0 < 7; d0++)
      for (int d1 = 0; d1 < 7; d1++)
        trial2(d0, d1);
    for (int k = 0; k < 200; k++)
      trial2($urandom_range(0, 9), $urandom_range(0, 9));
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

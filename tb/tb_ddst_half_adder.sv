// Self-checking testbench for ddst_half_adder.
//
// Every operand pair (all four, then random ones) is applied with the two
// operands either together or up to 4 steps apart, in either order. One step
// after the later operand the adder must emit sum = a XOR b and
// carry = a AND b as dual-rail pulses, and nothing at any other step.
module tb_ddst_half_adder;
  import bshs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  dr_t a, b, sum, carry;

  ddst_half_adder dut (.clk, .rst_n, .a(a), .b(b), .sum(sum), .carry(carry));

  int checks = 0;
  int failures = 0;

  task automatic trial(logic av, logic bv, int da, int db);
    int last = (da > db) ? da : db;
    dr_t exp_s, exp_c;
    for (int c = 0; c <= last + 2; c++) begin
      @(negedge clk);
      exp_s = dr_pulse(c == last + 1, av ^ bv);
      exp_c = dr_pulse(c == last + 1, av & bv);
      checks++;
      if (sum !== exp_s || carry !== exp_c) begin
        failures++;
        $display("FAIL a=%0b b=%0b da=%0d db=%0d step %0d: sum=%b carry=%b", av, bv, da, db, c, sum, carry);
      end
      a = dr_pulse(c == da, av);
      b = dr_pulse(c == db, bv);
    end
    a = '0;
    b = '0;
  endtask

  initial begin
    a = '0;
    b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int v = 0; v < 4; v++)
      for (int da = 0; da < 5; da++)
        for (int db = 0; db < 5; db++)
          trial(v[1], v[0], da, db);
    for (int k = 0; k < 300; k++)
      trial(1'($urandom), 1'($urandom), $urandom_range(0, 4), $urandom_range(0, 4));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

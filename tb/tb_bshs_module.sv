// Self-checking testbench for bshs_module.
//
// Instance A is the module of the half-adder system: two input channels,
// 4-bit words, one acknowledge input. Each trial writes a random word into
// each channel, with random gaps between bits and a random skew between the
// channels, and gives one acknowledge at a random step, before, during or
// after the data. The testbench works out when each event must happen and
// checks every step:
//   - REQ / ACK out: 2 steps after the last input bit of the later channel;
//   - transfer start: 1 step after both REQ and ACK have been seen, so the
//     first output bit comes 3 steps after ACK (REQ waiting) and 5 steps
//     after the last input bit (ACK waiting);
//   - the four output bits on each channel in four consecutive steps, one bit
//     per generated clock pulse, in arrival order, both channels together.
// Instance B has one channel and two acknowledge inputs, both preset at
// reset: its first word leaves without any acknowledge, later ones only after
// both acknowledges have arrived, in any order.
module tb_bshs_module;
  import bshs_pkg::*;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  dr_t [1:0] din_a, dout_a;
  logic      ack_a, req_a, ack_out_a, busy_a;
  dr_t [0:0] din_b, dout_b;
  logic [1:0] ack_b;
  logic      req_b, ack_out_b, busy_b;

  bshs_module dut_a (
    .clk, .rst_n, .din(din_a), .ack_in(ack_a), .dout(dout_a),
    .req(req_a), .ack_out(ack_out_a), .busy(busy_a)
  );

  bshs_module #(.NCH(1), .NACK(2), .ACK_INIT(2'b11)) dut_b (
    .clk, .rst_n, .din(din_b), .ack_in(ack_b), .dout(dout_b),
    .req(req_b), .ack_out(ack_out_b), .busy(busy_b)
  );

  int checks = 0;
  int failures = 0;
  int req_first = 0;   // trials where REQ waited for ACK
  int ack_first = 0;   // trials where ACK waited for REQ

  function automatic int imax(int x, int y);
    return (x > y) ? x : y;
  endfunction

  // Random increasing steps for four bits, starting at `start`.
  function automatic void bit_steps(int start, output int s[4]);
    int t = start;
    for (int i = 0; i < 4; i++) begin
      s[i] = t;
      t += 1 + $urandom_range(0, 2);
    end
  endfunction

  task automatic trial_a(int ack_step);
    logic [3:0] w0, w1;
    int s0[4], s1[4];
    int last, req_step, trig_step;
    dr_t exp0, exp1;
    w0 = 4'($urandom);
    w1 = 4'($urandom);
    bit_steps($urandom_range(0, 3), s0);
    bit_steps($urandom_range(0, 3), s1);
    last      = imax(s0[3], s1[3]);
    req_step  = last + 2;
    trig_step = imax(req_step, ack_step) + 1;
    if (ack_step > req_step) req_first++;
    if (ack_step < req_step) ack_first++;
    for (int c = 0; c <= trig_step + 7; c++) begin
      @(negedge clk);
      exp0 = '0;
      exp1 = '0;
      for (int i = 0; i < 4; i++)
        if (c == trig_step + 2 + i) begin
          exp0 = dr_pulse(1'b1, w0[3 - i]);
          exp1 = dr_pulse(1'b1, w1[3 - i]);
        end
      checks++;
      if (dout_a[0] !== exp0 || dout_a[1] !== exp1) begin
        failures++;
        $display("FAIL A step %0d: dout %b %b expected %b %b (ack %0d last %0d)",
                 c, dout_a[1], dout_a[0], exp1, exp0, ack_step, last);
      end
      checks++;
      if (req_a !== (c == req_step) || ack_out_a !== (c == req_step)) begin
        failures++;
        $display("FAIL A step %0d: req %0b expected %0b", c, req_a, (c == req_step));
      end
      din_a = '0;
      for (int i = 0; i < 4; i++) begin
        if (c == s0[i]) din_a[0] = dr_pulse(1'b1, w0[3 - i]);
        if (c == s1[i]) din_a[1] = dr_pulse(1'b1, w1[3 - i]);
      end
      ack_a = (c == ack_step);
    end
    din_a = '0;
    ack_a = 1'b0;
  endtask

  // p0 < 0: no acknowledge pulses (the first word, on the preset acknowledges).
  task automatic trial_b(int p0, int p1);
    logic [3:0] w;
    int s[4];
    int last, req_step, ack_seen, trig_step;
    dr_t exp0;
    w = 4'($urandom);
    bit_steps($urandom_range(0, 3), s);
    last      = s[3];
    req_step  = last + 1;
    ack_seen  = (p0 < 0) ? 0 : imax(p0, p1) + 1;
    trig_step = imax(req_step, ack_seen) + 1;
    for (int c = 0; c <= trig_step + 7; c++) begin
      @(negedge clk);
      exp0 = '0;
      for (int i = 0; i < 4; i++)
        if (c == trig_step + 2 + i) exp0 = dr_pulse(1'b1, w[3 - i]);
      checks++;
      if (dout_b[0] !== exp0 || req_b !== (c == req_step)) begin
        failures++;
        $display("FAIL B step %0d: dout %b expected %b, req %0b", c, dout_b[0], exp0, req_b);
      end
      din_b = '0;
      for (int i = 0; i < 4; i++)
        if (c == s[i]) din_b[0] = dr_pulse(1'b1, w[3 - i]);
      ack_b = {(c == p1), (c == p0)};
    end
    din_b = '0;
    ack_b = '0;
  endtask

  initial begin
    din_a = '0;
    ack_a = 1'b0;
    din_b = '0;
    ack_b = '0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
    for (int k = 0; k < 400; k++)
      trial_a($urandom_range(0, 20));
    trial_b(-1, -1);
    for (int k = 0; k < 200; k++)
      trial_b($urandom_range(0, 15), $urandom_range(0, 15));
    checks++;
    if (req_first == 0 || ack_first == 0) begin
      failures++;
      $display("FAIL coverage: REQ-first %0d, ACK-first %0d", req_first, ack_first);
    end
    $display("REQ waited for ACK in %0d trials, ACK waited for REQ in %0d", req_first, ack_first);
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

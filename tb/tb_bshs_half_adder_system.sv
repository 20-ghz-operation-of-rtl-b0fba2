// End-to-end testbench for bshs_half_adder_system, at its default size
// (4-bit words, one clock-generator pulse per step).
//
// Part 1 replays the bench test of the three-stage half-adder system:
//   start-up ACK 1, load a=0011 b=0101 (it is added and moves to BSHS 2),
//   load a=1001 b=1010 (it waits in BSHS 1), ACK 2 (the first result moves
//   to BSHS 3, whose acknowledge lets the second pair move to BSHS 2 on its
//   own), ACK 3, four Reads -> sum 0110 carry 0001, then ACK 2, ACK 3, four
//   Reads -> sum 0011 carry 1000.
// Words are sent and read leftmost bit first. The step counts of the
// automatic transfer are checked: from the acknowledge of BSHS 3 to the
// word's arrival in BSHS 2 takes 9 steps, and each word crosses between
// stages in 4 consecutive steps (one bit per generated clock pulse).
// Part 2 streams random operand pairs through the system with random bit
// gaps and operand skews, while the testbench plays the environment: it
// gives ACK 2 only when BSHS 3 has emptied, ACK 3 only when the read-out
// registers have been read, and sends a new pair only when BSHS 1 has
// emptied. Each result read out, pulse and toggle level, is compared with
// sum = a XOR b, carry = a AND b. Mechanisms counted, each of which must
// occur: a request waiting for its acknowledge and an acknowledge waiting for
// its request (in every stage), an automatic transfer started by the
// acknowledge from BSHS 3, operands completing at different steps at BSHS 1,
// all four half-adder input cases, and read-outs.
module tb_bshs_half_adder_system;
  import bshs_pkg::*;

  localparam int NB = 4;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  always #5 clk = ~clk;

  dr_t        a, b, sum, carry, sum_level, carry_level;
  logic       ack_in1, ack_in2, ack_in3, read, ack_out1, ack_out2;
  logic [2:0] req, busy;

  bshs_half_adder_system dut (
    .clk, .rst_n, .a, .b, .ack_in1, .ack_in2, .ack_in3, .read,
    .sum, .carry, .sum_level, .carry_level, .ack_out1, .ack_out2, .req, .busy
  );

  int checks = 0;
  int failures = 0;
  longint step = 0;
  always @(posedge clk) step <= step + 1;

  task automatic check(logic ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL %s at step %0d", what, step);
    end
  endtask

  // ---------------------------------------------------------------- monitors
  int n_req_wait[3] = '{0, 0, 0};    // REQ arrived, ACK not yet there
  int n_ack_wait[3] = '{0, 0, 0};    // ACK arrived, REQ not yet there
  int n_auto = 0;                    // BSHS 1 started by the ACK from BSHS 3
  int n_skew = 0;                    // a and b complete at different steps
  int n_ha[4] = '{0, 0, 0, 0};       // half-adder input cases
  int n_read_words = 0;

  logic [2:0] trig_ack, trig_req, trig_ack_state, trig_req_state;
  assign trig_req       = {dut.u_bshs3.req, dut.u_bshs2.req, dut.u_bshs1.req};
  assign trig_ack       = {dut.u_bshs3.ack_all, dut.u_bshs2.ack_all, dut.u_bshs1.ack_all};
  assign trig_req_state = {dut.u_bshs3.u_c_trig.state[0], dut.u_bshs2.u_c_trig.state[0],
                           dut.u_bshs1.u_c_trig.state[0]};
  assign trig_ack_state = {dut.u_bshs3.u_c_trig.state[1], dut.u_bshs2.u_c_trig.state[1],
                           dut.u_bshs1.u_c_trig.state[1]};

  // Steps at which half-adder results enter BSHS 2, to check the burst rate.
  longint ha_last_step = -1;
  int     ha_bits = 0;
  longint s3_ack_step = -1;
  longint auto_expect_step = -1;

  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < 3; k++) begin
      if (trig_req[k] && !trig_ack[k] && !trig_ack_state[k]) n_req_wait[k]++;
      if (trig_ack[k] && !trig_req[k] && !trig_req_state[k]) n_ack_wait[k]++;
    end
    if (dut.s3_ack_out) begin
      s3_ack_step = step;
      if (trig_req_state[0]) begin
        n_auto++;
        // ACK -> trigger 1, CG 1, SR 1, half adder 1, four bits 3 more,
        // CD 1, REQ join 1: the word is complete in BSHS 2 nine steps later.
        auto_expect_step = step + 9;
      end
    end
    if (dut.req[1] && auto_expect_step >= 0) begin
      check(step == auto_expect_step, "automatic transfer BSHS 1 -> BSHS 2 took 9 steps");
      auto_expect_step = -1;
    end
    if (dut.u_bshs1.ch_done == 2'b01 || dut.u_bshs1.ch_done == 2'b10) n_skew++;
    if (dr_clk(dut.s1_out[1]) && dr_clk(dut.s1_out[0]))
      n_ha[{dut.s1_out[1].t, dut.s1_out[0].t}]++;
    if (dr_clk(dut.ha_out[1])) begin
      if (ha_bits % NB != 0)
        check(step == ha_last_step + 1, "result bits enter BSHS 2 in consecutive steps");
      ha_bits++;
      ha_last_step = step;
    end
  end

  // ---------------------------------------------------------- read-out side
  logic [NB-1:0] exp_sum_q[$], exp_carry_q[$];
  logic [NB-1:0] got_sum, got_carry;
  int            got_bits = 0;
  dr_t           exp_sum_level = '0, exp_carry_level = '0;

  always @(posedge clk) if (rst_n) begin
    if (dr_clk(sum) || dr_clk(carry)) begin
      check(dr_clk(sum) && dr_clk(carry), "sum and carry bits read together");
      got_sum   = {got_sum[NB-2:0], sum.t};
      got_carry = {got_carry[NB-2:0], carry.t};
      if (sum.t) exp_sum_level.t = ~exp_sum_level.t; else exp_sum_level.f = ~exp_sum_level.f;
      if (carry.t) exp_carry_level.t = ~exp_carry_level.t; else exp_carry_level.f = ~exp_carry_level.f;
      got_bits++;
      if (got_bits == NB) begin
        got_bits = 0;
        n_read_words++;
        if (exp_sum_q.size() == 0) begin
          check(1'b0, "result read with none expected");
        end else begin
          logic [NB-1:0] es, ec;
          es = exp_sum_q.pop_front();
          ec = exp_carry_q.pop_front();
          check(got_sum == es && got_carry == ec,
                $sformatf("result sum %b carry %b, expected sum %b carry %b", got_sum, got_carry, es, ec));
        end
      end
    end
  end

  // Toggle levels follow the read pulses one step later.
  dr_t sum_level_exp_d, carry_level_exp_d;
  always @(posedge clk) begin
    sum_level_exp_d   <= exp_sum_level;
    carry_level_exp_d <= exp_carry_level;
  end
  always @(negedge clk) if (rst_n && step > 3) begin
    checks++;
    if (sum_level !== sum_level_exp_d || carry_level !== carry_level_exp_d) begin
      failures++;
      $display("FAIL toggle levels at step %0d", step);
    end
  end

  // ------------------------------------------------------------ stimulus
  task automatic pulse(ref logic sig);
    @(negedge clk);
    sig = 1'b1;
    @(negedge clk);
    sig = 1'b0;
  endtask

  // Send one operand pair, bits leftmost first. gap_max: random idle steps
  // between bits; skew: b starts this many steps after a.
  task automatic send_pair(logic [NB-1:0] av, logic [NB-1:0] bv, int gap_max, int skew);
    int sa[NB], sb[NB];
    int t = 0, last;
    for (int i = 0; i < NB; i++) begin
      sa[i] = t;
      t += 1 + $urandom_range(0, gap_max);
    end
    t = skew;
    for (int i = 0; i < NB; i++) begin
      sb[i] = t;
      t += 1 + $urandom_range(0, gap_max);
    end
    last = (sa[NB-1] > sb[NB-1]) ? sa[NB-1] : sb[NB-1];
    exp_sum_q.push_back(av ^ bv);
    exp_carry_q.push_back(av & bv);
    for (int c = 0; c <= last; c++) begin
      @(negedge clk);
      a = '0;
      b = '0;
      for (int i = 0; i < NB; i++) begin
        if (c == sa[i]) a = dr_pulse(1'b1, av[NB-1-i]);
        if (c == sb[i]) b = dr_pulse(1'b1, bv[NB-1-i]);
      end
    end
    @(negedge clk);
    a = '0;
    b = '0;
  endtask

  task automatic read_word(int spacing);
    for (int i = 0; i < NB; i++) begin
      repeat (spacing) @(negedge clk);
      pulse(read);
    end
  endtask

  task automatic wait_req(int k);
    do @(posedge clk); while (!req[k]);
  endtask

  task automatic do_reset();
    @(negedge clk);
    rst_n = 1'b0;
    repeat (3) @(negedge clk);
    rst_n = 1'b1;
  endtask

  // Part 2 environment state.
  int src_tokens, ack2_tokens, ack3_tokens, readout_words;
  logic busy2_d;

  initial begin
    a = '0; b = '0;
    ack_in1 = 0; ack_in2 = 0; ack_in3 = 0; read = 0;
    got_sum = '0; got_carry = '0;

    // ---------------- part 1: the bench sequence
    do_reset();
    pulse(ack_in1);
    send_pair(4'b0011, 4'b0101, 0, 0);
    wait_req(1);                                  // first pair added, now in BSHS 2
    send_pair(4'b1001, 4'b1010, 0, 0);
    wait_req(0);                                  // second pair held in BSHS 1
    repeat (5) @(negedge clk);
    check(busy == 3'b000, "system idle, both words parked");
    pulse(ack_in2);                               // BSHS 2 -> BSHS 3, then BSHS 1 -> BSHS 2
    wait_req(1);
    repeat (10) @(negedge clk);
    pulse(ack_in3);                               // BSHS 3 -> read-out registers
    repeat (10) @(negedge clk);
    read_word(8);
    repeat (5) @(negedge clk);
    check(n_read_words == 1 && exp_sum_q.size() == 1, "first result read (sum 0110, carry 0001)");
    pulse(ack_in2);
    repeat (15) @(negedge clk);
    pulse(ack_in3);
    repeat (10) @(negedge clk);
    read_word(8);
    repeat (5) @(negedge clk);
    check(n_read_words == 2 && exp_sum_q.size() == 0, "second result read (sum 0011, carry 1000)");

    // ---------------- part 2: random stream under the handshake
    do_reset();
    got_bits = 0;
    pulse(ack_in1);
    src_tokens = 1; ack2_tokens = 1; ack3_tokens = 1; readout_words = 0;
    fork
      begin : source
        for (int w = 0; w < 300; w++) begin
          while (src_tokens == 0) @(negedge clk);
          src_tokens--;
          repeat ($urandom_range(0, 6)) @(negedge clk);
          send_pair(NB'($urandom), NB'($urandom), $urandom_range(0, 2), $urandom_range(0, 3));
        end
      end
      begin : tokens
        busy2_d = 1'b0;
        forever begin
          @(posedge clk);
          if (ack_out2) src_tokens++;                     // BSHS 1 has emptied
          if (busy2_d && !busy[2]) begin                  // BSHS 3 has emptied
            ack2_tokens++;
            readout_words++;
          end
          busy2_d = busy[2];
        end
      end
      begin : ack2_driver
        forever begin
          @(negedge clk);
          if (ack2_tokens > 0 && $urandom_range(0, 15) == 0) begin
            ack2_tokens--;
            pulse(ack_in2);
          end
        end
      end
      begin : ack3_driver
        forever begin
          @(negedge clk);
          if (ack3_tokens > 0 && $urandom_range(0, 15) == 0) begin
            ack3_tokens--;
            pulse(ack_in3);
          end
        end
      end
      begin : reader
        forever begin
          @(negedge clk);
          if (readout_words > 0) begin
            repeat (2) @(negedge clk);
            read_word($urandom_range(1, 10));
            readout_words--;
            ack3_tokens++;
          end
        end
      end
    join_any
    // Let the last words drain.
    repeat (3000) @(negedge clk);
    disable fork;

    check(exp_sum_q.size() == 0, $sformatf("all results read, %0d left", exp_sum_q.size()));
    check(n_read_words == 302, $sformatf("302 results read, got %0d", n_read_words));
    for (int k = 0; k < 3; k++) begin
      check(n_req_wait[k] > 0, $sformatf("BSHS %0d: a request waited for its acknowledge", k + 1));
      check(n_ack_wait[k] > 0, $sformatf("BSHS %0d: an acknowledge waited for its request", k + 1));
    end
    check(n_auto > 0, "automatic transfer started by the acknowledge of BSHS 3");
    check(n_skew > 0, "operands completed at different steps");
    for (int k = 0; k < 4; k++)
      check(n_ha[k] > 0, $sformatf("half-adder input case %0d", k));
    $display("REQ waited: %0d %0d %0d, ACK waited: %0d %0d %0d, automatic: %0d, skewed: %0d, reads: %0d",
             n_req_wait[0], n_req_wait[1], n_req_wait[2], n_ack_wait[0], n_ack_wait[1],
             n_ack_wait[2], n_auto, n_skew, n_read_words);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog: simulation did not finish");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_trng_top - end-to-end test of the self-repairable TRNG.
//
// Runs the whole generator at reduced sizes (16 oscillators per source, 8
// active, parity orders 2/3/4/5, LFSR decimation 5, 2 clean runs to step
// back, source alternation every 2 generations) and walks it through every
// countermeasure by forcing faults on internal nets:
//   1. normal operation: output rate 1 bit per order, datasets pass FIPS and
//      are released word for word as they were produced;
//   2. external alarm (sensor out of range): all oscillators, order +2,
//      recovery when conditions are back;
//   3. medium entropy (raw bits biased to 57 % ones): reset of the source,
//      all oscillators, source change with maximum order, step-back;
//   4. low entropy (raw bits stuck at 0): TRNG stopped, restarted when the
//      entropy is acceptable again;
//   5. entropy test copy B stuck: mismatch, off-line LFSR test, copy B
//      disconnected, off-line re-test after each dataset;
//   6. FIPS test copy A stuck: same for the FIPS pair, copy A disconnected;
//   7. parity filter PP-A stuck: order escalation, switch to PP-B; PP-B
//      stuck as well: LFSR as post-processor (the worst-case scenario: its
//      throughput is measured); then the output stuck: ERROR.
// Each mechanism is counted and a mechanism that never happened is a failure.
// Throughout, the TB checks that released words equal the bits of the last
// complete dataset and that no bit leaves while the TRNG is stopped.
// Timing: 300 MHz clock; about 2.2 million clocks, under 30 s.
// The mechanisms follow the design; the reduced sizes, fault locations and
// the 57 % bias are this test's own choices.
module tb_trng_top;
  import trng_pkg::*;

  logic clk = 0, rst = 1;
  logic sensor_valid = 0;
  logic [11:0] sensor_temp = 12'd2400, sensor_vccint = 12'd1365;
  logic [11:0] sensor_vccaux = 12'd2458, sensor_vccbram = 12'd1365;
  logic rnd_valid, rnd_bit, out_valid, set_released, set_dropped;
  logic [31:0] out_word;
  logic stop, error, ext_alarm, ns_select, ns_enhanced;
  pp_sel_e pp_select;
  logic [1:0] order_sel;
  tc_state_e ent_state, fips_state;
  ns_state_e ns_state;
  pp_state_e pp_state;
  logic [3:0] test_fail;
  logic ent_alarm_med, ent_alarm_low, fips_alarm;

  int checks = 0, failures = 0;
  longint cycle = 0;

  trng_top #(
    .N_RO(16), .N_ACTIVE(8), .PP_ORDERS('{2, 3, 4, 5}), .LFSR_DECIM(5),
    .NS_RECOVER(2), .PP_RECOVER(2), .GENERATIONS(2), .OFF_CYCLES(16), .SETTLE(8)
  ) dut (.*);

  always #1667 clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s (cycle %0d)", what, cycle); end
  endtask

  // ------------------------------------------------ mechanism counters
  typedef enum int {
    M_RELEASE, M_DROP, M_AGING, M_EXT, M_NS_RESET, M_NS_ADD, M_NS_CHANGE,
    M_NS_BACK, M_LOW_STOP, M_ENT_OFFLINE, M_ENT_TEST_A, M_FIPS_OFFLINE,
    M_FIPS_TEST_B, M_O110, M_O120, M_O130, M_PP_B, M_PP_LFSR, M_PP_BACK,
    M_LFSR_OUT, M_ERROR, M_NUM
  } mech_e;
  int mech [M_NUM];
  string mech_name [M_NUM] = '{"release", "drop", "aging switch", "external alarm",
    "ns reset", "ns add ROs", "ns change source", "ns step back", "low-entropy stop",
    "entropy off-line test", "entropy copy B disconnected", "FIPS off-line test",
    "FIPS copy A disconnected", "order 110", "order 120", "order 130", "PP-B",
    "LFSR post-processing", "pp step back", "LFSR output released", "error"};

  ns_state_e ns_q;
  pp_state_e pp_q;
  tc_state_e ent_q, fips_q;
  logic sel_q, stop_q, stop_qq, err_q;

  always @(posedge clk) begin
    cycle++;
    if (!rst) begin
      if (set_released) begin
        mech[M_RELEASE]++;
        if (pp_select == SEL_LFSR) mech[M_LFSR_OUT]++;
      end
      if (set_dropped) mech[M_DROP]++;
      if (dut.aging_sel != sel_q) mech[M_AGING]++;
      if (ns_state != ns_q) begin
        if (ns_state == NS_RESET && ns_q == NS_IDLE) mech[M_NS_RESET]++;
        if (ns_state == NS_ADD && ns_q == NS_RESET) mech[M_NS_ADD]++;
        if (ns_state == NS_ADD && ns_q == NS_IDLE) mech[M_EXT]++;
        if (ns_state == NS_CHANGE) mech[M_NS_CHANGE]++;
        if ((ns_q == NS_CHANGE && ns_state == NS_ADD) || (ns_q == NS_ADD && ns_state != NS_CHANGE) ||
            (ns_q == NS_RESET && ns_state == NS_IDLE)) mech[M_NS_BACK]++;
      end
      if (stop && !stop_q && ent_alarm_low) mech[M_LOW_STOP]++;
      if (ent_state == TC_TESTING && ent_q != TC_TESTING) mech[M_ENT_OFFLINE]++;
      if (ent_state == TC_TEST_A && ent_q == TC_TESTING && test_fail[1]) mech[M_ENT_TEST_A]++;
      if (fips_state == TC_TESTING && fips_q != TC_TESTING) mech[M_FIPS_OFFLINE]++;
      if (fips_state == TC_TEST_B && fips_q == TC_TESTING && test_fail[2]) mech[M_FIPS_TEST_B]++;
      if (pp_state != pp_q) begin
        if (pp_state == PP_O110 && pp_q == PP_IDLE) mech[M_O110]++;
        if (pp_state == PP_O120 && pp_q == PP_O110) mech[M_O120]++;
        if (pp_state == PP_O130 && pp_q != PP_CHANGE) mech[M_O130]++;
        if (pp_state == PP_CHANGE && pp_q == PP_O130) mech[M_PP_B]++;
        if (pp_state == PP_LFSR) mech[M_PP_LFSR]++;
        if ((pp_q == PP_O110 && pp_state == PP_IDLE) || (pp_q == PP_O120 && pp_state == PP_O110) ||
            (pp_q == PP_O130 && pp_state == PP_O120) || (pp_q == PP_CHANGE && pp_state == PP_O130) ||
            (pp_q == PP_LFSR && pp_state == PP_CHANGE)) mech[M_PP_BACK]++;
      end
      if (error && !err_q) mech[M_ERROR]++;
    end
    ns_q <= ns_state; pp_q <= pp_state; ent_q <= ent_state; fips_q <= fips_state;
    sel_q <= dut.aging_sel; stop_q <= stop; stop_qq <= stop_q; err_q <= error;
  end

  // ------------------------------------------- output integrity checks
  // bits of the dataset being written and of the last complete one
  logic [31:0] cur_words [625];
  logic [31:0] done_words [625];
  int bitn = 0, rd_idx = 0, rd_errors = 0, stop_errors = 0;
  always @(posedge clk) begin
    if (!rst) begin
      if (dut.fips_clear) bitn = 0;
      else if (rnd_valid) begin
        cur_words[bitn / 32][bitn % 32] = rnd_bit;
        bitn++;
        if (bitn == 20000) begin
          done_words = cur_words;
          bitn = 0;
          rd_idx = 0;
        end
      end
      if (out_valid) begin
        checks++;
        if (out_word !== done_words[rd_idx]) begin
          failures++;
          if (rd_errors++ < 5) $display("FAIL released word %0d differs", rd_idx);
        end
        rd_idx++;
      end
      // nothing leaves while the TRNG has been stopped for two clocks
      if (stop && stop_q && stop_qq) begin
        checks++;
        if (rnd_valid) begin
          failures++;
          if (stop_errors++ < 5) $display("FAIL output while stopped (cycle %0d)", cycle);
        end
      end
    end
  end

  // ---------------------------------------------------- stimulus helpers
  logic biased = 0;
  always @(posedge clk) biased <= ($urandom % 100) < 57;

  task automatic wait_until(input string what, input int max_cycles, ref logic cond);
    int n = 0;
    while (!cond && n < max_cycles) begin @(negedge clk); n++; end
    check(cond, {"reached: ", what});
  endtask

  logic c;
  task automatic wait_cycles(input int n);
    repeat (n) @(negedge clk);
  endtask

  task automatic sensors(input logic [11:0] t);
    @(negedge clk); sensor_temp = t; sensor_valid = 1;
    @(negedge clk); sensor_valid = 0;
  endtask

  // --------------------------------------------------------- watchdog
  initial begin
    repeat (8000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int gaps_bad;
    longint m_clk, m_bits;
    int last_out;
    void'($urandom(1));
    repeat (4) @(negedge clk);
    rst = 0;
    sensors(12'd2400);

    // 1. normal operation: rate and first releases
    gaps_bad = 0; last_out = -1;
    while (mech[M_RELEASE] < 2) begin
      @(negedge clk);
      if (dut.pp_in_valid) last_out++;
      if (rnd_valid) begin
        if (last_out > 0 && last_out != 2) gaps_bad++;
        last_out = 0;
      end
      if (cycle > 400000) break;
    end
    check(mech[M_RELEASE] >= 2, "two datasets released in normal operation");
    check(gaps_bad == 0, "one output bit per 2 raw bits at order 2");
    check(pp_state == PP_IDLE && ns_state == NS_IDLE && !error, "no countermeasure in normal operation");

    // 2. external alarm
    sensors(12'd3000);   // about 96 C
    c = 0;
    for (int i = 0; i < 100 && !c; i++) begin @(negedge clk); c = (ns_state == NS_ADD); end
    check(c && ns_enhanced && ext_alarm, "external alarm: all oscillators");
    wait_cycles(20);
    check(pp_state == PP_O120, "external alarm: order raised two steps");
    sensors(12'd2400);
    c = 0;
    for (int i = 0; i < 200000 && !c; i++) begin @(negedge clk); c = (ns_state == NS_IDLE); end
    check(c, "recovered from external alarm");
    c = 0;
    for (int i = 0; i < 800000 && !c; i++) begin @(negedge clk); c = (pp_state == PP_IDLE); end
    check(c, "post-processing stepped back to order 100");

    // 3. medium entropy
    force dut.raw_bit = biased;
    c = 0;
    for (int i = 0; i < 200000 && !c; i++) begin @(negedge clk); c = (ns_state == NS_CHANGE); end
    check(c, "medium entropy escalated to a source change");
    check(!stop || fips_state != TC_IDLE || ent_state != TC_IDLE || ent_alarm_low, "medium entropy keeps the TRNG running");
    release dut.raw_bit;
    c = 0;
    for (int i = 0; i < 300000 && !c; i++) begin @(negedge clk); c = (ns_state == NS_IDLE); end
    check(c, "recovered from medium entropy");
    c = 0;
    for (int i = 0; i < 1500000 && !c; i++) begin @(negedge clk); c = (pp_state == PP_IDLE); end
    check(c, "post-processing stepped back to order 100");

    // 4. low entropy
    force dut.raw_bit = 1'b0;
    c = 0;
    for (int i = 0; i < 40000 && !c; i++) begin @(negedge clk); c = stop && ent_alarm_low; end
    check(c, "low entropy stops the TRNG");
    release dut.raw_bit;
    c = 0;
    for (int i = 0; i < 40000 && !c; i++) begin @(negedge clk); c = !stop; end
    check(c, "TRNG restarts once entropy is acceptable");

    // 5. entropy test copy B stuck at 1
    force dut.ent_in_bit_b = 1'b1;
    c = 0;
    for (int i = 0; i < 60000 && !c; i++) begin @(negedge clk); c = (ent_state == TC_TEST_A); end
    check(c && test_fail == 4'b0010, "entropy copy B located and disconnected");
    c = 0;
    for (int i = 0; i < 60000 && !c; i++) begin @(negedge clk); c = (mech[M_ENT_OFFLINE] >= 3); end
    check(c, "single entropy copy re-tested off-line after each dataset");

    // 6. FIPS test copy A stuck at 0
    force dut.fips_in_bit_a = 1'b0;
    c = 0;
    for (int i = 0; i < 800000 && !c; i++) begin @(negedge clk); c = (fips_state == TC_TEST_B); end
    check(c && test_fail[2] && !test_fail[3], "FIPS copy A located and disconnected");

    // 7. post-processing faults
    force dut.pp_a_bit = 1'b0;
    c = 0;
    for (int i = 0; i < 1500000 && !c; i++) begin @(negedge clk); c = (pp_state == PP_CHANGE); end
    check(c && pp_select == SEL_PP_B, "PP-A fault: switched to PP-B");
    force dut.pp_b_bit = 1'b0;
    c = 0;
    for (int i = 0; i < 800000 && !c; i++) begin @(negedge clk); c = (pp_state == PP_LFSR); end
    check(c && pp_select == SEL_LFSR, "PP-B fault: LFSR as post-processor");
    // worst case: one entropy copy, one FIPS copy and both filters failed;
    // expected rate 1/LFSR_DECIM, halved by the entropy off-line tests and
    // reduced by about a tenth by the FIPS off-line tests
    c = 0; m_clk = 0; m_bits = 0;
    for (int i = 0; i < 800000 && !c; i++) begin
      @(negedge clk);
      m_clk++;
      if (rnd_valid) m_bits++;
      c = (mech[M_LFSR_OUT] >= 1);
    end
    check(c, "LFSR-post-processed dataset passed and released");
    $display("worst-case throughput: %0d bits in %0d clocks", m_bits, m_clk);
    check(m_bits * 100 >= m_clk * 7 && m_bits * 100 <= m_clk * 11, "worst-case throughput 0.07..0.11 bit/clock");
    force dut.rnd_bit = 1'b0;
    c = 0;
    for (int i = 0; i < 800000 && !c; i++) begin @(negedge clk); c = error; end
    check(c && stop && pp_state == PP_ERROR, "all post-processing failed: ERROR, stopped");
    wait_cycles(2);
    release dut.rnd_bit;
    release dut.pp_a_bit;
    release dut.pp_b_bit;
    release dut.fips_in_bit_a;
    release dut.ent_in_bit_b;

    for (int m = 0; m < M_NUM; m++) begin
      $display("mechanism %-28s %0d", mech_name[m], mech[m]);
      check(mech[m] > 0, {"mechanism happened: ", mech_name[m]});
    end
    $display("simulated %0d clocks", cycle);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

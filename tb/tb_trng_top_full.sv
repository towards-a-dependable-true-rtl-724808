// tb_trng_top_full - the self-repairable TRNG at its full default size.
//
// Instantiates trng_top with no parameter overrides: two noise sources of
// 256 ring oscillators (128 active), parity orders 100/110/120/130, 8192-bit
// entropy datasets, 20000-bit FIPS datasets. The oscillator models make this
// slow (a few hundred clocks per second of simulation time), so a FIPS
// dataset (2 million clocks at order 100) is out of reach; the test covers
// what fits in a few minutes:
//   - start-up: two entropy datasets of the real noise source graded by both
//     test copies with equal records and no alarm, TRNG not stopped;
//   - output rate: exactly one output bit per 100 raw bits at order 100;
//   - external alarm: an out-of-range temperature code enables all 256
//     oscillators and raises the parity order by two steps (to 120).
// Each of these mechanisms is counted; one that never happens is a failure.
// Timing: 300 MHz clock; about 17000 clocks, under a minute. The sizes are
// the design's own defaults; the test sequence is this test's own.
module tb_trng_top_full;
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
  int ent_graded = 0, ent_bad = 0, outputs = 0, gaps_bad = 0, raw_since = -1;

  trng_top dut (.*);

  always #1667 clk = ~clk;   // 300 MHz

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  always @(posedge clk) begin
    if (!rst) begin
      if (dut.ent_res_valid) begin
        ent_graded++;
        if (dut.ent_res_alarm != 2'b00) ent_bad++;
      end
      if (dut.pp_in_valid && raw_since >= 0) raw_since++;
      if (rnd_valid) begin
        outputs++;
        if (raw_since > 0 && raw_since != 100) gaps_bad++;
        raw_since = 0;
      end
    end
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(7));
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk); sensor_valid = 1; @(negedge clk); sensor_valid = 0;

    while (ent_graded < 2) @(negedge clk);
    check(ent_bad == 0, "entropy of the real noise source graded as good");
    check(ent_state == TC_IDLE && test_fail == 4'b0000, "entropy copies agree");
    check(!stop && !error && ns_state == NS_IDLE, "TRNG running, no countermeasure");
    check(outputs > 100 && gaps_bad == 0, "one output bit per 100 raw bits");
    check(!ns_enhanced && (ns_select ? dut.u_ns_b.ro_en : dut.u_ns_a.ro_en) == {128'd0, {128{1'b1}}},
          "128 oscillators active");

    // external alarm: 3000 is about 96 C
    @(negedge clk); sensor_temp = 12'd3000; sensor_valid = 1;
    @(negedge clk); sensor_valid = 0;
    repeat (20) @(negedge clk);
    check(ext_alarm && ns_state == NS_ADD && ns_enhanced, "external alarm: all oscillators");
    check((ns_select ? dut.u_ns_b.ro_en : dut.u_ns_a.ro_en) == {256{1'b1}}, "256 oscillators active");
    check(pp_state == PP_O120 && order_sel == 2'd2, "external alarm: order 120");

    $display("entropy datasets graded %0d, output bits %0d", ent_graded, outputs);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

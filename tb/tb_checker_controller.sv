// tb_checker_controller - self-checking test of the checker + controller.
// Drives the test-block results directly and checks the glue between the
// four FSMs: a medium-entropy grade reaches the noise-source FSM, whose
// enhance request raises the parity order; a FIPS failure raises it again;
// an entropy-record mismatch obtains the LFSR (grant, test clear and LFSR
// restart in the same clock, TRNG stopped) and, after the golden record
// comes back, returns it with a second clear; when both families mismatch
// at once the entropy pair is served first and the FIPS pair next; an
// external alarm switches on all oscillators.
// Timing: cycle-based clock; records and done pulses are driven by the test.
// The escalation steps follow the design's FSM diagrams; the stimulus
// order, the arbitration priority and the reduced recovery counts are this
// test's own choices.
module tb_checker_controller;
  import trng_pkg::*;
  logic clk = 0, rst = 1;
  logic ent_done = 0, fips_done = 0, ext_alarm = 0;
  ent_cnt_t ent_cnt_a = '0, ent_cnt_b = '0;
  fips_cnt_t fips_cnt_a = '0, fips_cnt_b = '0;
  logic [1:0] ent_alarm_a = 0, ent_alarm_b = 0;
  logic fips_alarm_a = 0, fips_alarm_b = 0;
  logic ent_grant, fips_grant, ent_clear, fips_clear, lfsr_restart;
  logic ent_res_valid, fips_res_valid, fips_res_alarm;
  logic [1:0] ent_res_alarm;
  logic ns_swap, enhance_ns, ns_off, stop, error;
  logic [1:0] order_sel;
  pp_sel_e pp_sel;
  tc_state_e ent_state, fips_state;
  ns_state_e ns_state;
  pp_state_e pp_state;
  logic [3:0] test_fail;
  int checks = 0, failures = 0;
  int ent_clears = 0, fips_clears = 0, restarts = 0, ns_off_clk = 0;

  checker_controller #(.NS_RECOVER(10), .PP_RECOVER(10), .OFF_CYCLES(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (ent_clear) ent_clears++;
    if (fips_clear) fips_clears++;
    if (lfsr_restart) restarts++;
    if (ns_off) ns_off_clk++;
    if (ent_grant && fips_grant) begin failures++; $display("FAIL both granted"); end
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t", what, $time); end
  endtask
  task automatic ent(input ent_cnt_t a, input ent_cnt_t b, input logic [1:0] al);
    @(negedge clk); ent_done = 1; ent_cnt_a = a; ent_cnt_b = b; ent_alarm_a = al; ent_alarm_b = al;
    @(negedge clk); ent_done = 0;
    repeat (30) @(negedge clk);
  endtask
  task automatic fips(input fips_cnt_t a, input fips_cnt_t b, input logic al);
    @(negedge clk); fips_done = 1; fips_cnt_a = a; fips_cnt_b = b; fips_alarm_a = al; fips_alarm_b = al;
    @(negedge clk); fips_done = 0;
    repeat (30) @(negedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    ent_cnt_t e1, e2;
    fips_cnt_t f1, f2;
    e1 = '0; e1.coll2 = 13'd5; e2 = e1; e2.coll3 = 13'd9;
    f1 = '0; f1.ones = 15'd10000; f2 = f1; f2.ones = 15'd10001;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    check(!stop && order_sel == 0 && pp_sel == SEL_PP_A, "reset state");
    // medium entropy grade -> NS RESET -> order 110
    ent(e1, e1, 2'b01);
    check(ns_state == NS_RESET && ns_off_clk == 16, "medium grade reaches NS FSM, shut-down");
    check(order_sel == 1, "enhance_pp raised the order");
    check(!stop, "medium entropy keeps running");
    // FIPS failure -> order 120
    fips(f1, f1, 1);
    check(order_sel == 2 && pp_state == PP_O120, "FIPS alarm raised the order");
    // entropy mismatch -> LFSR lent to the entropy pair
    ent(e1, e2, 2'b00);
    check(ent_grant && stop && ent_state == TC_TESTING, "mismatch: LFSR granted, TRNG stopped");
    check(ent_clears == 1 && restarts == 1, "clear and restart with the grant");
    ent(ENT_GOLDEN, ENT_GOLDEN, 2'b00);
    check(!ent_grant && ent_clears == 2 && ent_state == TC_IDLE && !stop, "golden back: grant returned");
    // both families mismatch: entropy pair first
    @(negedge clk);
    ent_done = 1; ent_cnt_a = e1; ent_cnt_b = e2;
    fips_done = 1; fips_cnt_a = f1; fips_cnt_b = f2;
    @(negedge clk); ent_done = 0; fips_done = 0;
    repeat (5) @(negedge clk);
    check(ent_grant && !fips_grant && fips_state == TC_TESTING, "entropy pair served first");
    ent(ENT_GOLDEN, e2, 2'b00);
    check(ent_state == TC_TEST_A && test_fail[1], "entropy copy B disconnected");
    check(fips_grant && fips_clears == 1, "then FIPS pair granted");
    fips(f2, FIPS_GOLDEN, 0);
    check(fips_state == TC_TEST_B && test_fail[2] && !fips_grant, "FIPS copy A disconnected");
    // external alarm
    @(negedge clk) ext_alarm = 1;
    repeat (5) @(negedge clk);
    check(enhance_ns && ns_state == NS_ADD, "external alarm: all oscillators");
    check(!error, "no error so far");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_noise_source_fsm - self-checking test of the noise-source controller.
// With RECOVER = 3: medium entropy -> RESET (shut-down of OFF_CYCLES clocks,
// one enhance_pp pulse); persisting -> ADD (all oscillators, one more
// pulse); persisting -> CHANGE (source swap, max_pp); 3 clean datasets step
// back each time; persisting in CHANGE -> ERROR. Low entropy holds stop_low
// until a dataset without low alarm. External alarm from IDLE -> ADD with two
// enhance_pp pulses, and clean datasets only count without external alarm.
// Timing: cycle-based clock; entropy grades are driven by the test.
// States and transitions follow the design's noise-source FSM diagram;
// RECOVER is reduced from 10 to 3 for a short run.
module tb_noise_source_fsm;
  import trng_pkg::*;
  logic clk = 0, rst = 1;
  logic ent_valid = 0, med_alarm = 0, low_alarm = 0, ext_alarm = 0;
  logic ns_swap, enhance_ns, ns_off, enhance_pp, max_pp, stop_low, error;
  ns_state_e state;
  int checks = 0, failures = 0;
  int pp_pulses = 0, max_pulses = 0, off_clocks = 0;

  noise_source_fsm #(.RECOVER(3), .OFF_CYCLES(16)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) if (!rst) begin
    if (enhance_pp) pp_pulses++;
    if (max_pp)     max_pulses++;
    if (ns_off)     off_clocks++;
  end

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t state=%b", what, $time, state); end
  endtask

  task automatic grade(input logic m, input logic l);
    @(negedge clk); ent_valid = 1; med_alarm = m; low_alarm = l;
    @(negedge clk); ent_valid = 0; med_alarm = 0; low_alarm = 0;
    repeat (20) @(negedge clk);
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    grade(0, 0);
    check(state == NS_IDLE && !enhance_ns, "clean stays idle");
    grade(1, 0);
    check(state == NS_RESET, "medium -> RESET");
    check(off_clocks == 16, "transient shut-down of 16 clocks");
    check(pp_pulses == 1, "one enhance_pp in RESET");
    check(!stop_low, "medium entropy does not stop");
    grade(1, 0);
    check(state == NS_ADD && enhance_ns, "persisting -> ADD, all oscillators");
    check(pp_pulses == 2, "second enhance_pp");
    grade(1, 0);
    check(state == NS_CHANGE && ns_swap == 1 && max_pulses == 1, "persisting -> CHANGE, swap, max order");
    repeat (3) grade(0, 0);
    check(state == NS_ADD && ns_swap == 1, "3 clean -> back to ADD, source stays swapped");
    repeat (3) grade(0, 0);
    check(state == NS_RESET, "3 clean -> back to RESET");
    repeat (2) grade(0, 0);
    check(state == NS_RESET, "2 clean are not enough");
    grade(0, 0);
    check(state == NS_IDLE, "3 clean -> IDLE");
    // low entropy stops the TRNG until acceptable
    grade(1, 1);
    check(state == NS_RESET && stop_low, "low -> RESET and stop");
    grade(0, 0);
    check(!stop_low, "acceptable entropy restarts");
    repeat (3) grade(0, 0);
    check(state == NS_IDLE, "back to IDLE");
    // external alarm
    pp_pulses = 0;
    @(negedge clk) ext_alarm = 1;
    repeat (5) @(negedge clk);
    check(state == NS_ADD && enhance_ns && pp_pulses == 2, "external alarm -> ADD, two order steps");
    repeat (4) grade(0, 0);
    check(state == NS_ADD, "no recovery while external alarm lasts");
    @(negedge clk) ext_alarm = 0;
    repeat (3) grade(0, 0);
    check(state == NS_IDLE, "recovery to IDLE after external alarm");
    // escalate to ERROR
    repeat (4) grade(1, 0);
    check(state == NS_ERROR && error, "persisting in CHANGE -> ERROR");
    repeat (5) grade(0, 0);
    check(state == NS_ERROR, "ERROR is kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

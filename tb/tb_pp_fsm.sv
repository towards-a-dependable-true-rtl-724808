// tb_pp_fsm - self-checking test of the post-processing controller.
// With RECOVER = 2: FIPS failures step through orders 110, 120, 130, PP-B,
// LFSR and ERROR; enhance_pp steps the same way; max_pp jumps to order 130;
// two passing datasets step back by one state.
// Timing: cycle-based clock; FIPS results are driven by the test.
// States follow the design's post-processing FSM diagram; RECOVER is
// reduced from 10 to 2 for a short run.
module tb_pp_fsm;
  import trng_pkg::*;
  logic clk = 0, rst = 1;
  logic fips_valid = 0, fips_alarm = 0, enhance_pp = 0, max_pp = 0;
  logic [1:0] order_sel;
  pp_sel_e pp_sel;
  logic error;
  pp_state_e state;
  int checks = 0, failures = 0;

  pp_fsm #(.RECOVER(2)) dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t state=%b", what, $time, state); end
  endtask
  task automatic verdict(input logic a);
    @(negedge clk); fips_valid = 1; fips_alarm = a;
    @(negedge clk); fips_valid = 0; fips_alarm = 0;
  endtask
  task automatic pulse_enh();
    @(negedge clk); enhance_pp = 1;
    @(negedge clk); enhance_pp = 0;
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
    @(negedge clk);
    check(state == PP_IDLE && order_sel == 0 && pp_sel == SEL_PP_A, "idle: PP-A order 100");
    verdict(1);
    check(state == PP_O110 && order_sel == 1, "FIPS alarm -> 110");
    pulse_enh();
    check(state == PP_O120 && order_sel == 2, "enhance -> 120");
    verdict(0); verdict(0);
    check(state == PP_O110, "2 passes -> back to 110");
    @(negedge clk); max_pp = 1; @(negedge clk); max_pp = 0;
    check(state == PP_O130 && order_sel == 3 && pp_sel == SEL_PP_A, "max_pp -> 130");
    verdict(0); verdict(1);
    check(state == PP_CHANGE && pp_sel == SEL_PP_B && order_sel == 3, "alarm -> PP-B at 130");
    verdict(1);
    check(state == PP_LFSR && pp_sel == SEL_LFSR, "alarm -> LFSR");
    verdict(0); verdict(0);
    check(state == PP_CHANGE, "2 passes -> back to PP-B");
    verdict(1); verdict(1);
    check(state == PP_ERROR && error, "-> ERROR");
    verdict(0); verdict(0); verdict(0);
    check(state == PP_ERROR, "ERROR kept");
    force dut.st = pp_state_e'(7'b0000011);
    @(negedge clk); release dut.st; @(negedge clk);
    check(state == PP_O130, "illegal code -> 130th order");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

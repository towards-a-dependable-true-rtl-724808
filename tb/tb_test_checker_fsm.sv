// tb_test_checker_fsm - self-checking test of the duplicated-test checker.
// Walks the FSM through: equal records (result passed on), a mismatch that
// proves transient (both copies pass the off-line test, back to IDLE), a
// mismatch where copy B fails off-line (TEST_A, then an off-line re-test
// after every dataset, results taken from A), copy A failing later too
// (ERROR), and after a reset a mismatch where A fails (TEST_B). Checks the
// LFSR request, the stop output and the one-clock result latency.
// Timing: cycle-based clock; records are driven by the test, an illegal state
// is forced to check self-recovery. States follow the design's test-FSM
// diagram; the return to IDLE after a transient mismatch is this design's own.
module tb_test_checker_fsm;
  import trng_pkg::*;
  localparam logic [7:0] G = 8'hA5;
  logic clk = 0, rst = 1;
  logic done = 0;
  logic [7:0] cnt_a = 0, cnt_b = 0;
  logic alarm_a = 0, alarm_b = 0;
  logic off_req, off_grant = 0, res_valid, res_alarm, stop, fail_a, fail_b, error;
  logic [0:0] res_alarm_v;
  tc_state_e state;
  int checks = 0, failures = 0;

  test_checker_fsm #(.W(8), .AW(1), .GOLDEN(G)) dut (
    .clk, .rst, .done, .cnt_a, .cnt_b, .alarm_a(alarm_a), .alarm_b(alarm_b),
    .off_req, .off_grant, .res_valid, .res_alarm(res_alarm_v), .stop, .fail_a,
    .fail_b, .error, .state);
  assign res_alarm = res_alarm_v[0];

  always #5 clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s t=%0t state=%b", what, $time, state); end
  endtask

  // one dataset end: done for one clock with the given records
  task automatic dataset(input logic [7:0] a, input logic [7:0] b, input logic al_a, input logic al_b);
    @(negedge clk); done = 1; cnt_a = a; cnt_b = b; alarm_a = al_a; alarm_b = al_b;
    @(negedge clk); done = 0;
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
    check(state == TC_IDLE && !stop && !off_req, "idle after reset");
    // equal records: result passed on after one clock
    dataset(8'h11, 8'h11, 1, 0);
    check(res_valid && res_alarm == 1, "equal records: result from copy A");
    check(state == TC_IDLE, "stays idle");
    // transient mismatch
    dataset(8'h11, 8'h12, 0, 0);
    check(!res_valid, "mismatch: no result");
    check(state == TC_TESTING && off_req && stop, "mismatch -> TESTING, stop, LFSR request");
    dataset(8'h33, 8'h44, 0, 0);   // not granted yet: ignored
    check(state == TC_TESTING, "done ignored without grant");
    off_grant = 1;
    dataset(G, G, 0, 0);
    check(state == TC_IDLE && !stop, "both pass off-line -> IDLE");
    off_grant = 0;
    // copy B faulty
    dataset(8'h20, 8'h21, 0, 0);
    off_grant = 1;
    dataset(G, 8'h00, 0, 0);
    check(state == TC_TEST_A && fail_b && !fail_a && !stop, "fail_b -> TEST_A");
    off_grant = 0;
    dataset(8'h55, 8'h66, 1, 0);
    check(res_valid && res_alarm == 1, "TEST_A: result from copy A");
    check(state == TC_TESTING && fail_b, "End_Test -> off-line re-test");
    off_grant = 1;
    dataset(G, 8'h00, 0, 0);
    check(state == TC_TEST_A, "A passes re-test");
    off_grant = 0;
    dataset(8'h55, 8'h66, 0, 1);
    check(res_valid && res_alarm == 0, "TEST_A ignores copy B");
    off_grant = 1;
    dataset(8'h01, G, 0, 0);
    check(state == TC_ERROR && error && stop, "A fails too -> ERROR");
    off_grant = 0;
    repeat (3) dataset(8'h00, 8'h00, 0, 0);
    check(state == TC_ERROR && !res_valid, "ERROR is kept");
    // reset, copy A faulty
    rst = 1; @(negedge clk); rst = 0;
    dataset(8'h20, 8'h21, 0, 0);
    off_grant = 1;
    dataset(8'h00, G, 0, 0);
    check(state == TC_TEST_B && fail_a && !fail_b, "fail_a -> TEST_B");
    off_grant = 0;
    dataset(8'h55, 8'h66, 0, 1);
    check(res_valid && res_alarm == 1, "TEST_B: result from copy B");
    // illegal state code recovers to TESTING
    force dut.st = tc_state_e'(5'b00110);
    @(negedge clk); release dut.st;
    @(negedge clk);
    check(state == TC_TESTING, "illegal code -> TESTING");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

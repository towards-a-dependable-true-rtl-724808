// tb_fault_campaign - single-bit-flip fault injection into the running TRNG.
//
// A small version of a bit-flip dependability campaign. The generator runs
// at the same reduced sizes as the end-to-end test (16 oscillators per
// source, orders 2/3/4/5, 2 clean runs to step back). Once it is producing
// released datasets, the test flips one randomly chosen bit of one randomly
// chosen live register:
//   - state registers of the entropy-test, FIPS-test, noise-source and
//     post-processing FSMs (the flip gives an illegal one-hot code);
//   - the frequency counter of entropy copy A or B;
//   - the monobit counter of FIPS copy A or B;
//   - the shift register of parity filter A;
//   - the LFSR state.
// The flip is made by forcing the flipped value for one clock and then
// releasing the register, which keeps the value until the logic next writes
// it. Each injection is then watched for 60000 clocks, about one FIPS
// dataset. It is classed as detected when any alarm, a test-copy mismatch,
// a countermeasure or a dropped dataset follows, and as masked otherwise.
// Checks: no single flip may drive the generator into ERROR; after every
// injection the generator must be running again (not stopped) within the
// next 60000 clocks; and both classes must occur.
// Timing: 300 MHz clock; 40 injections, about 2.5 million clocks.
// The fault model (single bit flips in registers) follows the dependability
// goals of the design; the register list, the window and the number of
// injections are this test's own choices.
module tb_fault_campaign;
  import trng_pkg::*;

  localparam int N_INJ = 40;
  localparam int WINDOW = 60000;

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
  int detected = 0, masked = 0, released = 0;
  int per_target [10];
  logic seen;

  trng_top #(
    .N_RO(16), .N_ACTIVE(8), .PP_ORDERS('{2, 3, 4, 5}), .LFSR_DECIM(5),
    .NS_RECOVER(2), .PP_RECOVER(2), .GENERATIONS(2), .OFF_CYCLES(16), .SETTLE(8)
  ) dut (.*);

  always #1667 clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("FAIL %s", what); end
  endtask

  // anything the self-test machinery reacts with
  always @(posedge clk) begin
    if (!rst) begin
      if (set_released) released++;
      if (ent_state != TC_IDLE || fips_state != TC_IDLE || ns_state != NS_IDLE ||
          ent_alarm_med || fips_alarm || set_dropped ||
          (dut.u_ctrl.fips_res_valid && dut.u_ctrl.fips_res_alarm))
        seen = 1'b1;
    end
  end

  task automatic inject(input int target);
    int b;
    @(negedge clk);
    unique case (target)
      0: begin
        b = $urandom % 5;
        force dut.u_ctrl.u_tc_ent.st = tc_state_e'(dut.u_ctrl.u_tc_ent.st ^ (5'd1 << b));
      end
      1: begin
        b = $urandom % 5;
        force dut.u_ctrl.u_tc_fips.st = tc_state_e'(dut.u_ctrl.u_tc_fips.st ^ (5'd1 << b));
      end
      2: begin
        b = $urandom % 5;
        force dut.u_ctrl.u_ns_fsm.st = ns_state_e'(dut.u_ctrl.u_ns_fsm.st ^ (5'd1 << b));
      end
      3: begin
        b = $urandom % 7;
        force dut.u_ctrl.u_pp_fsm.st = pp_state_e'(dut.u_ctrl.u_pp_fsm.st ^ (7'd1 << b));
      end
      4: begin
        b = $urandom % 15;
        force dut.u_ent_a.freq = dut.u_ent_a.freq ^ (15'sd1 <<< b);
      end
      5: begin
        b = $urandom % 15;
        force dut.u_ent_b.freq = dut.u_ent_b.freq ^ (15'sd1 <<< b);
      end
      6: begin
        b = $urandom % 15;
        force dut.u_fips_a.ones = dut.u_fips_a.ones ^ (15'd1 << b);
      end
      7: begin
        b = $urandom % 15;
        force dut.u_fips_b.ones = dut.u_fips_b.ones ^ (15'd1 << b);
      end
      8: begin
        b = $urandom % 4;
        force dut.u_pp_a.sr = dut.u_pp_a.sr ^ (4'd1 << b);
      end
      default: begin
        b = $urandom % 64;
        force dut.u_lfsr.state = dut.u_lfsr.state ^ (64'd1 << b);
      end
    endcase
    @(negedge clk);
    unique case (target)
      0: release dut.u_ctrl.u_tc_ent.st;
      1: release dut.u_ctrl.u_tc_fips.st;
      2: release dut.u_ctrl.u_ns_fsm.st;
      3: release dut.u_ctrl.u_pp_fsm.st;
      4: release dut.u_ent_a.freq;
      5: release dut.u_ent_b.freq;
      6: release dut.u_fips_a.ones;
      7: release dut.u_fips_b.ones;
      8: release dut.u_pp_a.sr;
      default: release dut.u_lfsr.state;
    endcase
  endtask

  initial begin
    repeat (7000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int target, n;
    logic c;
    void'($urandom(11));
    repeat (4) @(negedge clk);
    rst = 0;
    @(negedge clk); sensor_valid = 1; @(negedge clk); sensor_valid = 0;
    while (released < 1) @(negedge clk);

    for (int k = 0; k < N_INJ; k++) begin
      target = $urandom % 10;
      per_target[target]++;
      seen = 1'b0;
      inject(target);
      c = 1'b0;
      for (n = 0; n < WINDOW; n++) begin
        @(negedge clk);
        if (error) c = 1'b1;
      end
      check(!c, $sformatf("no ERROR after injection %0d (target %0d)", k, target));
      if (seen) detected++; else masked++;
      c = !stop;
      for (n = 0; n < WINDOW && !c; n++) begin @(negedge clk); c = !stop; end
      check(c, $sformatf("running again after injection %0d (target %0d)", k, target));
    end

    $display("injections %0d: detected %0d, masked %0d; datasets released %0d",
             N_INJ, detected, masked, released);
    for (int t = 0; t < 10; t++) $display("  target %0d: %0d injections", t, per_target[t]);
    check(detected > 0, "some flips detected");
    check(masked > 0, "some flips masked");
    check(released > N_INJ / 2, "datasets kept being released");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// checker_controller - the checker + controller of the self-repairable TRNG.
//
// Holds the four controller FSMs and the glue between them:
//  - two test_checker_fsm instances, one for the duplicated entropy tests
//    (golden record ENT_GOLDEN) and one for the duplicated FIPS tests
//    (FIPS_GOLDEN);
//  - the noise_source_fsm, fed by the trusted entropy grades and the
//    external (operating-condition) alarm;
//  - the pp_fsm, fed by the trusted FIPS verdicts and the noise-source
//    controller's enhance requests;
//  - an arbiter lending the single LFSR to one test checker at a time for
//    its off-line test (the entropy checker first when both ask). When a
//    grant starts, the LFSR is restarted from its seed and the granted pair
//    of tests is cleared so that they see exactly the known sequence; when
//    it ends the pair is cleared again to start a clean dataset of normal
//    data.
// stop gathers every reason to hold the TRNG output: an off-line test, low
// entropy, or any FSM in its error state.
//
// Interface: grants and the clear/restart pulses are registered and rise in
// the same clock; the first LFSR bit reaches the tests two clocks after the
// grant rises.
// Follows the source design: four FSMs with the inputs and outputs listed
// for them, the shared LFSR for off-line testing. Own choices: the arbiter
// and its priority.
module checker_controller
  import trng_pkg::*;
#(
  parameter int unsigned NS_RECOVER = 10,
  parameter int unsigned PP_RECOVER = 10,
  parameter int unsigned OFF_CYCLES = 16
) (
  input  logic       clk,
  input  logic       rst,
  // duplicated entropy tests
  input  logic       ent_done,
  input  ent_cnt_t   ent_cnt_a,
  input  ent_cnt_t   ent_cnt_b,
  input  logic [1:0] ent_alarm_a,   // {low, medium}
  input  logic [1:0] ent_alarm_b,
  // duplicated FIPS tests
  input  logic       fips_done,
  input  fips_cnt_t  fips_cnt_a,
  input  fips_cnt_t  fips_cnt_b,
  input  logic       fips_alarm_a,
  input  logic       fips_alarm_b,
  // operating conditions
  input  logic       ext_alarm,
  // LFSR lending
  output logic       ent_grant,
  output logic       fips_grant,
  output logic       ent_clear,
  output logic       fips_clear,
  output logic       lfsr_restart,
  // trusted results
  output logic       ent_res_valid,
  output logic [1:0] ent_res_alarm,
  output logic       fips_res_valid,
  output logic       fips_res_alarm,
  // control of the datapath
  output logic       ns_swap,
  output logic       enhance_ns,
  output logic       ns_off,
  output logic [1:0] order_sel,
  output pp_sel_e    pp_sel,
  output logic       stop,
  output logic       error,
  // status
  output tc_state_e  ent_state,
  output tc_state_e  fips_state,
  output ns_state_e  ns_state,
  output pp_state_e  pp_state,
  output logic [3:0] test_fail      // {fips B, fips A, entropy B, entropy A}
);

  logic ent_req, fips_req;
  logic ent_stop, fips_stop, ent_err, fips_err;
  logic ns_stop_low, ns_err, pp_err;
  logic enhance_pp, max_pp;
  logic ent_fa, ent_fb, fips_fa, fips_fb;

  test_checker_fsm #(
    .W(ENT_CNT_W), .AW(2), .GOLDEN(ENT_GOLDEN)
  ) u_tc_ent (
    .clk, .rst,
    .done     (ent_done),
    .cnt_a    (ent_cnt_a),
    .cnt_b    (ent_cnt_b),
    .alarm_a  (ent_alarm_a),
    .alarm_b  (ent_alarm_b),
    .off_req  (ent_req),
    .off_grant(ent_grant),
    .res_valid(ent_res_valid),
    .res_alarm(ent_res_alarm),
    .stop     (ent_stop),
    .fail_a   (ent_fa),
    .fail_b   (ent_fb),
    .error    (ent_err),
    .state    (ent_state)
  );

  test_checker_fsm #(
    .W(FIPS_CNT_W), .AW(1), .GOLDEN(FIPS_GOLDEN)
  ) u_tc_fips (
    .clk, .rst,
    .done     (fips_done),
    .cnt_a    (fips_cnt_a),
    .cnt_b    (fips_cnt_b),
    .alarm_a  (fips_alarm_a),
    .alarm_b  (fips_alarm_b),
    .off_req  (fips_req),
    .off_grant(fips_grant),
    .res_valid(fips_res_valid),
    .res_alarm(fips_res_alarm),
    .stop     (fips_stop),
    .fail_a   (fips_fa),
    .fail_b   (fips_fb),
    .error    (fips_err),
    .state    (fips_state)
  );

  noise_source_fsm #(
    .RECOVER(NS_RECOVER), .OFF_CYCLES(OFF_CYCLES)
  ) u_ns_fsm (
    .clk, .rst,
    .ent_valid (ent_res_valid),
    .med_alarm (ent_res_alarm[0]),
    .low_alarm (ent_res_alarm[1]),
    .ext_alarm (ext_alarm),
    .ns_swap   (ns_swap),
    .enhance_ns(enhance_ns),
    .ns_off    (ns_off),
    .enhance_pp(enhance_pp),
    .max_pp    (max_pp),
    .stop_low  (ns_stop_low),
    .error     (ns_err),
    .state     (ns_state)
  );

  pp_fsm #(.RECOVER(PP_RECOVER)) u_pp_fsm (
    .clk, .rst,
    .fips_valid(fips_res_valid),
    .fips_alarm(fips_res_alarm),
    .enhance_pp(enhance_pp),
    .max_pp    (max_pp),
    .order_sel (order_sel),
    .pp_sel    (pp_sel),
    .error     (pp_err),
    .state     (pp_state)
  );

  // LFSR arbiter
  always_ff @(posedge clk) begin
    if (rst) begin
      ent_grant    <= 1'b0;
      fips_grant   <= 1'b0;
      ent_clear    <= 1'b0;
      fips_clear   <= 1'b0;
      lfsr_restart <= 1'b0;
    end else begin
      ent_clear    <= 1'b0;
      fips_clear   <= 1'b0;
      lfsr_restart <= 1'b0;
      if (ent_grant) begin
        if (!ent_req) begin
          ent_grant <= 1'b0;
          ent_clear <= 1'b1;
        end
      end else if (fips_grant) begin
        if (!fips_req) begin
          fips_grant <= 1'b0;
          fips_clear <= 1'b1;
        end
      end else if (ent_req) begin
        ent_grant    <= 1'b1;
        ent_clear    <= 1'b1;
        lfsr_restart <= 1'b1;
      end else if (fips_req) begin
        fips_grant   <= 1'b1;
        fips_clear   <= 1'b1;
        lfsr_restart <= 1'b1;
      end
    end
  end

  assign error     = ent_err || fips_err || ns_err || pp_err;
  assign stop      = ent_stop || fips_stop || ns_stop_low || error;
  assign test_fail = {fips_fb, fips_fa, ent_fb, ent_fa};

  // the LFSR is lent to one test pair at a time
  assert property (@(posedge clk) disable iff (rst) !(ent_grant && fips_grant));

endmodule

// trng_top - self-repairable true random number generator.
//
// A ring-oscillator TRNG in which every block that decides the quality of
// the output exists twice or has a fall-back, so that a fault can be
// detected, located and worked around instead of silently degrading the
// numbers:
//  - two noise sources NS-A / NS-B (256 oscillators each, 128 active), one
//    active at a time, alternated for even ageing and swapped on persistent
//    entropy loss;
//  - two duplicated entropy tests grading every 8192 raw bits (medium / low
//    entropy alarms);
//  - two parity-filter post-processors PP-A / PP-B with orders 100..130, and
//    a 64-bit LFSR that can take over as post-processor;
//  - two duplicated FIPS 140-2 test blocks on every 20000 output bits;
//  - the checker + controller, which cross-checks the duplicated tests,
//    self-tests them off-line with the LFSR's known sequence, and escalates
//    the noise-source and post-processing countermeasures;
//  - an operating-condition monitor on the on-chip sensor readings;
//  - a 20 Kbit buffer that releases a dataset only after it passed FIPS.
// Data path per clock: selected noise source -> raw bit -> entropy tests
// and both parity filters (and the LFSR) -> selected post-processor ->
// FIPS tests and output buffer -> 32-bit words out.
//
// Interface: clk is the 300 MHz sampling clock, rst synchronous and active
// high. The sensor codes come from the FPGA's sensor ADC (not part of this
// RTL). rnd_valid/rnd_bit is the post-processed stream before the FIPS
// verdict; out_valid/out_word carries only datasets that passed. stop means
// no numbers are being produced; error that an FSM reached its error state
// and needs the user.
// Timing: best case one output bit per 100 clocks (order-100 filter).
//
// Follows the source design: the block diagram with its input multiplexers,
// the blocks and FSMs listed above and their parameters. Own choices: the
// settling gap after a source switch or shut-down (SETTLE clocks in which raw
// bits are ignored), that parity filters are fed only while the TRNG runs,
// that the unused noise source is stopped.
module trng_top
  import trng_pkg::*;
#(
  parameter int unsigned N_RO         = 256,
  parameter int unsigned N_ACTIVE     = 128,
  parameter int unsigned PP_ORDERS [4] = '{100, 110, 120, 130},
  parameter int unsigned LFSR_DECIM   = 130,
  parameter int unsigned NS_RECOVER   = 10,
  parameter int unsigned PP_RECOVER   = 10,
  parameter int unsigned GENERATIONS  = 1000,
  parameter int unsigned OFF_CYCLES   = 16,
  parameter int unsigned SETTLE       = 8
) (
  input  logic        clk,
  input  logic        rst,
  // on-chip sensor readings (12-bit ADC codes)
  input  logic        sensor_valid,
  input  logic [11:0] sensor_temp,
  input  logic [11:0] sensor_vccint,
  input  logic [11:0] sensor_vccaux,
  input  logic [11:0] sensor_vccbram,
  // post-processed stream, not yet FIPS-approved
  output logic        rnd_valid,
  output logic        rnd_bit,
  // FIPS-approved output words
  output logic        out_valid,
  output logic [31:0] out_word,
  output logic        set_released,   // a passed dataset has been read out
  output logic        set_dropped,    // a failed dataset was discarded
  // status
  output logic        stop,
  output logic        error,
  output logic        ext_alarm,
  output logic        ns_select,      // 0: NS-A, 1: NS-B
  output logic        ns_enhanced,    // all oscillators running
  output pp_sel_e     pp_select,
  output logic [1:0]  order_sel,
  output tc_state_e   ent_state,
  output tc_state_e   fips_state,
  output ns_state_e   ns_state,
  output pp_state_e   pp_state,
  output logic [3:0]  test_fail,
  output logic        ent_alarm_med,
  output logic        ent_alarm_low,
  output logic        fips_alarm
);

  // ---------------------------------------------------------- controller
  logic       ent_done_a, ent_done_b, fips_done_a, fips_done_b;
  ent_cnt_t   ent_cnt_a, ent_cnt_b;
  fips_cnt_t  fips_cnt_a, fips_cnt_b;
  logic       ent_med_a, ent_low_a, ent_med_b, ent_low_b;
  logic       fips_al_a, fips_al_b;
  logic       ent_grant, fips_grant, ent_clear, fips_clear, lfsr_restart;
  logic       ent_res_valid, fips_res_valid, fips_res_alarm;
  logic [1:0] ent_res_alarm;
  logic       ns_swap, ns_off, aging_sel;

  checker_controller #(
    .NS_RECOVER(NS_RECOVER), .PP_RECOVER(PP_RECOVER), .OFF_CYCLES(OFF_CYCLES)
  ) u_ctrl (
    .clk, .rst,
    .ent_done      (ent_done_a),
    .ent_cnt_a     (ent_cnt_a),
    .ent_cnt_b     (ent_cnt_b),
    .ent_alarm_a   ({ent_low_a, ent_med_a}),
    .ent_alarm_b   ({ent_low_b, ent_med_b}),
    .fips_done     (fips_done_a),
    .fips_cnt_a    (fips_cnt_a),
    .fips_cnt_b    (fips_cnt_b),
    .fips_alarm_a  (fips_al_a),
    .fips_alarm_b  (fips_al_b),
    .ext_alarm     (ext_alarm),
    .ent_grant     (ent_grant),
    .fips_grant    (fips_grant),
    .ent_clear     (ent_clear),
    .fips_clear    (fips_clear),
    .lfsr_restart  (lfsr_restart),
    .ent_res_valid (ent_res_valid),
    .ent_res_alarm (ent_res_alarm),
    .fips_res_valid(fips_res_valid),
    .fips_res_alarm(fips_res_alarm),
    .ns_swap       (ns_swap),
    .enhance_ns    (ns_enhanced),
    .ns_off        (ns_off),
    .order_sel     (order_sel),
    .pp_sel        (pp_select),
    .stop          (stop),
    .error         (error),
    .ent_state     (ent_state),
    .fips_state    (fips_state),
    .ns_state      (ns_state),
    .pp_state      (pp_state),
    .test_fail     (test_fail)
  );

  aging_counter #(.GENERATIONS(GENERATIONS)) u_aging (
    .clk, .rst,
    .gen_done(fips_res_valid),
    .sel     (aging_sel)
  );

  opcond_monitor u_opcond (
    .clk, .rst,
    .sample_valid(sensor_valid),
    .temp        (sensor_temp),
    .vccint      (sensor_vccint),
    .vccaux      (sensor_vccaux),
    .vccbram     (sensor_vccbram),
    .ext_alarm   (ext_alarm)
  );

  // -------------------------------------------------------- noise sources
  logic ns_a_bit, ns_b_bit;
  logic ns_sel_q;
  logic [$clog2(SETTLE + 1)-1:0] settle;
  logic raw_valid, raw_bit;

  assign ns_select = aging_sel ^ ns_swap;

  noise_source #(.N_RO(N_RO), .N_ACTIVE(N_ACTIVE), .SEED(1)) u_ns_a (
    .clk, .rst,
    .enable (!ns_select && !ns_off),
    .enhance(ns_enhanced),
    .raw_bit(ns_a_bit)
  );

  noise_source #(.N_RO(N_RO), .N_ACTIVE(N_ACTIVE), .SEED(2)) u_ns_b (
    .clk, .rst,
    .enable (ns_select && !ns_off),
    .enhance(ns_enhanced),
    .raw_bit(ns_b_bit)
  );

  // raw bits are ignored for SETTLE clocks after the source changed or
  // was shut down, while the extractor pipeline refills
  always_ff @(posedge clk) begin
    if (rst) begin
      ns_sel_q <= 1'b0;
      settle   <= ($bits(settle))'(SETTLE);
    end else begin
      ns_sel_q <= ns_select;
      if (ns_off || ns_select != ns_sel_q) settle <= ($bits(settle))'(SETTLE);
      else if (settle != '0)               settle <= settle - 1'b1;
    end
  end

  assign raw_bit   = ns_select ? ns_b_bit : ns_a_bit;
  assign raw_valid = (settle == '0) && !ns_off;

  // ------------------------------------------------------------------ LFSR
  logic lfsr_bit, lfsr_valid;

  galois_lfsr #(.DECIM(LFSR_DECIM)) u_lfsr (
    .clk, .rst,
    .restart     (lfsr_restart),
    .enable      (1'b1),
    .testing_mode(ent_grant || fips_grant),
    .ns_a        (ns_a_bit),
    .ns_b        (ns_b_bit),
    .ns_sel      (ns_select),
    .rng         (lfsr_bit),
    .out_valid   (lfsr_valid)
  );

  // ------------------------------------------------------ entropy tests
  // each copy has its own input multiplexer: raw bits or the LFSR
  logic ent_in_valid_a, ent_in_bit_a, ent_in_valid_b, ent_in_bit_b;

  assign ent_in_valid_a = ent_grant ? lfsr_valid : raw_valid;
  assign ent_in_bit_a   = ent_grant ? lfsr_bit   : raw_bit;
  assign ent_in_valid_b = ent_grant ? lfsr_valid : raw_valid;
  assign ent_in_bit_b   = ent_grant ? lfsr_bit   : raw_bit;

  entropy_test u_ent_a (
    .clk, .rst,
    .clear       (ent_clear),
    .in_valid    (ent_in_valid_a),
    .in_bit      (ent_in_bit_a),
    .done        (ent_done_a),
    .medium_alarm(ent_med_a),
    .low_alarm   (ent_low_a),
    .cnt         (ent_cnt_a)
  );

  entropy_test u_ent_b (
    .clk, .rst,
    .clear       (ent_clear),
    .in_valid    (ent_in_valid_b),
    .in_bit      (ent_in_bit_b),
    .done        (ent_done_b),
    .medium_alarm(ent_med_b),
    .low_alarm   (ent_low_b),
    .cnt         (ent_cnt_b)
  );

  // ---------------------------------------------------- post-processing
  logic pp_in_valid;
  logic pp_a_valid, pp_a_bit, pp_b_valid, pp_b_bit;
  logic sel_valid, sel_bit;

  assign pp_in_valid = raw_valid && !stop;

  parity_filter #(.ORDERS(PP_ORDERS)) u_pp_a (
    .clk, .rst,
    .in_valid (pp_in_valid),
    .in_bit   (raw_bit),
    .order_sel(order_sel),
    .out_valid(pp_a_valid),
    .out_bit  (pp_a_bit)
  );

  parity_filter #(.ORDERS(PP_ORDERS)) u_pp_b (
    .clk, .rst,
    .in_valid (pp_in_valid),
    .in_bit   (raw_bit),
    .order_sel(order_sel),
    .out_valid(pp_b_valid),
    .out_bit  (pp_b_bit)
  );

  always_comb begin
    unique case (pp_select)
      SEL_PP_B: begin
        sel_valid = pp_b_valid;
        sel_bit   = pp_b_bit;
      end
      SEL_LFSR: begin
        sel_valid = lfsr_valid && !ent_grant && !fips_grant && !stop;
        sel_bit   = lfsr_bit;
      end
      default: begin
        sel_valid = pp_a_valid;
        sel_bit   = pp_a_bit;
      end
    endcase
  end

  assign rnd_valid = sel_valid && !fips_grant;
  assign rnd_bit   = sel_bit;

  // -------------------------------------------------------- FIPS tests
  logic fips_in_valid_a, fips_in_bit_a, fips_in_valid_b, fips_in_bit_b;

  assign fips_in_valid_a = fips_grant ? lfsr_valid : rnd_valid;
  assign fips_in_bit_a   = fips_grant ? lfsr_bit   : rnd_bit;
  assign fips_in_valid_b = fips_grant ? lfsr_valid : rnd_valid;
  assign fips_in_bit_b   = fips_grant ? lfsr_bit   : rnd_bit;

  fips140_test u_fips_a (
    .clk, .rst,
    .clear   (fips_clear),
    .in_valid(fips_in_valid_a),
    .in_bit  (fips_in_bit_a),
    .done    (fips_done_a),
    .alarm   (fips_al_a),
    .cnt     (fips_cnt_a)
  );

  fips140_test u_fips_b (
    .clk, .rst,
    .clear   (fips_clear),
    .in_valid(fips_in_valid_b),
    .in_bit  (fips_in_bit_b),
    .done    (fips_done_b),
    .alarm   (fips_al_b),
    .cnt     (fips_cnt_b)
  );

  // ------------------------------------------------------ output buffer
  output_buffer u_buf (
    .clk, .rst,
    .clear        (fips_clear),
    .in_valid     (rnd_valid),
    .in_bit       (rnd_bit),
    .verdict_valid(fips_res_valid),
    .verdict_pass (!fips_res_alarm),
    .out_valid    (out_valid),
    .out_word     (out_word),
    .released     (set_released),
    .dropped      (set_dropped)
  );

  // status
  always_ff @(posedge clk) begin
    if (rst) begin
      ent_alarm_med <= 1'b0;
      ent_alarm_low <= 1'b0;
      fips_alarm    <= 1'b0;
    end else begin
      if (ent_res_valid) begin
        ent_alarm_med <= ent_res_alarm[0];
        ent_alarm_low <= ent_res_alarm[1];
      end
      if (fips_res_valid) fips_alarm <= fips_res_alarm;
    end
  end

  // both copies of a test family see the same input, so they finish together
  assert property (@(posedge clk) disable iff (rst) ent_done_a == ent_done_b);
  assert property (@(posedge clk) disable iff (rst) fips_done_a == fips_done_b);

endmodule

// noise_source_fsm - controller of the noise sources.
//
// Watches the grade of every entropy dataset (medium / low entropy alarms
// of the trusted entropy-test copy) and the external alarm of the
// operating-condition monitor, and escalates the countermeasures step by
// step:
//   IDLE   -- medium or low entropy --> RESET : the active source is shut
//            down for a few clocks (ns_off) and the post-processing order is
//            raised one step (enhance_pp pulse).
//   RESET  -- still degraded --> ADD : all 256 oscillators of the active
//            source run (enhance_ns) and the order is raised one more step.
//   IDLE   -- external alarm --> ADD : all 256 oscillators and the order
//            raised two steps, to anticipate a fault.
//   ADD    -- still degraded --> CHANGE : the other noise source is used
//            (ns_swap toggles) and the strongest parity order is requested
//            (max_pp pulse).
//   CHANGE -- still degraded --> ERROR, kept until reset.
// After RECOVER consecutive clean datasets (no entropy alarm and no external
// alarm) the FSM steps back to the state it came from. Medium entropy lets
// the TRNG keep running; while the latest dataset was graded low entropy,
// stop_low holds the TRNG output until a dataset is acceptable again.
//
// States are one-hot; an illegal code leads to ADD (all oscillators, the most
// restrictive working state).
//
// Interface: ent_valid pulses once per entropy dataset with med_alarm and
// low_alarm; ext_alarm is a level. Outputs are registered except the state
// decodes enhance_ns and error.
// Follows the source design: states and the alarm-driven transitions of the
// noise-source FSM diagram, the actions of each state, 10 clean entropy runs
// to step back, TRNG stopped on low entropy only. Own choices: the length of
// the transient shut-down (OFF_CYCLES), that an external alarm in RESET also
// moves to ADD, that the enhanced oscillator count stays on after a source
// change, and the separate max_pp request.
module noise_source_fsm
  import trng_pkg::*;
#(
  parameter int unsigned RECOVER    = 10,
  parameter int unsigned OFF_CYCLES = 16
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      ent_valid,
  input  logic      med_alarm,
  input  logic      low_alarm,
  input  logic      ext_alarm,
  output logic      ns_swap,      // toggles: use the other noise source
  output logic      enhance_ns,   // all oscillators of the active source
  output logic      ns_off,       // transient shut-down of the active source
  output logic      enhance_pp,   // one-step order increase (pulse)
  output logic      max_pp,       // jump to the strongest order (pulse)
  output logic      stop_low,     // low entropy: hold the TRNG output
  output logic      error,
  output ns_state_e state
);

  localparam int unsigned RW = $clog2(RECOVER + 1);
  localparam int unsigned OW = $clog2(OFF_CYCLES + 1);

  ns_state_e     st;
  logic          add_from_reset;
  logic [RW-1:0] clean;
  logic [OW-1:0] off_cnt;
  logic [1:0]    pp_pulses;       // enhance_pp pulses still to send
  logic          bad, clean_run;

  assign bad       = ent_valid && (med_alarm || low_alarm);
  assign clean_run = ent_valid && !med_alarm && !low_alarm && !ext_alarm;

  always_ff @(posedge clk) begin
    if (rst) begin
      st             <= NS_IDLE;
      add_from_reset <= 1'b0;
      clean          <= '0;
      off_cnt        <= '0;
      pp_pulses      <= '0;
      ns_swap        <= 1'b0;
      enhance_pp     <= 1'b0;
      max_pp         <= 1'b0;
      stop_low       <= 1'b0;
    end else begin
      enhance_pp <= 1'b0;
      max_pp     <= 1'b0;
      if (ent_valid) stop_low <= low_alarm;
      if (off_cnt != '0) off_cnt <= off_cnt - 1'b1;
      if (pp_pulses != '0) begin
        enhance_pp <= 1'b1;
        pp_pulses  <= pp_pulses - 2'd1;
      end
      if (bad || ext_alarm) clean <= '0;
      else if (clean_run)   clean <= clean + 1'b1;

      if (!is_onehot(8'(st))) begin
        st             <= NS_ADD;
        add_from_reset <= 1'b1;
      end else begin
        unique case (st)
          NS_IDLE: begin
            if (bad) begin
              st        <= NS_RESET;
              off_cnt   <= OW'(OFF_CYCLES);
              pp_pulses <= 2'd1;
            end else if (ext_alarm) begin
              st             <= NS_ADD;
              add_from_reset <= 1'b0;
              pp_pulses      <= 2'd2;
            end
          end
          NS_RESET: begin
            if (bad || ext_alarm) begin
              st             <= NS_ADD;
              add_from_reset <= 1'b1;
              pp_pulses      <= 2'd1;
            end else if (clean_run && clean == RW'(RECOVER - 1)) begin
              st    <= NS_IDLE;
              clean <= '0;
            end
          end
          NS_ADD: begin
            if (bad) begin
              st      <= NS_CHANGE;
              ns_swap <= ~ns_swap;
              max_pp  <= 1'b1;
            end else if (clean_run && clean == RW'(RECOVER - 1)) begin
              st    <= add_from_reset ? NS_RESET : NS_IDLE;
              clean <= '0;
            end
          end
          NS_CHANGE: begin
            if (bad) begin
              st <= NS_ERROR;
            end else if (clean_run && clean == RW'(RECOVER - 1)) begin
              st    <= NS_ADD;
              clean <= '0;
            end
          end
          NS_ERROR: st <= NS_ERROR;
          default:  st <= NS_ADD;
        endcase
      end
    end
  end

  assign state      = st;
  assign ns_off     = (off_cnt != '0);
  assign enhance_ns = (st == NS_ADD) || (st == NS_CHANGE) || !is_onehot(8'(st));
  assign error      = (st == NS_ERROR);

endmodule

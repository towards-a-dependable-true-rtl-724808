// pp_fsm - controller of the post-processing.
//
// Chooses which block post-processes the raw bits and with which parity
// order. Each escalation event, a failed FIPS dataset or an enhance_pp
// request from the noise-source controller, moves one step along
//   IDLE (PP-A, order 100) -> 110th order -> 120th order -> 130th order
//   -> CHANGE (PP-B, order 130) -> LFSR (LFSR as post-processor) -> ERROR.
// max_pp jumps straight to the 130th order from any lower order. After
// RECOVER consecutive passing FIPS datasets the FSM steps back by one state.
// ERROR is kept until reset.
//
// States are one-hot; an illegal code leads to the 130th order state, the
// strongest parity filter setting.
//
// Interface: fips_valid pulses once per trusted FIPS dataset with
// fips_alarm; enhance_pp and max_pp are one-clock requests. order_sel and
// pp_sel are decoded from the state (order_sel indexes the filter's order
// table: 0..3 = 100, 110, 120, 130).
// Follows the source design: the states and their order of the
// post-processing FSM diagram, FIPS_Alarm OR enhance_PP as the step event,
// 10 passing FIPS runs to step back, one-hot encoding with self-recovery.
// Own choices: the max_pp jump, one state back per recovery.
module pp_fsm
  import trng_pkg::*;
#(
  parameter int unsigned RECOVER = 10
) (
  input  logic      clk,
  input  logic      rst,
  input  logic      fips_valid,
  input  logic      fips_alarm,
  input  logic      enhance_pp,
  input  logic      max_pp,
  output logic [1:0] order_sel,
  output pp_sel_e   pp_sel,
  output logic      error,
  output pp_state_e state
);

  localparam int unsigned RW = $clog2(RECOVER + 1);

  pp_state_e     st;
  logic [RW-1:0] clean;
  logic          step, pass;

  assign step = (fips_valid && fips_alarm) || enhance_pp;
  assign pass = fips_valid && !fips_alarm;

  function automatic pp_state_e next_up(pp_state_e s);
    unique case (s)
      PP_IDLE:   return PP_O110;
      PP_O110:   return PP_O120;
      PP_O120:   return PP_O130;
      PP_O130:   return PP_CHANGE;
      PP_CHANGE: return PP_LFSR;
      default:   return PP_ERROR;
    endcase
  endfunction

  function automatic pp_state_e next_down(pp_state_e s);
    unique case (s)
      PP_O110:   return PP_IDLE;
      PP_O120:   return PP_O110;
      PP_O130:   return PP_O120;
      PP_CHANGE: return PP_O130;
      PP_LFSR:   return PP_CHANGE;
      default:   return s;
    endcase
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      st    <= PP_IDLE;
      clean <= '0;
    end else if (!is_onehot(8'(st))) begin
      st    <= PP_O130;
      clean <= '0;
    end else if (st == PP_ERROR) begin
      st <= PP_ERROR;
    end else if (step) begin
      st    <= next_up(st);
      clean <= '0;
    end else if (max_pp && (st == PP_IDLE || st == PP_O110 || st == PP_O120)) begin
      st    <= PP_O130;
      clean <= '0;
    end else if (pass) begin
      if (clean == RW'(RECOVER - 1)) begin
        st    <= next_down(st);
        clean <= '0;
      end else begin
        clean <= clean + 1'b1;
      end
    end
  end

  always_comb begin
    unique case (st)
      PP_IDLE: order_sel = 2'd0;
      PP_O110: order_sel = 2'd1;
      PP_O120: order_sel = 2'd2;
      default: order_sel = 2'd3;
    endcase
    pp_sel = (st == PP_CHANGE) ? SEL_PP_B :
             (st == PP_LFSR)   ? SEL_LFSR : SEL_PP_A;
  end

  assign state = st;
  assign error = (st == PP_ERROR);

endmodule

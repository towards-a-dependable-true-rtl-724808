// test_checker_fsm - checker of one pair of duplicated on-the-fly tests.
//
// Two identical copies (A and B) of a test family run on the same input.
// At the end of every dataset this FSM compares their counter records.
// Equal records mean both copies work and the result is passed on. Unequal
// records mean one copy is faulty: the FSM enters TESTING, stops the TRNG
// and requests the LFSR (off_req). Once the LFSR is granted (off_grant) the
// surrounding logic restarts both copies on the LFSR's known sequence, and
// at the end of that dataset each copy's record is compared with the GOLDEN
// record precomputed for that sequence. A copy that disagrees with GOLDEN is
// disconnected: TEST_A means only copy A is trusted, TEST_B only copy B.
// With a single trusted copy nothing can be cross-checked any more, so after
// every dataset the FSM goes back to TESTING and re-runs the off-line test on
// the remaining copy. When both copies disagree with GOLDEN, ERROR is
// entered and kept until reset (it needs the user's attention). If both agree
// with GOLDEN the mismatch was transient and the FSM returns to IDLE.
//
// States are one-hot; an illegal code leads to TESTING, the most restrictive
// state from which the FSM can still recover by itself.
//
// Interface: done/cnt_a/cnt_b/alarm_a/alarm_b from the two copies (done of
// copy A marks the end of a dataset, both copies see the same input);
// res_valid pulses with res_alarm for every dataset taken from normal data
// and a trusted copy; stop is high in TESTING and ERROR; fail_a / fail_b
// report a disconnected copy; error is the ERROR state. One clock from done
// to res_valid.
// Follows the source design: states and transitions of the test FSM diagram
// (Idle, Testing, Test_A, Test_B, Error; Not_equal, fail_a, fail_b,
// End_Test, fail_both), the LFSR off-line test with precomputed results,
// the TRNG stopped while testing, one-hot encoding with self-recovery.
// Own choices: the return to IDLE when both copies pass the off-line test
// and the request/grant handshake with the LFSR arbiter.
module test_checker_fsm
  import trng_pkg::*;
#(
  parameter int unsigned         W      = 8,
  parameter int unsigned         AW     = 1,
  parameter logic [W-1:0]        GOLDEN = '0
) (
  input  logic          clk,
  input  logic          rst,
  input  logic          done,
  input  logic [W-1:0]  cnt_a,
  input  logic [W-1:0]  cnt_b,
  input  logic [AW-1:0] alarm_a,
  input  logic [AW-1:0] alarm_b,
  output logic          off_req,
  input  logic          off_grant,
  output logic          res_valid,
  output logic [AW-1:0] res_alarm,
  output logic          stop,
  output logic          fail_a,
  output logic          fail_b,
  output logic          error,
  output tc_state_e     state
);

  tc_state_e st, ret;   // ret: state to return to after a passed off-line test

  always_ff @(posedge clk) begin
    if (rst) begin
      st        <= TC_IDLE;
      ret       <= TC_IDLE;
      res_valid <= 1'b0;
      res_alarm <= '0;
    end else begin
      res_valid <= 1'b0;
      if (!is_onehot(8'(st))) begin
        st  <= TC_TESTING;
        ret <= TC_IDLE;
      end else begin
        unique case (st)
          TC_IDLE: if (done) begin
            if (cnt_a != cnt_b) begin
              st  <= TC_TESTING;
              ret <= TC_IDLE;
            end else begin
              res_valid <= 1'b1;
              res_alarm <= alarm_a;
            end
          end
          TC_TEST_A: if (done) begin
            res_valid <= 1'b1;
            res_alarm <= alarm_a;
            st        <= TC_TESTING;
            ret       <= TC_TEST_A;
          end
          TC_TEST_B: if (done) begin
            res_valid <= 1'b1;
            res_alarm <= alarm_b;
            st        <= TC_TESTING;
            ret       <= TC_TEST_B;
          end
          TC_TESTING: if (off_grant && done) begin
            logic ok_a, ok_b;
            ok_a = (cnt_a == GOLDEN) && (ret != TC_TEST_B);
            ok_b = (cnt_b == GOLDEN) && (ret != TC_TEST_A);
            if (ok_a && ok_b)  st <= TC_IDLE;
            else if (ok_a)     st <= TC_TEST_A;   // fail_b
            else if (ok_b)     st <= TC_TEST_B;   // fail_a
            else               st <= TC_ERROR;    // fail_both
          end
          TC_ERROR: st <= TC_ERROR;
          default:  st <= TC_TESTING;
        endcase
      end
    end
  end

  assign state   = st;
  assign off_req = (st == TC_TESTING);
  assign stop    = (st == TC_TESTING) || (st == TC_ERROR) || !is_onehot(8'(st));
  assign fail_a  = (st == TC_TEST_B) || (st == TC_ERROR) ||
                   ((st == TC_TESTING) && (ret == TC_TEST_B));
  assign fail_b  = (st == TC_TEST_A) || (st == TC_ERROR) ||
                   ((st == TC_TESTING) && (ret == TC_TEST_A));
  assign error   = (st == TC_ERROR);

endmodule

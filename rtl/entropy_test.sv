// entropy_test - on-the-fly min-entropy tests on the raw noise-source bits.
//
// Three lightweight estimators run side by side over datasets of N raw bits
// (one bit per valid cycle) and grade the source as high, medium or low
// entropy:
//  - Frequency: an up/down counter of ones minus zeros; its magnitude gives
//    the count of the most likely value, hence the min-entropy of a
//    stationary but biased source.
//  - Collision: a small one-hot FSM walks the bits in non-overlapping
//    segments; two equal bits make a collision after 2 bits, two different
//    bits a collision after 3 bits (with a binary alphabet the third bit
//    always repeats one of them). coll2 and coll3 count both kinds; their
//    balance is the mean collision time.
//  - Partial collection: the bits are cut into non-overlapping 2-bit
//    blocks and the blocks holding two distinct values (01 or 10) are counted
//    with a 2-bit shift register, an XOR and a counter.
// At the end of a dataset all counters are published in one record (cnt),
// the alarms are graded against the cut-off parameters and done pulses;
// the running counters restart for the next dataset in the same clock.
// medium_alarm is set when any estimator passes its medium cut-off,
// low_alarm when any passes its low cut-off (low implies medium).
//
// Interface: clear restarts the current dataset (used when the input is
// switched to the LFSR for the off-line self-test and back). cnt, the alarms
// and done are registered; done follows the N-th input bit by one clock.
// Follows the source design: the three tests, their counter/FSM/shift-register
// structure, 8192-bit datasets, two alarms, one-hot FSM with self-recovery.
// Own choices: the cut-off values (frequency cut-offs correspond to a
// min-entropy of 0.9 and 0.8 bit per bit; collision and partial-collection
// cut-offs sit 6 and 12 standard deviations from their ideal means).
module entropy_test
  import trng_pkg::*;
#(
  parameter int unsigned N        = ENT_N,
  parameter int unsigned FREQ_MED = 588,   // |ones - zeros|
  parameter int unsigned FREQ_LOW = 1218,
  parameter int unsigned COLL_MED = 360,   // |coll2 - coll3|
  parameter int unsigned COLL_LOW = 720,
  parameter int unsigned PC_MED   = 256,   // |pcoll - N/4|
  parameter int unsigned PC_LOW   = 512
) (
  input  logic     clk,
  input  logic     rst,
  input  logic     clear,
  input  logic     in_valid,
  input  logic     in_bit,
  output logic     done,
  output logic     medium_alarm,
  output logic     low_alarm,
  output ent_cnt_t cnt
);

  localparam int unsigned NW = $clog2(N + 1);

  // collision FSM, one-hot; an illegal code returns to C_EMPTY
  typedef enum logic [2:0] {
    C_EMPTY = 3'b001,   // no bit of the segment seen
    C_ONE   = 3'b010,   // one bit seen
    C_DIFF  = 3'b100    // two different bits seen
  } coll_state_e;

  coll_state_e        cst, cst_n;
  logic               first_bit;
  logic [NW-1:0]      bitcnt;
  logic signed [14:0] freq, freq_n;
  logic [12:0]        c2, c2_n, c3, c3_n, pc, pc_n;
  logic               pair_half, prev_bit;
  logic               last;

  // next values of the running counters for the current input bit
  always_comb begin
    freq_n = freq;
    c2_n   = c2;
    c3_n   = c3;
    pc_n   = pc;
    cst_n  = cst;
    if (in_valid) begin
      freq_n = in_bit ? freq + 15'sd1 : freq - 15'sd1;
      if (pair_half && (prev_bit ^ in_bit)) pc_n = pc + 13'd1;
      unique case (cst)
        C_EMPTY: cst_n = C_ONE;
        C_ONE: begin
          if (first_bit == in_bit) begin
            c2_n  = c2 + 13'd1;
            cst_n = C_EMPTY;
          end else begin
            cst_n = C_DIFF;
          end
        end
        C_DIFF: begin
          c3_n  = c3 + 13'd1;
          cst_n = C_EMPTY;
        end
        default: cst_n = C_EMPTY;
      endcase
    end
    if (!is_onehot(8'(cst))) cst_n = C_EMPTY;
  end

  assign last = in_valid && (bitcnt == NW'(N - 1));

  // grading of the finished dataset
  function automatic int unsigned absdiff(int a, int b);
    return (a > b) ? int'(a - b) : int'(b - a);
  endfunction

  logic med_n, low_n;
  always_comb begin
    int unsigned fd, cd, pd;
    fd    = absdiff(int'(freq_n), 0);
    cd    = absdiff(int'(c2_n), int'(c3_n));
    pd    = absdiff(int'(pc_n), int'(N / 4));
    low_n = (fd > FREQ_LOW) || (cd > COLL_LOW) || (pd > PC_LOW);
    med_n = low_n || (fd > FREQ_MED) || (cd > COLL_MED) || (pd > PC_MED);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      cst          <= C_EMPTY;
      first_bit    <= 1'b0;
      bitcnt       <= '0;
      freq         <= '0;
      c2           <= '0;
      c3           <= '0;
      pc           <= '0;
      pair_half    <= 1'b0;
      prev_bit     <= 1'b0;
      done         <= 1'b0;
      medium_alarm <= 1'b0;
      low_alarm    <= 1'b0;
      cnt          <= '0;
    end else begin
      done <= 1'b0;
      if (clear || last) begin
        cst       <= C_EMPTY;
        bitcnt    <= '0;
        freq      <= '0;
        c2        <= '0;
        c3        <= '0;
        pc        <= '0;
        pair_half <= 1'b0;
      end else begin
        cst    <= cst_n;
        freq   <= freq_n;
        c2     <= c2_n;
        c3     <= c3_n;
        pc     <= pc_n;
        if (in_valid) begin
          bitcnt    <= bitcnt + 1'b1;
          pair_half <= ~pair_half;
          prev_bit  <= in_bit;
          if (cst == C_EMPTY) first_bit <= in_bit;
        end
      end
      if (last && !clear) begin
        done          <= 1'b1;
        medium_alarm  <= med_n;
        low_alarm     <= low_n;
        cnt.freq_diff <= freq_n;
        cnt.coll2     <= c2_n;
        cnt.coll3     <= c3_n;
        cnt.pcoll     <= pc_n;
      end
    end
  end

endmodule

// fips140_test - FIPS 140-2 statistical tests on the post-processed output.
//
// Runs the four tests of the standard on-the-fly over datasets of 20000
// output bits (one bit per valid cycle):
//  - Monobit: counts the ones; pass when 9725 < ones < 10275.
//  - Poker: a 2-bit phase counter cuts the stream into 5000 nibbles and 16
//    counters count each nibble value. The final value is the plain sum of
//    the squared counts, pass when 1563175 < sum < 1576929 (the standard's
//    chi-square form rewritten so no division is needed).
//  - Runs: the length of the current run is counted; when the bit changes
//    (or the dataset ends) the finished run increments one of six counters
//    (lengths 1..5 and 6+) for zeros or for ones. Each count must lie in the
//    standard's interval (2315-2685, 1114-1386, 527-723, 240-384, 103-209,
//    103-209), inclusive.
//  - Long run: a run of 26 bits or more fails the dataset.
// At the last bit of a dataset all counts are copied into a snapshot and the
// running counters restart, so the next dataset is counted without a gap.
// A small one-hot FSM then squares the 16 snapshot nibble counts one per
// clock with a single multiplier (one DSP block on an FPGA) and accumulates
// them. done pulses 17 clocks after the clock that takes the last input bit, with
// alarm (any test failed) and the counter record cnt, both held until the
// next done.
//
// Interface: clear restarts the dataset being counted and drops a final
// computation under way (the input is being switched to or from the LFSR).
// Follows the source design: the four FIPS 140-2 tests, 20000-bit datasets,
// square-sum poker bound, counter/FSM structure, one multiplier for the
// final computation, one-hot FSM with self-recovery. Own choices: the
// serial 16-cycle final computation and its latency, saturating 13-bit run
// counters.
module fips140_test
  import trng_pkg::*;
(
  input  logic      clk,
  input  logic      rst,
  input  logic      clear,
  input  logic      in_valid,
  input  logic      in_bit,
  output logic      done,
  output logic      alarm,
  output fips_cnt_t cnt
);

  localparam int unsigned NW = $clog2(FIPS_N + 1);

  // running counters
  logic [NW-1:0]      bitcnt;
  logic [14:0]        ones, ones_n;
  logic [1:0]         nib_phase;
  logic [2:0]         nib_sr;          // first three bits of the nibble
  logic [15:0][12:0]  poker, poker_n;
  logic               cur_bit;
  logic [4:0]         run_len, run_len_n;  // saturates at 31
  logic [5:0][12:0]   r0, r0_n, r1, r1_n;
  logic               lrun, lrun_n;
  logic               last;

  function automatic logic [12:0] sat_inc(logic [12:0] v);
    return (v == '1) ? v : v + 13'd1;
  endfunction

  function automatic logic [2:0] run_bin(logic [4:0] len);
    return (len >= 5'd6) ? 3'd5 : 3'(len - 5'd1);
  endfunction

  assign last = in_valid && (bitcnt == NW'(FIPS_N - 1));

  always_comb begin
    logic       closes;
    logic [4:0] closed_len;
    logic       closed_bit;
    ones_n    = ones;
    poker_n   = poker;
    run_len_n = run_len;
    r0_n      = r0;
    r1_n      = r1;
    lrun_n    = lrun;
    closes     = 1'b0;
    closed_len = run_len;
    closed_bit = cur_bit;
    if (in_valid) begin
      if (in_bit) ones_n = ones + 15'd1;
      if (nib_phase == 2'd3)
        poker_n[{nib_sr, in_bit}] = poker[{nib_sr, in_bit}] + 13'd1;
      // run tracking: a run ends when the bit changes
      if (bitcnt == '0) begin
        run_len_n = 5'd1;
      end else if (in_bit == cur_bit) begin
        run_len_n = (run_len == 5'd31) ? run_len : run_len + 5'd1;
      end else begin
        closes    = 1'b1;
        run_len_n = 5'd1;
      end
      if (closes) begin
        if (closed_bit) r1_n[run_bin(closed_len)] = sat_inc(r1[run_bin(closed_len)]);
        else            r0_n[run_bin(closed_len)] = sat_inc(r0[run_bin(closed_len)]);
        if (closed_len >= 5'(LONG_RUN)) lrun_n = 1'b1;
      end
      // the run still open at the end of the dataset is closed too
      if (last) begin
        if (in_bit) r1_n[run_bin(run_len_n)] = sat_inc(r1_n[run_bin(run_len_n)]);
        else        r0_n[run_bin(run_len_n)] = sat_inc(r0_n[run_bin(run_len_n)]);
        if (run_len_n >= 5'(LONG_RUN)) lrun_n = 1'b1;
      end
    end
  end

  // final computation FSM (one-hot, illegal codes return to F_IDLE)
  typedef enum logic [2:0] {
    F_IDLE  = 3'b001,
    F_SUM   = 3'b010,
    F_GRADE = 3'b100
  } fin_state_e;

  fin_state_e        fst;
  logic [3:0]        fidx;
  logic [15:0][12:0] snap_poker;
  fips_cnt_t         snap;
  logic [24:0]       acc;

  function automatic logic grade(fips_cnt_t c);
    logic bad;
    bad = (c.ones <= 15'(MONO_LO)) || (c.ones >= 15'(MONO_HI)) ||
          (c.poker_sum <= 25'(POKER_LO)) || (c.poker_sum >= 25'(POKER_HI)) ||
          c.long_run;
    for (int i = 0; i < 6; i++) begin
      if (c.runs0[i] < 13'(RUN_LO[i]) || c.runs0[i] > 13'(RUN_HI[i])) bad = 1'b1;
      if (c.runs1[i] < 13'(RUN_LO[i]) || c.runs1[i] > 13'(RUN_HI[i])) bad = 1'b1;
    end
    return bad;
  endfunction

  always_ff @(posedge clk) begin
    if (rst) begin
      bitcnt     <= '0;
      ones       <= '0;
      nib_phase  <= '0;
      nib_sr     <= '0;
      poker      <= '0;
      cur_bit    <= 1'b0;
      run_len    <= '0;
      r0         <= '0;
      r1         <= '0;
      lrun       <= 1'b0;
      fst        <= F_IDLE;
      fidx       <= '0;
      snap_poker <= '0;
      snap       <= '0;
      acc        <= '0;
      done       <= 1'b0;
      alarm      <= 1'b0;
      cnt        <= '0;
    end else begin
      done <= 1'b0;
      // ---------------------------------------------------- counting
      if (clear || last) begin
        bitcnt    <= '0;
        ones      <= '0;
        nib_phase <= '0;
        poker     <= '0;
        run_len   <= '0;
        r0        <= '0;
        r1        <= '0;
        lrun      <= 1'b0;
      end else if (in_valid) begin
        bitcnt    <= bitcnt + 1'b1;
        ones      <= ones_n;
        nib_phase <= nib_phase + 2'd1;
        nib_sr    <= {nib_sr[1:0], in_bit};
        poker     <= poker_n;
        cur_bit   <= in_bit;
        run_len   <= run_len_n;
        r0        <= r0_n;
        r1        <= r1_n;
        lrun      <= lrun_n;
      end
      // ---------------------------------------------------- final computation
      if (clear) fst <= F_IDLE;   // the input source changed: drop the result
      else unique case (fst)
        F_IDLE: begin
          if (last && !clear) begin
            snap_poker    <= poker_n;
            snap.ones     <= ones_n;
            snap.runs0    <= r0_n;
            snap.runs1    <= r1_n;
            snap.long_run <= lrun_n;
            acc           <= '0;
            fidx          <= '0;
            fst           <= F_SUM;
          end
        end
        F_SUM: begin
          acc  <= acc + 25'(snap_poker[fidx] * snap_poker[fidx]);
          fidx <= fidx + 4'd1;
          if (fidx == 4'd15) fst <= F_GRADE;
        end
        F_GRADE: begin
          cnt           <= snap;
          cnt.poker_sum <= acc;
          alarm         <= grade('{ones: snap.ones, poker_sum: acc, runs0: snap.runs0,
                                   runs1: snap.runs1, long_run: snap.long_run});
          done          <= 1'b1;
          fst           <= F_IDLE;
        end
        default: fst <= F_IDLE;
      endcase
    end
  end

endmodule

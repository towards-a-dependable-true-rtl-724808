// trng_pkg - types and constants shared by the self-repairable TRNG.
//
// Holds the dataset lengths of the two families of on-the-fly tests, the
// FIPS 140-2 acceptance intervals, the packed counter records that the
// duplicated tests publish (the checker compares these records between the
// A and B copies and against the golden records of the off-line self-test),
// the one-hot state encodings of the controller FSMs and the LFSR constants.
//
// Follows the source design: 8192-bit entropy datasets, 20000-bit FIPS
// datasets, the FIPS 140-2 intervals, one-hot FSMs, a 64-bit maximal-length
// LFSR. Own choices: the entropy cut-off values, the LFSR polynomial and seed,
// and the layout of the counter records.
// Each module imports only some of these constants, so a lint run on a
// single module lists the others as unused; that is expected.
package trng_pkg;

  // ---------------------------------------------------------------- datasets
  localparam int unsigned ENT_N  = 8192;   // bits per entropy-test dataset
  localparam int unsigned FIPS_N = 20000;  // bits per FIPS 140 dataset

  // ------------------------------------------------- FIPS 140-2 acceptance
  // Monobit: 9725 < ones < 10275.
  localparam int unsigned MONO_LO = 9725;
  localparam int unsigned MONO_HI = 10275;
  // Poker in the square-sum form: 1563175 < sum f(i)^2 < 1576929.
  localparam int unsigned POKER_LO = 1563175;
  localparam int unsigned POKER_HI = 1576929;
  // Runs of length 1..5 and 6+, same interval for runs of zeros and ones.
  localparam int unsigned RUN_LO [6] = '{2315, 1114, 527, 240, 103, 103};
  localparam int unsigned RUN_HI [6] = '{2685, 1386, 723, 384, 209, 209};
  // Long run: any run of 26 or more bits fails.
  localparam int unsigned LONG_RUN = 26;

  // ------------------------------------------------------ counter records
  // Published by one entropy-test copy at the end of each dataset.
  typedef struct packed {
    logic signed [14:0] freq_diff;  // ones minus zeros (up/down counter)
    logic [12:0]        coll2;      // collisions found after 2 bits
    logic [12:0]        coll3;      // collisions found after 3 bits
    logic [12:0]        pcoll;      // 2-bit blocks holding 01 or 10
  } ent_cnt_t;

  // Published by one FIPS-test copy at the end of each dataset.
  typedef struct packed {
    logic [14:0]      ones;         // monobit count
    logic [24:0]      poker_sum;    // sum over the 16 nibble counts squared
    logic [5:0][12:0] runs0;        // runs of zeros, lengths 1..5, 6+
    logic [5:0][12:0] runs1;        // runs of ones,  lengths 1..5, 6+
    logic             long_run;     // a run of LONG_RUN or more was seen
  } fips_cnt_t;

  localparam int unsigned ENT_CNT_W  = $bits(ent_cnt_t);
  localparam int unsigned FIPS_CNT_W = $bits(fips_cnt_t);

  // ------------------------------------------------------------------ LFSR
  // x^64 + x^63 + x^61 + x^60 + 1, right-shifting Galois form.
  localparam logic [63:0] LFSR_TAPS = 64'hD800_0000_0000_0000;
  localparam logic [63:0] LFSR_SEED = 64'h0123_4567_89AB_CDEF;

  // Golden records: what a fault-free test copy reports for the first
  // ENT_N (resp. FIPS_N) output bits of the closed-loop LFSR started from
  // LFSR_SEED, one bit per clock. They follow from the definitions of the
  // tests applied to that fixed sequence.
  localparam ent_cnt_t ENT_GOLDEN = '{
    freq_diff: -15'sd118, coll2: 13'd1606, coll3: 13'd1660, pcoll: 13'd2029};
  localparam fips_cnt_t FIPS_GOLDEN = '{
    ones: 15'd9872, poker_sum: 25'd1565228,
    runs0: '{0: 13'd2474, 1: 13'd1270, 2: 13'd640, 3: 13'd303, 4: 13'd164, 5: 13'd162},
    runs1: '{0: 13'd2539, 1: 13'd1280, 2: 13'd614, 3: 13'd290, 4: 13'd132, 5: 13'd158},
    long_run: 1'b0};

  // ------------------------------------------------------- FSM encodings
  // True when exactly one bit of v is set (state-register integrity check of
  // the one-hot FSMs).
  function automatic logic is_onehot(logic [7:0] v);
    return (v != 8'd0) && ((v & (v - 8'd1)) == 8'd0);
  endfunction

  // Test checker FSM (one per test family), one-hot.
  typedef enum logic [4:0] {
    TC_IDLE    = 5'b00001,
    TC_TESTING = 5'b00010,
    TC_TEST_A  = 5'b00100,
    TC_TEST_B  = 5'b01000,
    TC_ERROR   = 5'b10000
  } tc_state_e;

  // Noise-source FSM, one-hot.
  typedef enum logic [4:0] {
    NS_IDLE   = 5'b00001,
    NS_RESET  = 5'b00010,   // reset ROs + enhance post-processing
    NS_ADD    = 5'b00100,   // all 256 ROs + enhance post-processing
    NS_CHANGE = 5'b01000,   // switch to the other noise source, max order
    NS_ERROR  = 5'b10000
  } ns_state_e;

  // Post-processing FSM, one-hot.
  typedef enum logic [6:0] {
    PP_IDLE   = 7'b0000001, // PP-A, order 100
    PP_O110   = 7'b0000010,
    PP_O120   = 7'b0000100,
    PP_O130   = 7'b0001000,
    PP_CHANGE = 7'b0010000, // PP-B, order 130
    PP_LFSR   = 7'b0100000, // LFSR used as post-processing
    PP_ERROR  = 7'b1000000
  } pp_state_e;

  // Which block feeds the TRNG output and the FIPS tests.
  typedef enum logic [1:0] {
    SEL_PP_A = 2'd0,
    SEL_PP_B = 2'd1,
    SEL_LFSR = 2'd2
  } pp_sel_e;

endpackage

// galois_lfsr - 64-bit Galois LFSR used both as test-pattern source and as a
// fall-back post-processor.
//
// The register shifts right every enabled clock; the bit leaving stage 0 is
// the feedback, and wherever the tap mask has a one it is XORed into the
// stage it passes. Two modes:
//  - testing_mode = 1: closed loop, a plain maximal-length LFSR. Started from
//    a fixed seed (restart), it produces a known sequence with which the
//    controller checks the duplicated statistical tests off-line.
//  - testing_mode = 0: the selected raw noise bit (NS-A or NS-B, ns_sel) is
//    XORed with the feedback bit, so the register accumulates fresh noise and
//    acts as a post-processing block. In this mode one output bit is taken
//    every DECIM clocks (out_valid strobe).
// rng is the bit that left stage 0 on the last enabled clock (registered, so
// the first bit after restart is SEED[0]); out_valid marks the bits that are
// taken as output: every enabled clock in testing mode, every DECIM-th in
// post-processing mode.
//
// Interface: restart loads SEED and clears the decimation counter (one clock).
// Follows the source design: 64-bit Galois form, primitive polynomial, two
// modes selected by Testing_Mode, noise XORed into the feedback. Own choices:
// the polynomial x^64+x^63+x^61+x^60+1, the seed, and the output decimation
// of DECIM = 130 clocks per bit in post-processing mode (the compression of
// the strongest parity filter).
module galois_lfsr
  import trng_pkg::*;
#(
  parameter logic [63:0] TAPS  = LFSR_TAPS,
  parameter logic [63:0] SEED  = LFSR_SEED,
  parameter int unsigned DECIM = 130
) (
  input  logic clk,
  input  logic rst,
  input  logic restart,
  input  logic enable,
  input  logic testing_mode,
  input  logic ns_a,
  input  logic ns_b,
  input  logic ns_sel,       // 0: NS-A, 1: NS-B
  output logic rng,
  output logic out_valid
);

  localparam int unsigned DW = $clog2(DECIM + 1);

  logic [63:0]   state;
  logic [DW-1:0] dcnt;
  logic          fb;

  assign fb  = state[0] ^ (testing_mode ? 1'b0 : (ns_sel ? ns_b : ns_a));

  always_ff @(posedge clk) begin
    if (rst || restart) begin
      state     <= SEED;
      dcnt      <= '0;
      out_valid <= 1'b0;
      rng       <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (enable) begin
        state <= (state >> 1) ^ (fb ? TAPS : 64'd0);
        rng   <= state[0];
        if (testing_mode) begin
          out_valid <= 1'b1;
          dcnt      <= '0;
        end else if (dcnt == DW'(DECIM - 1)) begin
          out_valid <= 1'b1;
          dcnt      <= '0;
        end else begin
          dcnt <= dcnt + 1'b1;
        end
      end
    end
  end

endmodule

// noise_source - one redundant ring-oscillator noise source (NS-A or NS-B).
//
// Behavioural model, not synthesizable as a whole: it holds N_RO ring
// oscillator models (ring_oscillator, which need delays) and the
// synthesizable extractor (xor_tree_extractor). Each oscillator is a loop of
// four inverters and a NAND gate acting as its enable. In normal operation
// only the first N_ACTIVE oscillators run; with enhance high all N_RO run,
// which raises the number of jittery edges the sampling clock can hit. With
// enable low every oscillator is stopped: the controller uses this to park
// the unused source (less switching, less ageing) and for the transient
// shut-down that resets a degraded source.
//
// Interface: clk (sampling clock, 300 MHz in the source design), rst,
// enable, enhance, raw_bit (one raw random bit per clock, valid from the
// extractor latency onward).
// Follows the source design: 256 oscillators, 128 active normally, all 256
// when enhanced, sampling flip-flops and a ripple XOR tree. Own choice: the
// nominal oscillator periods, spread over 2.0-2.8 ns so no two rings share a
// frequency, and the jitter range of the model.
module noise_source #(
  parameter int unsigned N_RO     = 256,
  parameter int unsigned N_ACTIVE = 128,
  parameter int unsigned SEED     = 1
) (
  input  logic clk,
  input  logic rst,
  input  logic enable,
  input  logic enhance,
  output logic raw_bit
);

  logic [N_RO-1:0] ro_en;
  logic [N_RO-1:0] ro_out;

  always_comb begin
    for (int unsigned i = 0; i < N_RO; i++)
      ro_en[i] = enable && (enhance || i < N_ACTIVE);
  end

  for (genvar i = 0; i < N_RO; i++) begin : g_ro
    ring_oscillator #(
      .HALF_PERIOD(1000 + (i * 397) % 400),
      .JITTER     (40),
      .SEED       (SEED * 1000 + i + 1)
    ) u_ro (
      .en (ro_en[i]),
      .osc(ro_out[i])
    );
  end

  xor_tree_extractor #(.N(N_RO)) u_xor (
    .clk    (clk),
    .rst    (rst),
    .ro_in  (ro_out),
    .raw_bit(raw_bit)
  );

endmodule

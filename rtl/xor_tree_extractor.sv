// xor_tree_extractor - entropy extractor of the ring-oscillator noise source.
//
// Every oscillator output is first captured in its own flip-flop (the
// modification that keeps the XOR tree from having to follow the raw
// oscillator transitions). The captured bits are then folded into one raw
// random bit by a tree of 6-input XORs, one FPGA 6-input LUT each, with a
// register after every level: a ripple (pipelined) structure, so no
// combinational path spans more than one LUT and a glitch on power or clock
// can corrupt at most one level for one cycle. The XOR of all enabled
// oscillators appears at the output LEVELS+1 clocks after the sampling edge.
//
// Interface: ro_in[N-1:0] asynchronous oscillator outputs, raw_bit one raw
// bit per clock. rst clears the pipeline.
// Follows the source design: per-oscillator sampling flip-flop, 6-input XOR
// LUTs with registers between levels. Own choice: synchronous active-high
// reset and zero padding of the last LUT of a level.
module xor_tree_extractor #(
  parameter int unsigned N = 256,       // number of oscillator inputs
  parameter int unsigned K = 6          // inputs per XOR LUT
) (
  input  logic         clk,
  input  logic         rst,
  input  logic [N-1:0] ro_in,
  output logic         raw_bit
);

  // number of tree levels needed to reduce N inputs to one
  function automatic int unsigned levels_for(int unsigned n);
    int unsigned l = 0;
    int unsigned w = n;
    while (w > 1) begin
      w = (w + K - 1) / K;
      l++;
    end
    return (l == 0) ? 1 : l;
  endfunction

  function automatic int unsigned width_at(int unsigned lvl);
    int unsigned w = N;
    for (int unsigned i = 0; i < lvl; i++) w = (w + K - 1) / K;
    return w;
  endfunction

  localparam int unsigned LEVELS = levels_for(N);

  // sampling flip-flops
  logic [N-1:0] sampled;
  always_ff @(posedge clk) begin
    if (rst) sampled <= '0;
    else     sampled <= ro_in;
  end

  // stage[l] holds the registered outputs of tree level l (stage[0] = samples)
  logic [N-1:0] stage [LEVELS+1];
  assign stage[0] = sampled;

  for (genvar l = 1; l <= LEVELS; l++) begin : g_lvl
    localparam int unsigned WIN  = width_at(l - 1);
    localparam int unsigned WOUT = width_at(l);
    logic [WOUT-1:0] lut_out;
    always_comb begin
      lut_out = '0;
      for (int unsigned j = 0; j < WOUT; j++)
        for (int unsigned k = 0; k < K; k++)
          if (j * K + k < WIN) lut_out[j] ^= stage[l-1][j*K+k];
    end
    always_ff @(posedge clk) begin
      if (rst) stage[l] <= '0;
      else     stage[l] <= N'(lut_out);
    end
  end

  assign raw_bit = stage[LEVELS][0];

endmodule

// aging_counter - anti-ageing alternation of the two noise sources.
//
// Ring oscillators age with their switching activity. To make NS-A and NS-B
// age alike, this counter counts generations (one generation = one FIPS
// dataset of 20000 output bits) and toggles sel every GENERATIONS of them,
// 1000 by default, i.e. every 20 Mbit of output. The top combines sel with
// the noise-source controller's own swap request.
//
// Interface: gen_done pulses once per generation; sel is registered.
// Follows the source design: a counter switching the sources every 1000
// generations. Own choice: what counts as a generation is the end of a FIPS
// dataset that the trusted test copy graded.
module aging_counter #(
  parameter int unsigned GENERATIONS = 1000
) (
  input  logic clk,
  input  logic rst,
  input  logic gen_done,
  output logic sel
);

  localparam int unsigned GW = $clog2(GENERATIONS + 1);

  logic [GW-1:0] cnt;

  always_ff @(posedge clk) begin
    if (rst) begin
      cnt <= '0;
      sel <= 1'b0;
    end else if (gen_done) begin
      if (cnt == GW'(GENERATIONS - 1)) begin
        cnt <= '0;
        sel <= ~sel;
      end else begin
        cnt <= cnt + 1'b1;
      end
    end
  end

endmodule

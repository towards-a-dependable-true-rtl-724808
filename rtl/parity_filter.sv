// parity_filter - n-th order parity filter with selectable order (PP-A/PP-B).
//
// The post-processor hashes n successive raw bits into one output bit: the
// raw bits enter a shift register, and when n new bits have arrived the XOR
// of those n register cells is emitted and a new block begins. Output rate is
// therefore one bit per n input bits; entropy per output bit rises with n.
// The order is chosen on the fly among four values (100, 110, 120, 130 by
// default) by order_sel; a new order takes effect at the next block boundary
// so that no output bit mixes two orders.
//
// Interface: in_valid/in_bit (one raw bit per valid cycle), order_sel
// (index into ORDERS), out_valid/out_bit (one-cycle strobe, registered, one
// clock after the n-th input bit of a block). rst empties the filter.
// Follows the source design: shift register plus XOR, orders 100/110/120/130.
// Own choice: orders switch only at block boundaries; synchronous reset.
module parity_filter #(
  parameter int unsigned ORDERS [4] = '{100, 110, 120, 130}  // ascending
) (
  input  logic       clk,
  input  logic       rst,
  input  logic       in_valid,
  input  logic       in_bit,
  input  logic [1:0] order_sel,
  output logic       out_valid,
  output logic       out_bit
);

  localparam int unsigned MAXO = ORDERS[3];
  localparam int unsigned CW   = $clog2(MAXO + 1);

  logic [MAXO-2:0] sr;          // sr[0] = newest bit
  logic [CW-1:0]   cnt;         // bits already in the current block
  logic [1:0]      cur_sel;     // order of the current block
  logic [MAXO-1:0] window;
  logic [MAXO-1:0] mask;
  logic [CW-1:0]   cur_order;

  always_comb begin
    cur_order = CW'(ORDERS[(cnt == '0) ? order_sel : cur_sel]);
    window    = {sr, in_bit};
    for (int unsigned i = 0; i < MAXO; i++) mask[i] = (i < cur_order);
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      sr        <= '0;
      cnt       <= '0;
      cur_sel   <= '0;
      out_valid <= 1'b0;
      out_bit   <= 1'b0;
    end else begin
      out_valid <= 1'b0;
      if (in_valid) begin
        sr <= window[MAXO-2:0];
        if (cnt == '0) cur_sel <= order_sel;
        if (cnt + 1'b1 == cur_order) begin
          cnt       <= '0;
          out_valid <= 1'b1;
          out_bit   <= ^(window & mask);
        end else begin
          cnt <= cnt + 1'b1;
        end
      end
    end
  end

endmodule

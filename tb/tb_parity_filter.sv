// tb_parity_filter - self-checking test of the selectable-order parity filter.
// Feeds random raw bits (with random gaps), switches the order while running,
// and compares every output bit with the XOR of the block of n input bits
// computed by a reference model; also checks that each output follows the
// n-th bit of its block by exactly one clock (rate 1/n).
// Timing: cycle-based clock. Orders 100/110/120/130 follow the design; the
// switching rule (new order at a block boundary) is this design's own.
module tb_parity_filter;
  logic clk = 0, rst = 1;
  logic in_valid = 0, in_bit = 0;
  logic [1:0] order_sel = 0;
  logic out_valid, out_bit;
  int checks = 0, failures = 0;
  int unsigned orders [4] = '{100, 110, 120, 130};

  parity_filter dut (.*);

  always #5 clk = ~clk;

  // reference model
  int  ref_cnt = 0, ref_order = 100;
  logic ref_par = 0;
  logic exp_valid = 0, exp_bit = 0;
  int  outputs = 0;
  always @(posedge clk) begin
    exp_valid <= 0;
    if (!rst && in_valid) begin
      if (ref_cnt == 0) ref_order = orders[order_sel];
      ref_par ^= in_bit;
      ref_cnt++;
      if (ref_cnt == ref_order) begin
        exp_valid <= 1;
        exp_bit   <= ref_par;
        ref_cnt = 0;
        ref_par = 0;
      end
    end
  end
  always @(negedge clk) if (!rst) begin
    checks++;
    if (out_valid !== exp_valid || (exp_valid && out_bit !== exp_bit)) begin
      failures++;
      if (failures < 10) $display("mismatch t=%0t valid %b/%b bit %b/%b", $time, out_valid, exp_valid, out_bit, exp_bit);
    end
    if (out_valid) outputs++;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(7));
    repeat (3) @(posedge clk);
    rst <= 0;
    // full-rate stream, order 100: 20 outputs in exactly 2000 input bits
    for (int i = 0; i < 2000; i++) begin
      @(posedge clk);
      in_valid <= 1; in_bit <= $urandom % 2;
    end
    @(posedge clk) in_valid <= 0;
    repeat (3) @(posedge clk);
    checks++;
    if (outputs != 20) begin failures++; $display("rate: %0d outputs for 2000 bits at order 100", outputs); end
    // random gaps and order changes
    for (int i = 0; i < 40000; i++) begin
      @(posedge clk);
      in_valid <= ($urandom % 4) != 0;
      in_bit   <= $urandom % 2;
      if (i % 3001 == 0) order_sel <= $urandom % 4;
    end
    @(posedge clk) in_valid <= 0;
    repeat (5) @(posedge clk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

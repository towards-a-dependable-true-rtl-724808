// tb_xor_tree_extractor - self-checking test of the sampled ripple XOR tree.
// Drives 256 inputs with random vectors changing on the clock and checks
// that the output equals the XOR of the vector sampled 5 clocks earlier
// (1 sampling stage + 4 levels of 6-input XOR: 256 -> 43 -> 8 -> 2 -> 1).
// Timing: cycle-based clock; the output must follow its samples by the
// pipeline latency. Sampling flip-flops and a ripple XOR tree follow the
// design; the 6-input grouping and the reference model are this design's own.
module tb_xor_tree_extractor;
  logic clk = 0, rst = 1;
  logic [255:0] ro_in = '0;
  logic raw_bit;
  int checks = 0, failures = 0;

  xor_tree_extractor dut (.*);

  always #5 clk = ~clk;

  logic hist [$];

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (i >= 5) begin
        checks++;
        if (raw_bit !== hist[i - 5]) begin
          failures++;
          if (failures < 10) $display("FAIL cycle %0d got %b exp %b", i, raw_bit, hist[i - 5]);
        end
      end
      for (int w = 0; w < 8; w++) ro_in[w*32 +: 32] = $urandom;
      if (i % 500 == 7) ro_in = '0;
      hist.push_back(^ro_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_aging_counter - self-checking test of the anti-ageing source alternation.
// With GENERATIONS = 5, sel must toggle exactly at every 5th generation.
// Timing: gen_done pulses at random intervals on a cycle-based clock.
// The 1000-generation period of the design is scaled to 5 here; the
// stimulus and the reference count are this test's own.
module tb_aging_counter;
  logic clk = 0, rst = 1, gen_done = 0, sel;
  int checks = 0, failures = 0;

  aging_counter #(.GENERATIONS(5)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic exp_sel = 0;
    repeat (2) @(negedge clk);
    rst = 0;
    @(negedge clk);
    checks++; if (sel !== 0) failures++;
    for (int g = 1; g <= 23; g++) begin
      @(negedge clk) gen_done = 1;
      @(negedge clk) gen_done = 0;
      repeat ($urandom % 4) @(negedge clk);
      if (g % 5 == 0) exp_sel = ~exp_sel;
      checks++;
      if (sel !== exp_sel) begin failures++; $display("FAIL gen %0d sel %b", g, sel); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

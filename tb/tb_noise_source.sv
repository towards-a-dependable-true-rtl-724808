// tb_noise_source - self-checking test of one ring-oscillator noise source.
// At a 300 MHz sampling clock: with 128 of 256 oscillators the raw stream
// must be balanced (ones within 45-55 %) and not periodic; with all 256
// (enhance) likewise, and the number of enabled oscillators must match;
// disabled, the stream must settle to a constant 0.
// Timing: 300 MHz sampling clock (half period 1667 ps); simulated for about
// 8200 clocks. The 256/128 oscillator counts follow the design; the 45-55 %
// balance and transition-count windows are this test's own bounds.
module tb_noise_source;
  logic clk = 0, rst = 1, enable = 0, enhance = 0, raw_bit;
  int checks = 0, failures = 0;

  noise_source dut (.*);

  always #1667 clk = ~clk;

  task automatic measure(input string what);
    int ones = 0, changes = 0;
    logic prev = 0;
    for (int i = 0; i < 4096; i++) begin
      @(negedge clk);
      ones += raw_bit;
      if (raw_bit != prev) changes++;
      prev = raw_bit;
    end
    checks++;
    if (ones < 1843 || ones > 2253) begin failures++; $display("FAIL %s: %0d ones of 4096", what, ones); end
    checks++;
    if (changes < 1740 || changes > 2356) begin failures++; $display("FAIL %s: %0d changes", what, changes); end
  endtask

  initial begin
    #200000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(negedge clk);
    rst = 0;
    enable = 1;
    repeat (20) @(negedge clk);
    measure("128 oscillators");
    checks++;
    if ($countones(dut.ro_en) != 128) begin failures++; $display("FAIL %0d oscillators enabled", $countones(dut.ro_en)); end
    enhance = 1;
    repeat (20) @(negedge clk);
    measure("256 oscillators");
    checks++;
    if ($countones(dut.ro_en) != 256) begin failures++; $display("FAIL %0d oscillators enabled", $countones(dut.ro_en)); end
    enable = 0;
    repeat (20) @(negedge clk);
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      checks++;
      if (raw_bit !== 0) begin failures++; $display("FAIL disabled source not quiet"); break; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

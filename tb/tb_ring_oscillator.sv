// tb_ring_oscillator - self-checking test of the ring-oscillator model.
// While enabled the output must toggle with a half period inside
// HALF_PERIOD +- JITTER/2; while disabled it must rest at 0 and not toggle;
// the edge spacing must actually vary (jitter present).
// Timing: runs for a few hundred nanoseconds of model time (1 ps unit).
// Only the enable behaviour follows the real cell; the period and jitter
// values are the model's own.
module tb_ring_oscillator;
  logic en = 0, osc;
  int checks = 0, failures = 0;

  ring_oscillator #(.HALF_PERIOD(1000), .JITTER(40), .SEED(3)) dut (.*);

  int edges = 0, min_hp = 1 << 30, max_hp = 0;
  longint last_t = -1;
  longint t;
  always @(osc) begin
    t = $time;
    if (en && last_t >= 0 && edges > 0) begin
      if (t - last_t < min_hp) min_hp = int'(t - last_t);
      if (t - last_t > max_hp) max_hp = int'(t - last_t);
    end
    last_t = t;
    edges++;
  end

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100;
    edges = 0;
    #5000;
    checks++; if (edges != 0 || osc != 0) begin failures++; $display("FAIL toggles while disabled"); end
    en = 1;
    #2000000;
    checks++;
    if (edges < 1900 || edges > 2100) begin failures++; $display("FAIL %0d edges in 2 us", edges); end
    checks++;
    if (min_hp < 980 || max_hp > 1020) begin failures++; $display("FAIL half period %0d..%0d", min_hp, max_hp); end
    checks++;
    if (max_hp - min_hp < 10) begin failures++; $display("FAIL no jitter"); end
    en = 0;
    #5000;
    edges = 0;
    #100000;
    checks++; if (edges != 0 || osc != 0) begin failures++; $display("FAIL toggles after disable"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

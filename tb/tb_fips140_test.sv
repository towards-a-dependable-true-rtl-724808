// tb_fips140_test - self-checking test of the FIPS 140-2 test block.
// Runs 20000-bit datasets: the LFSR's known sequence (record must equal the
// golden record and pass), uniform random bits (record vs reference model,
// verdict vs reference grading), 52 % biased bits (monobit fails), random
// bits with a 30-bit run inserted (long run fails) and an alternating
// sequence (runs and poker fail). The verdict must arrive exactly 17 clocks
// after the clock that takes the last bit (seen at the 18th falling edge).
// Timing: cycle-based clock, one input bit per clock.
// The intervals are those of FIPS 140-2; the reference model and the test
// sequences are this test's own.
module tb_fips140_test;
  import trng_pkg::*;
  logic clk = 0, rst = 1, clear = 0;
  logic in_valid = 0, in_bit = 0;
  logic done, alarm;
  fips_cnt_t cnt;
  int checks = 0, failures = 0;

  fips140_test dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  logic bits [20000];

  task automatic reference(output fips_cnt_t r, output logic bad);
    int f [16];
    int ones = 0, ps = 0, k = 0;
    int r0 [6], r1 [6];
    logic lr = 0;
    foreach (f[i]) f[i] = 0;
    foreach (r0[i]) begin r0[i] = 0; r1[i] = 0; end
    for (int i = 0; i < 20000; i++) ones += bits[i];
    for (int i = 0; i < 20000; i += 4) f[{bits[i], bits[i+1], bits[i+2], bits[i+3]}]++;
    foreach (f[i]) ps += f[i] * f[i];
    while (k < 20000) begin
      int j = k, len;
      while (j < 20000 && bits[j] == bits[k]) j++;
      len = j - k;
      if (bits[k]) r1[(len > 6 ? 6 : len) - 1]++; else r0[(len > 6 ? 6 : len) - 1]++;
      if (len >= 26) lr = 1;
      k = j;
    end
    r.ones = 15'(ones); r.poker_sum = 25'(ps); r.long_run = lr;
    // run counters saturate at 8191
    for (int i = 0; i < 6; i++) begin
      r.runs0[i] = 13'(r0[i] > 8191 ? 8191 : r0[i]);
      r.runs1[i] = 13'(r1[i] > 8191 ? 8191 : r1[i]);
    end
    bad = !(ones > 9725 && ones < 10275) || !(ps > 1563175 && ps < 1576929) || lr;
    for (int i = 0; i < 6; i++)
      if (r0[i] < RUN_LO[i] || r0[i] > RUN_HI[i] || r1[i] < RUN_LO[i] || r1[i] > RUN_HI[i]) bad = 1;
  endtask

  task automatic run(input string name, input logic exp_bad);
    fips_cnt_t r; logic bad; int lat;
    reference(r, bad);
    for (int i = 0; i < 20000; i++) begin
      @(negedge clk); in_valid = 1; in_bit = bits[i];
    end
    @(negedge clk); in_valid = 0;
    lat = 1;
    while (!done && lat < 100) begin @(negedge clk); lat++; end
    check(lat == 18, $sformatf("%s: verdict latency %0d", name, lat));
    check(cnt == r, {name, ": counter record"});
    check(alarm == bad, {name, ": verdict vs reference"});
    check(alarm == exp_bad, {name, ": expected verdict"});
    if (cnt != r) $display("  got %p\n  exp %p", cnt, r);
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] lfsr = 64'h0123_4567_89AB_CDEF;
    void'($urandom(5));
    repeat (2) @(negedge clk);
    rst = 0;
    for (int i = 0; i < 20000; i++) begin
      bits[i] = lfsr[0];
      lfsr = (lfsr >> 1) ^ (lfsr[0] ? 64'hD800_0000_0000_0000 : 64'd0);
    end
    run("lfsr", 0);
    check(cnt == FIPS_GOLDEN, "lfsr: golden record");
    for (int i = 0; i < 20000; i++) bits[i] = $urandom % 2;
    run("uniform", 0);
    for (int i = 0; i < 20000; i++) bits[i] = ($urandom % 1000) < 520;
    run("biased52", 1);
    for (int i = 0; i < 20000; i++) bits[i] = $urandom % 2;
    for (int i = 5000; i < 5030; i++) bits[i] = 0;
    bits[4999] = 1; bits[5030] = 1;
    run("long run", 1);
    check(cnt.long_run == 1, "long run flagged");
    for (int i = 0; i < 20000; i++) bits[i] = i % 2;
    run("alternating", 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

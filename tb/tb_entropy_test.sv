// tb_entropy_test - self-checking test of the on-the-fly entropy tests.
// Runs consecutive 8192-bit datasets through the block: the LFSR's known
// sequence (record must equal the golden record), a uniform random source
// (no alarm), a source biased to 55 % ones (medium alarm only), an
// alternating 0101... source and a stuck-at-1 source (low alarm). For every
// dataset the counter record and both alarms are compared with a reference
// model, and done must follow the last bit by one clock. A clear in the
// middle of a dataset must restart it.
// Timing: cycle-based clock, one input bit per clock.
// The 8192-bit dataset follows the design; the reference model re-derives
// the three estimators from their definitions, and the bias levels are this
// test's own choices.
module tb_entropy_test;
  import trng_pkg::*;
  logic clk = 0, rst = 1, clear = 0;
  logic in_valid = 0, in_bit = 0;
  logic done, medium_alarm, low_alarm;
  ent_cnt_t cnt;
  int checks = 0, failures = 0;

  entropy_test dut (.*);

  always #5 clk = ~clk;

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 20) $display("FAIL %s t=%0t", what, $time); end
  endtask

  logic bits [8192];
  logic [63:0] lfsr = 64'h0123_4567_89AB_CDEF;

  // reference: independent count of the three estimators
  task automatic reference(output ent_cnt_t r, output logic med, output logic low);
    int f = 0, c2 = 0, c3 = 0, pc = 0, st = 0;
    logic fb = 0;
    int fd, cd, pd;
    for (int i = 0; i < 8192; i++) begin
      f += bits[i] ? 1 : -1;
      if (i % 2 == 1 && bits[i] != bits[i-1]) pc++;
      case (st)
        0: begin fb = bits[i]; st = 1; end
        1: if (bits[i] == fb) begin c2++; st = 0; end else st = 2;
        default: begin c3++; st = 0; end
      endcase
    end
    r.freq_diff = 15'(f); r.coll2 = 13'(c2); r.coll3 = 13'(c3); r.pcoll = 13'(pc);
    fd = f < 0 ? -f : f; cd = c2 > c3 ? c2 - c3 : c3 - c2; pd = pc > 2048 ? pc - 2048 : 2048 - pc;
    low = fd > 1218 || cd > 720 || pd > 512;
    med = low || fd > 588 || cd > 360 || pd > 256;
  endtask

  task automatic run(input string name, input logic exp_med, input logic exp_low, input logic gaps);
    ent_cnt_t r; logic m, l; int lat;
    reference(r, m, l);
    for (int i = 0; i < 8192; i++) begin
      if (gaps) while ($urandom % 3 == 0) begin @(negedge clk); in_valid = 0; end
      @(negedge clk); in_valid = 1; in_bit = bits[i];
    end
    @(negedge clk); in_valid = 0;
    check(done == 1, {name, ": done one clock after last bit"});
    check(cnt == r, {name, ": counter record"});
    check(medium_alarm == m && low_alarm == l, {name, ": alarms vs reference"});
    check(medium_alarm == exp_med && low_alarm == exp_low, {name, ": expected grade"});
    if (cnt != r) $display("  got %p exp %p", cnt, r);
    @(negedge clk);
    check(done == 0, {name, ": done is a pulse"});
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(11));
    repeat (2) @(negedge clk);
    rst = 0;
    // LFSR sequence -> golden record
    for (int i = 0; i < 8192; i++) begin
      bits[i] = lfsr[0];
      lfsr = (lfsr >> 1) ^ (lfsr[0] ? 64'hD800_0000_0000_0000 : 64'd0);
    end
    run("lfsr", 0, 0, 0);
    check(cnt == ENT_GOLDEN, "lfsr: golden record");
    for (int i = 0; i < 8192; i++) bits[i] = $urandom % 2;
    run("uniform", 0, 0, 1);
    for (int i = 0; i < 8192; i++) bits[i] = ($urandom % 1000) < 550;
    run("biased55", 1, 0, 0);
    for (int i = 0; i < 8192; i++) bits[i] = i % 2;
    run("alternating", 1, 1, 0);
    for (int i = 0; i < 8192; i++) bits[i] = 1;
    run("stuck1", 1, 1, 0);
    // clear in the middle of a dataset: partial data is dropped
    for (int i = 0; i < 3000; i++) begin @(negedge clk); in_valid = 1; in_bit = 1; end
    @(negedge clk); in_valid = 0; clear = 1;
    @(negedge clk); clear = 0;
    for (int i = 0; i < 8192; i++) bits[i] = $urandom % 2;
    run("after clear", 0, 0, 0);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_galois_lfsr - self-checking test of the 64-bit Galois LFSR.
// Checks the closed-loop sequence against a reference shift-and-XOR model
// of x^64+x^63+x^61+x^60+1 started from the seed, that restart reproduces
// it, that the state does not return to the seed early, and that in
// post-processing mode the noise bit enters the feedback and one output bit
// is taken every DECIM clocks.
// Timing: cycle-based clock; DECIM is reduced for a short run.
// The two modes follow the design; the polynomial, seed and reference model
// are this design's own choices.
module tb_galois_lfsr;
  import trng_pkg::*;
  logic clk = 0, rst = 1;
  logic restart = 0, enable = 0, testing_mode = 1;
  logic ns_a = 0, ns_b = 0, ns_sel = 0;
  logic rng, out_valid;
  int checks = 0, failures = 0;

  galois_lfsr #(.DECIM(7)) dut (.*);

  always #5 clk = ~clk;

  logic [63:0] ref_state;
  function automatic logic [63:0] step(logic [63:0] s, logic inj);
    logic fb = s[0] ^ inj;
    logic [63:0] n = {1'b0, s[63:1]};
    if (fb) begin
      n[63] ^= 1; n[62] ^= 1; n[60] ^= 1; n[59] ^= 1;  // x^64,x^63,x^61,x^60
    end
    return n;
  endfunction

  task automatic check(input logic c, input string what);
    checks++;
    if (!c) begin failures++; if (failures < 10) $display("FAIL %s t=%0t", what, $time); end
  endtask

  initial begin
    #10000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [63:0] s;
    int valids;
    repeat (2) @(posedge clk);
    rst <= 0;
    // ---- testing mode
    enable <= 1;
    s = 64'h0123_4567_89AB_CDEF;
    @(posedge clk);
    for (int i = 0; i < 5000; i++) begin
      @(negedge clk);
      check(out_valid == 1, "valid every clock in testing mode");
      check(rng == s[0], "closed-loop sequence");
      check(i == 0 || dut.state != 64'h0123_4567_89AB_CDEF, "no early repeat");
      s = step(s, 0);
    end
    // ---- restart reproduces the sequence
    @(negedge clk) restart = 1;
    @(negedge clk) restart = 0;
    s = 64'h0123_4567_89AB_CDEF;
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      check(rng == s[0], "sequence after restart");
      s = step(s, 0);
    end
    // ---- post-processing mode: noise XORed into feedback, decimation 7
    @(negedge clk) begin testing_mode = 0; restart = 1; end
    @(negedge clk) restart = 0;
    s = 64'h0123_4567_89AB_CDEF;
    valids = 0;
    for (int i = 0; i < 700; i++) begin
      logic a, b;
      a = $urandom % 2; b = $urandom % 2;
      ns_a = a; ns_b = b; ns_sel = (i / 100) % 2;
      @(negedge clk);
      if (out_valid) begin
        valids++;
        check(rng == s[0], "noise-fed output bit");
      end
      s = step(s, ((i / 100) % 2) ? b : a);
    end
    check(valids == 100, "one bit per DECIM clocks");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

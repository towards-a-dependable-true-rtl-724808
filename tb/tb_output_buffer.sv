// tb_output_buffer - self-checking test of the 20 Kbit release buffer.
// Writes three 20000-bit datasets at one bit per 4 clocks. The first gets a
// passing verdict 17 clocks after its last bit: its 625 words must come out
// one per clock, LSB-first packed, equal to the bits written, while the
// second dataset is already being written. The second fails: nothing may
// come out. A clear in the third dataset drops its first part; the rest is
// released after a pass.
// Timing: cycle-based clock. The 20 Kbit size follows the design; the word
// width, read-out rate and the verdict delay are this design's own.
module tb_output_buffer;
  logic clk = 0, rst = 1, clear = 0;
  logic in_valid = 0, in_bit = 0, verdict_valid = 0, verdict_pass = 0;
  logic out_valid, released, dropped;
  logic [31:0] out_word;
  int checks = 0, failures = 0;

  output_buffer dut (.*);

  always #5 clk = ~clk;

  logic [31:0] expw [625];
  logic [31:0] gotw [$];
  int n_released = 0, n_dropped = 0;
  always @(posedge clk) if (!rst) begin
    if (out_valid) gotw.push_back(out_word);
    if (released) n_released++;
    if (dropped)  n_dropped++;
  end

  task automatic write_set(input int nbits, input bit keep, input bit verdict, input bit pass);
    for (int i = 0; i < nbits; i++) begin
      logic b = 1'($urandom % 2);
      if (keep) expw[i / 32][i % 32] = b;
      @(negedge clk); in_valid = 1; in_bit = b;
      @(negedge clk); in_valid = 0;
      repeat (2) @(negedge clk);
    end
    if (verdict) begin
      repeat (16) @(negedge clk);
      verdict_valid = 1; verdict_pass = pass;
      @(negedge clk); verdict_valid = 0;
    end
  endtask

  task automatic compare(input string what);
    checks++;
    if (gotw.size() != 625) begin failures++; $display("FAIL %s: %0d words", what, gotw.size()); end
    else for (int i = 0; i < 625; i++) begin
      checks++;
      if (gotw[i] !== expw[i]) begin failures++; if (failures < 10) $display("FAIL %s word %0d", what, i); end
    end
    gotw.delete();
  endtask

  initial begin
    #100000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    void'($urandom(3));
    repeat (2) @(negedge clk);
    rst = 0;
    write_set(20000, 1, 1, 1);
    // next dataset starts immediately; read-out runs meanwhile
    write_set(20000, 0, 1, 0);
    repeat (3) @(negedge clk);
    compare("passed dataset");
    checks++; if (n_released != 1) begin failures++; $display("FAIL released count"); end
    checks++; if (n_dropped != 1) begin failures++; $display("FAIL dropped count"); end
    // clear drops a partial dataset
    write_set(5000, 0, 0, 0);
    @(negedge clk) clear = 1;
    @(negedge clk) clear = 0;
    write_set(20000, 1, 1, 1);
    repeat (700) @(negedge clk);
    compare("dataset after clear");
    checks++; if (n_released != 2) begin failures++; $display("FAIL released count 2"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

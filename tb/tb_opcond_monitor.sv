// tb_opcond_monitor - self-checking test of the operating-condition alarm.
// Converts physical values (temperature in C, voltages in V) to ADC codes
// with the 7-series transfer functions and checks the alarm for nominal
// conditions, for each quantity just inside and just outside its limits,
// and that the alarm only updates on sample_valid.
// Timing: cycle-based clock; one clock from sample_valid to the alarm.
// The four monitored quantities follow the design; the limit values and the
// code conversion are this design's own choices.
module tb_opcond_monitor;
  logic clk = 0, rst = 1, sample_valid = 0;
  logic [11:0] temp, vccint, vccaux, vccbram;
  logic ext_alarm;
  int checks = 0, failures = 0;

  opcond_monitor dut (.*);

  always #5 clk = ~clk;

  function automatic logic [11:0] tcode(real t);
    return 12'($rtoi((t + 273.15) * 4096.0 / 503.975));
  endfunction
  function automatic logic [11:0] vcode(real v);
    return 12'($rtoi(v / 3.0 * 4096.0 + 0.5));
  endfunction

  task automatic sample(input real t, input real vi, input real va, input real vb, input logic exp, input string what);
    @(negedge clk);
    temp = tcode(t); vccint = vcode(vi); vccaux = vcode(va); vccbram = vcode(vb);
    sample_valid = 1;
    @(negedge clk); sample_valid = 0;
    checks++;
    if (ext_alarm !== exp) begin failures++; $display("FAIL %s: alarm %b", what, ext_alarm); end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2) @(negedge clk);
    rst = 0;
    sample(25.0, 1.00, 1.80, 1.00, 0, "nominal");
    sample(84.0, 1.00, 1.80, 1.00, 0, "84 C");
    sample(95.0, 1.00, 1.80, 1.00, 1, "95 C");
    sample(-10.0, 1.00, 1.80, 1.00, 1, "-10 C");
    sample(25.0, 0.90, 1.80, 1.00, 1, "VCCINT low");
    sample(25.0, 1.10, 1.80, 1.00, 1, "VCCINT high");
    sample(25.0, 0.96, 1.72, 1.04, 0, "all near limits");
    sample(25.0, 1.00, 1.65, 1.00, 1, "VCCAUX low");
    sample(25.0, 1.00, 1.95, 1.00, 1, "VCCAUX high");
    sample(25.0, 1.00, 1.80, 0.90, 1, "VCCBRAM low");
    // without sample_valid the alarm holds
    @(negedge clk); temp = tcode(25.0); vccbram = vcode(1.0);
    repeat (3) @(negedge clk);
    checks++; if (ext_alarm !== 1) begin failures++; $display("FAIL alarm not held"); end
    sample(25.0, 1.00, 1.80, 1.00, 0, "back to nominal");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// ring_oscillator - behavioural model of one enable-able ring oscillator.
//
// Behavioural model, not synthesizable: the real part is a loop of four
// inverters closed through a NAND gate whose second input is the enable, so
// that the loop oscillates while enable is high and rests at a constant level
// while it is low. The model reproduces that function with delays: while
// enabled, the output toggles every half period, and each half period is the
// nominal value plus a uniformly distributed random jitter drawn with
// $urandom. The jitter is what the sampling flip-flops of the extractor turn
// into entropy.
//
// Interface: en (high = oscillate), osc (the oscillator output).
// Timing: delays are in the simulator's default time unit (1 ps here); the
// nominal half period and the jitter range are parameters chosen for this
// model (the period and jitter of the real cells are set by the silicon).
// The random delays are always at least 1 ps; lint tools may note that they
// cannot prove this statically. Synthesis tools reject the model, as they
// must: on silicon this cell is built from gates, not from this code.
// Follows the design: four inverters plus a NAND enable, jitter as the
// entropy source. Own choices: the period, jitter and rest level.
module ring_oscillator #(
  parameter int unsigned HALF_PERIOD = 1200,  // nominal half period, ps
  parameter int unsigned JITTER      = 40,    // peak-to-peak jitter per half period, ps
  parameter int unsigned SEED        = 1      // per-instance random stream
) (
  input  logic en,
  output logic osc
);

  logic state;

  initial begin
    state = 1'b0;
    void'($urandom(SEED));
    forever begin
      if (!en) begin
        state = 1'b0;
        @(posedge en);
        // restart after a short, random settling time
        #(1 + ($urandom % HALF_PERIOD));
      end else begin
        #(HALF_PERIOD - JITTER / 2 + ($urandom % (JITTER + 1)));
        if (en) state = ~state;
      end
    end
  end

  assign osc = state;

endmodule

// opcond_monitor - operating-condition alarm from the on-chip sensors.
//
// Ring-oscillator jitter, and so the validity of the noise source's
// stochastic model, depends on temperature and supply voltage. The FPGA's
// sensor ADC delivers 12-bit codes for the die temperature, VCCINT, VCCAUX
// and VCCBRAM; this block compares every new set of readings with a lower
// and an upper limit per quantity and raises ext_alarm while any reading lies
// outside its window. The alarm is updated on each sample_valid.
//
// Codes follow the 7-series ADC transfer functions: supply code =
// V / 3 V * 4096, temperature code = (T + 273.15) * 4096 / 503.975. The
// default limits are the recommended operating ranges of an Artix-7
// commercial-grade device: 0..85 C, VCCINT and VCCBRAM 0.95..1.05 V, VCCAUX
// 1.71..1.89 V.
//
// Interface: one clock from sample_valid to ext_alarm.
// Follows the source design: the four monitored quantities and an alarm
// when one leaves its limits set from the vendor's recommendations. Own
// choices: the code-domain comparison and the limit values above.
module opcond_monitor #(
  parameter logic [11:0] TEMP_LO  = 12'd2220,  // 0 C
  parameter logic [11:0] TEMP_HI  = 12'd2911,  // 85 C
  parameter logic [11:0] VINT_LO  = 12'd1297,  // 0.95 V
  parameter logic [11:0] VINT_HI  = 12'd1434,  // 1.05 V
  parameter logic [11:0] VAUX_LO  = 12'd2335,  // 1.71 V
  parameter logic [11:0] VAUX_HI  = 12'd2580,  // 1.89 V
  parameter logic [11:0] VBRAM_LO = 12'd1297,  // 0.95 V
  parameter logic [11:0] VBRAM_HI = 12'd1434   // 1.05 V
) (
  input  logic        clk,
  input  logic        rst,
  input  logic        sample_valid,
  input  logic [11:0] temp,
  input  logic [11:0] vccint,
  input  logic [11:0] vccaux,
  input  logic [11:0] vccbram,
  output logic        ext_alarm
);

  logic out_of_range;

  always_comb begin
    out_of_range = (temp    < TEMP_LO)  || (temp    > TEMP_HI)  ||
                   (vccint  < VINT_LO)  || (vccint  > VINT_HI)  ||
                   (vccaux  < VAUX_LO)  || (vccaux  > VAUX_HI)  ||
                   (vccbram < VBRAM_LO) || (vccbram > VBRAM_HI);
  end

  always_ff @(posedge clk) begin
    if (rst)               ext_alarm <= 1'b0;
    else if (sample_valid) ext_alarm <= out_of_range;
  end

endmodule

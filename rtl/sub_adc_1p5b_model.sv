// sub_adc_1p5b_model -- behavioural model (analog comparators), not synthesizable.
//
// 1.5-bit sub-ADC of a pipeline stage: two comparators with thresholds at
// -Vref/4 and +Vref/4 decide the stage digit b = -1, 0 or +1. The model is a
// two-mode sub-ADC: with shift_en high both thresholds move up by SHIFT*Vref
// (1/8 Vref by default). The shift is what makes the two split channels
// disagree in narrow input regions, which the calibration uses to measure the
// stage's analog reference. Thresholds and shift size follow the design; the
// upward direction is the one for which channel A decides the lower digit in
// those regions. OFFSET (volts, default 0) moves both thresholds together and
// models a comparator offset; the redundancy of the 1.5-bit stage tolerates
// offsets up to Vref/8 less the shift, i.e. Vref/16 here.
//
// Interface: vin (real, volts), shift_en, b (two's complement digit).
// Timing: combinational; the stage model samples vin on the clock.
module sub_adc_1p5b_model #(
  parameter real VREF  = 1.0,
  parameter real SHIFT  = 0.125,
  parameter real OFFSET = 0.0
) (
  input  real                      vin,
  input  logic                     shift_en,
  output pipe_adc_pkg::digit_t     b
);
  real th;

  always_comb begin
    th = OFFSET + (shift_en ? SHIFT * VREF : 0.0);
    if (vin > VREF / 4.0 + th)
      b = 2'sb01;
    else if (vin > -VREF / 4.0 + th)
      b = 2'sb00;
    else
      b = 2'sb11;
  end
endmodule

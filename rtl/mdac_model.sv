// mdac_model -- behavioural model (switched-capacitor MDAC), not synthesizable.
//
// Flip-around 1.5-bit multiplying DAC of a pipeline stage. With sampling
// capacitor Cs, feedback capacitor Cf, 1+alpha = Cs/Cf and an amplifier of DC
// gain A, the residue is
//     vres = (1+gamma) * ((2+alpha)*vin - (1+alpha)*b*Vref),
//     1+gamma = 1 / (1 + (1 + Cs/Cf)/A).
// The finite gain shrinks the subtracted reference to (1+gamma)*Vref, the
// error the calibration measures. A_DB is the gain in dB (50 dB in the
// evaluated design); IDEAL=1 makes an infinite-gain, mismatch-free MDAC for
// the stages of the ideal backend. The switch phases are not modelled.
//
// Interface: vin (real), b (digit), vres (real). Timing: combinational.
module mdac_model #(
  parameter real VREF  = 1.0,
  parameter real A_DB  = 50.0,
  parameter real ALPHA = 0.0,
  parameter bit  IDEAL = 1'b0
) (
  input  real                   vin,
  input  pipe_adc_pkg::digit_t  b,
  output real                   vres
);
  localparam real A_LIN = 10.0 ** (A_DB / 20.0);
  localparam real G     = IDEAL ? 1.0 : 1.0 / (1.0 + (2.0 + ALPHA) / A_LIN);
  localparam real AL    = IDEAL ? 0.0 : ALPHA;

  always_comb
    vres = G * ((2.0 + AL) * vin - (1.0 + AL) * real'(b) * VREF);
endmodule

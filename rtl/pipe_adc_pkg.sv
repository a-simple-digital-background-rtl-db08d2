// pipe_adc_pkg: constants and types shared by the split pipelined ADC and its
// digital background gain calibration.
//
// Digital voltages: every digital quantity that stands for a voltage (stage
// residues, stage inputs, references) is a signed fixed-point number in which
// the reference voltage Vref is 2**FRAC. Sixteen fractional bits give four
// bits below the 12-bit output LSB, so that a calibrated reference that is not
// a power of two can be applied without visible rounding. The word is DW bits
// wide, enough for D[Vres] + b*W (up to about +/-2.1 Vref) with margin.
//
// The converter size follows the design this RTL implements: 12-bit
// resolution, N-2 = 10 stages of 1.5 bit plus a 2-bit flash, the first four
// stages calibrated. FRAC, DW and the averaging length are this design's own
// choices.
package pipe_adc_pkg;
  localparam int unsigned N_BITS   = 12;          // converter resolution
  localparam int unsigned N_STAGES = N_BITS - 2;  // 1.5-bit stages before the flash
  localparam int unsigned N_CAL    = 4;           // stages whose reference is calibrated
  localparam int unsigned FRAC     = 16;          // Vref = 2**FRAC
  localparam int unsigned DW       = FRAC + 4;    // width of a digital voltage
  localparam int unsigned LOG2_AVG = 8;           // 2**LOG2_AVG differences per estimate

  // Stage digit b of a 1.5-bit stage: -1, 0 or +1.
  typedef logic signed [1:0] digit_t;
  // Digital voltage, Vref = 2**FRAC.
  typedef logic signed [DW-1:0] dval_t;

  localparam dval_t VREF_D = dval_t'(1) <<< FRAC;

  // Digital value of the 2-bit last-stage code: the middle of its quarter of
  // [-Vref, Vref], (2*code - 3) * Vref/4.
  function automatic dval_t flash_value(input logic [1:0] code);
    logic signed [3:0] m;
    m = $signed({2'b00, code}) * 4'sd2 - 4'sd3;
    return dval_t'(m) <<< (FRAC - 2);
  endfunction
endpackage

// recon_cell: digital output of one 1.5-bit stage.
//
// The stage subtracts b*(1+gamma)*Vref in the analog domain and amplifies by
// two; its input is recovered digitally as
//     d_out = (d_res + b*w) / 2,
// where d_res is the backend's digital value of the stage residue and w the
// digital reference of the stage: Vref for an ideal stage, the measured
// D[(1+gamma)Vref] for a calibrated one. b*w is a three-way select (no
// multiplier) and the halving an arithmetic shift right, i.e. truncation;
// both are this design's choice.
//
// Interface: d_res, w, d_out in pipe_adc_pkg::dval_t (Vref = 2**FRAC), b the
// stage digit. Timing: combinational.
module recon_cell (
  input  pipe_adc_pkg::dval_t   d_res,
  input  pipe_adc_pkg::digit_t  b,
  input  pipe_adc_pkg::dval_t   w,
  output pipe_adc_pkg::dval_t   d_out
);
  import pipe_adc_pkg::*;

  dval_t bw;
  dval_t sum;

  always_comb begin
    unique case (b)
      2'sb01:  bw = w;
      2'sb11:  bw = -w;
      default: bw = '0;
    endcase
    sum   = d_res + bw;
    d_out = sum >>> 1;
  end
endmodule

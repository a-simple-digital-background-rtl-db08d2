// digital_correction: error correction and bit alignment of one split-ADC
// channel.
//
// The stage digits are first aligned (code_align). The last-stage code gives
// the digital residue of the last 1.5-bit stage, and a chain of recon_cell
// blocks works back to stage 1, each computing D_k = (D_{k+1} + b_k*W_k)/2.
// The first N_CAL stages use the calibrated references w[]; the stages of the
// backend use the ideal Vref. Besides the channel output D_1 the block brings
// out, for the calibrated stages, the aligned digit b_k and the digital
// residue D_{k+1} = D[Vres_k]: these feed the reference estimator. A reference
// written in w[] acts at once on the residues of the stages before it, which
// is why the stages are calibrated from the last one to the first.
//
// Interface: code_in[i] digit of stage i+1 as it leaves the stage; flash_in;
// w[k] reference of stage k+1; outputs dout, b_cal[k], d_res[k] for stage k+1.
// Timing: all outputs registered; the values of the sample taken by stage 1 at
// edge t appear after edge t+N_STAGES+1. Reset clears the output registers.
module digital_correction #(
  parameter int unsigned N_STAGES = pipe_adc_pkg::N_STAGES,
  parameter int unsigned N_CAL    = pipe_adc_pkg::N_CAL
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pipe_adc_pkg::digit_t  code_in [N_STAGES],
  input  logic [1:0]            flash_in,
  input  pipe_adc_pkg::dval_t   w       [N_CAL],
  output pipe_adc_pkg::dval_t   dout,
  output pipe_adc_pkg::digit_t  b_cal   [N_CAL],
  output pipe_adc_pkg::dval_t   d_res   [N_CAL]
);
  import pipe_adc_pkg::*;

  digit_t     code_al [N_STAGES];
  logic [1:0] flash_al;
  dval_t      d [N_STAGES+1];   // d[k] = digital value of the input of stage k+1

  code_align #(.N_STAGES(N_STAGES)) u_align (
    .clk(clk), .code_in(code_in), .flash_in(flash_in),
    .code_out(code_al), .flash_out(flash_al)
  );

  assign d[N_STAGES] = flash_value(flash_al);

  for (genvar k = 0; k < N_STAGES; k++) begin : g_cell
    dval_t wk;
    if (k < N_CAL) begin : g_cal
      assign wk = w[k];
    end else begin : g_ideal
      assign wk = VREF_D;
    end
    recon_cell u_cell (.d_res(d[k+1]), .b(code_al[k]), .w(wk), .d_out(d[k]));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dout <= '0;
      for (int k = 0; k < N_CAL; k++) begin
        b_cal[k] <= '0;
        d_res[k] <= '0;
      end
    end else begin
      dout <= d[0];
      for (int k = 0; k < N_CAL; k++) begin
        b_cal[k] <= code_al[k];
        d_res[k] <= d[k+1];
      end
    end
  end
endmodule

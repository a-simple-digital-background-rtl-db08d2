// split_cal_digital: the synthesizable digital back end of the split
// pipelined ADC with background gain calibration.
//
// It takes the raw stage digits of the two channels, A and B, and holds
// everything that is logic: one digital_correction per channel (bit alignment
// and the per-stage reconstruction D = (D[Vres] + b*W)/2), the shared
// reference registers W of the first N_CAL stages, the ref_estimator that
// averages D[Vres_A] - D[Vres_B] where b_A - b_B = -1, the cal_sequencer that
// walks the calibration from stage N_CAL to stage 1 and drives channel A's
// threshold-shift controls, and the split_combiner that reports
// (D_A + D_B)/2. Both channels use the same references, following the
// assumption that their stages carry the same errors.
//
// Interface: codes_a/codes_b[i] digit of stage i+1 as it leaves the stage,
// flash_a/flash_b the last-stage codes; shift_a[k] goes to channel A's
// stage k+1 sub-ADC. cal_start starts a pass. Outputs as split_adc_top.
// Timing: a sample whose stage-1 digit arrives in clock t leaves on code,
// d_avg and d_diff after edge t + N_STAGES + 2.
module split_cal_digital #(
  parameter int unsigned N_BITS   = pipe_adc_pkg::N_BITS,
  parameter int unsigned N_CAL    = pipe_adc_pkg::N_CAL,
  parameter int unsigned LOG2_AVG = pipe_adc_pkg::LOG2_AVG,
  localparam int unsigned NS      = N_BITS - 2,
  localparam int unsigned SELW    = (N_CAL > 1) ? $clog2(N_CAL) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  pipe_adc_pkg::digit_t  codes_a [NS],
  input  logic [1:0]            flash_a,
  input  pipe_adc_pkg::digit_t  codes_b [NS],
  input  logic [1:0]            flash_b,
  input  logic                  cal_start,
  output logic [N_CAL-1:0]      shift_a,
  output logic [N_BITS-1:0]     code,
  output pipe_adc_pkg::dval_t   d_avg,
  output pipe_adc_pkg::dval_t   d_diff,
  output pipe_adc_pkg::dval_t   w [N_CAL],
  output logic                  cal_busy,
  output logic                  cal_done,
  output logic [SELW-1:0]       cal_stage,
  output logic [LOG2_AVG:0]     cal_hits
);
  import pipe_adc_pkg::*;

  dval_t           dout_a, dout_b;
  digit_t          bcal_a [N_CAL];
  digit_t          bcal_b [N_CAL];
  dval_t           dres_a [N_CAL];
  dval_t           dres_b [N_CAL];
  logic            est_clear, est_enable, est_done;
  dval_t           est_w;

  digital_correction #(.N_STAGES(NS), .N_CAL(N_CAL)) u_corr_a (
    .clk(clk), .rst_n(rst_n), .code_in(codes_a), .flash_in(flash_a), .w(w),
    .dout(dout_a), .b_cal(bcal_a), .d_res(dres_a)
  );
  digital_correction #(.N_STAGES(NS), .N_CAL(N_CAL)) u_corr_b (
    .clk(clk), .rst_n(rst_n), .code_in(codes_b), .flash_in(flash_b), .w(w),
    .dout(dout_b), .b_cal(bcal_b), .d_res(dres_b)
  );

  ref_estimator #(.N_CAL(N_CAL), .LOG2_AVG(LOG2_AVG)) u_est (
    .clk(clk), .rst_n(rst_n), .clear(est_clear), .enable(est_enable), .sel(cal_stage),
    .b_a(bcal_a), .b_b(bcal_b), .dres_a(dres_a), .dres_b(dres_b),
    .done(est_done), .w_est(est_w), .hits(cal_hits)
  );

  // SETTLE covers the stage-to-output latency, so that every sample the
  // estimator sees was converted with the shifted thresholds.
  cal_sequencer #(.N_CAL(N_CAL), .SETTLE(NS + 2)) u_seq (
    .clk(clk), .rst_n(rst_n), .start(cal_start), .est_done(est_done), .est_w(est_w),
    .shift_a(shift_a), .est_clear(est_clear), .est_enable(est_enable), .sel(cal_stage),
    .w(w), .busy(cal_busy), .cal_done(cal_done)
  );

  split_combiner #(.N_BITS(N_BITS)) u_comb (
    .clk(clk), .rst_n(rst_n), .d_a(dout_a), .d_b(dout_b),
    .d_avg(d_avg), .d_diff(d_diff), .code(code)
  );
endmodule

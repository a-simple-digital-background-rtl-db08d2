// split_adc_top: split pipelined ADC with digital background calibration of
// the stage gain errors.
//
// Two identical pipelined channels, A and B (N_BITS-2 stages of 1.5 bit and a
// 2-bit flash each), convert the same analog input. Each channel's digits are
// aligned and corrected with per-stage digital references,
// D = (D[Vres] + b*W)/2, and the output is the average of the two channels.
// A stage whose amplifier has finite gain subtracts (1+gamma)*Vref instead of
// Vref, so W must be the digital value of that analog reference. To measure
// it, the calibration shifts channel A's sub-ADC thresholds of that stage up
// by Vref/8: where the two channels then decide different digits
// (b_A - b_B = -1) their digital residues differ by exactly the analog
// reference, and the average of that difference becomes W. Stages N_CAL..1 are
// calibrated in that order while the converter keeps converting; the
// redundancy of the 1.5-bit stages keeps the output right while A's
// thresholds are shifted.
//
// The analog channels are behavioural models (adc_channel_model) with a
// real-valued input; everything from the stage digits on is the synthesizable
// split_cal_digital. Both channels have the same stage errors, set by A_DB
// (amplifier DC gain of the first N_CAL stages); the later stages are ideal.
// OFFSET_A and OFFSET_B (volts, default 0) give each channel's comparators an
// offset, which the stage redundancy absorbs up to Vref/16.
//
// Interface: vin (real, volts, full scale +/-1 V), cal_start pulse; code
// (N_BITS-bit two's complement, Vref = 2**(N_BITS-1)); d_avg and d_diff
// (Vref = 2**FRAC); w[k] the reference of stage k+1; cal_busy, cal_done;
// cal_stage and cal_hits show the stage being calibrated and its averaging
// progress.
// Timing: one sample per clock; the sample taken at edge t appears on code,
// d_avg and d_diff after edge t + N_BITS.
module split_adc_top #(
  parameter int unsigned N_BITS   = pipe_adc_pkg::N_BITS,
  parameter int unsigned N_CAL    = pipe_adc_pkg::N_CAL,
  parameter int unsigned LOG2_AVG = pipe_adc_pkg::LOG2_AVG,
  parameter real         A_DB     = 50.0,
  parameter real         OFFSET_A = 0.0,
  parameter real         OFFSET_B = 0.0,
  localparam int unsigned SELW    = (N_CAL > 1) ? $clog2(N_CAL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  real                  vin,
  input  logic                 cal_start,
  output logic [N_BITS-1:0]    code,
  output pipe_adc_pkg::dval_t  d_avg,
  output pipe_adc_pkg::dval_t  d_diff,
  output pipe_adc_pkg::dval_t  w [N_CAL],
  output logic                 cal_busy,
  output logic                 cal_done,
  output logic [SELW-1:0]      cal_stage,
  output logic [LOG2_AVG:0]    cal_hits
);
  import pipe_adc_pkg::*;

  localparam int unsigned NS = N_BITS - 2;

  digit_t           codes_a [NS];
  digit_t           codes_b [NS];
  logic [1:0]       flash_a, flash_b;
  logic [N_CAL-1:0] shift_a;

  // Channel A has the two-mode sub-ADCs; B always uses the normal thresholds.
  adc_channel_model #(.N_STAGES(NS), .N_CAL(N_CAL), .A_DB(A_DB), .CMP_OFFSET(OFFSET_A)) u_chan_a (
    .clk(clk), .vin(vin), .shift_en(shift_a), .codes(codes_a), .flash_code(flash_a)
  );
  adc_channel_model #(.N_STAGES(NS), .N_CAL(N_CAL), .A_DB(A_DB), .CMP_OFFSET(OFFSET_B)) u_chan_b (
    .clk(clk), .vin(vin), .shift_en('0), .codes(codes_b), .flash_code(flash_b)
  );

  split_cal_digital #(.N_BITS(N_BITS), .N_CAL(N_CAL), .LOG2_AVG(LOG2_AVG)) u_digital (
    .clk(clk), .rst_n(rst_n),
    .codes_a(codes_a), .flash_a(flash_a), .codes_b(codes_b), .flash_b(flash_b),
    .cal_start(cal_start), .shift_a(shift_a),
    .code(code), .d_avg(d_avg), .d_diff(d_diff), .w(w),
    .cal_busy(cal_busy), .cal_done(cal_done), .cal_stage(cal_stage), .cal_hits(cal_hits)
  );
endmodule

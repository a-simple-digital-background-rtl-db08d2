// ref_estimator: measures the analog reference (1+gamma)*Vref of the stage
// under calibration.
//
// Channel A's stage runs with its sub-ADC thresholds shifted by Vref/8, channel
// B's with the normal ones. Both stages see the same input, so their residues
// are equal except in the two narrow regions between the shifted and the
// normal thresholds, where b_A - b_B = -1 and the residues differ by exactly
// the analog reference the MDAC subtracts:
//     D[Vres_A] - D[Vres_B] = (1+gamma)*Vref + E_A - E_B.
// The block selects stage sel, accumulates this difference in every sample
// where b_A - b_B = -1, and after 2**LOG2_AVG such samples divides by the
// count (a rounded shift) so that the backend quantisation errors E_A - E_B
// average out. The averaging length is this design's choice.
//
// Interface: clear restarts the average, enable lets it accumulate; b_a/b_b and
// dres_a/dres_b are the aligned digits and digital residues of both channels;
// w_est is the estimate, valid while done is high; hits counts the samples.
// Timing: one sample per clock; done rises the clock after the 2**LOG2_AVG-th
// hit and holds until clear.
module ref_estimator #(
  parameter int unsigned N_CAL    = pipe_adc_pkg::N_CAL,
  parameter int unsigned LOG2_AVG = pipe_adc_pkg::LOG2_AVG,
  localparam int unsigned SELW    = (N_CAL > 1) ? $clog2(N_CAL) : 1
) (
  input  logic                  clk,
  input  logic                  rst_n,
  input  logic                  clear,
  input  logic                  enable,
  input  logic [SELW-1:0]       sel,
  input  pipe_adc_pkg::digit_t  b_a    [N_CAL],
  input  pipe_adc_pkg::digit_t  b_b    [N_CAL],
  input  pipe_adc_pkg::dval_t   dres_a [N_CAL],
  input  pipe_adc_pkg::dval_t   dres_b [N_CAL],
  output logic                  done,
  output pipe_adc_pkg::dval_t   w_est,
  output logic [LOG2_AVG:0]     hits
);
  import pipe_adc_pkg::*;

  localparam int unsigned AW = DW + LOG2_AVG + 2;

  logic signed [AW-1:0] acc;
  logic signed [AW-1:0] acc_rnd;
  logic signed [2:0]    bdiff;
  logic signed [DW:0]   ddiff;
  logic                 hit;

  always_comb begin
    bdiff = 3'(signed'(b_a[sel])) - 3'(signed'(b_b[sel]));
    ddiff = (DW+1)'(signed'(dres_a[sel])) - (DW+1)'(signed'(dres_b[sel]));
    hit   = enable && !done && (bdiff == -3'sd1);
  end

  assign done = hits[LOG2_AVG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc  <= '0;
      hits <= '0;
    end else if (clear) begin
      acc  <= '0;
      hits <= '0;
    end else if (hit) begin
      acc  <= acc + AW'(ddiff);
      hits <= hits + 1'b1;
    end
  end

  always_comb begin
    acc_rnd = acc + (AW'(1) <<< (LOG2_AVG - 1));
    w_est   = DW'(acc_rnd >>> LOG2_AVG);
  end
endmodule

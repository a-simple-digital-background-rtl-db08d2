// cal_sequencer: controls the background calibration of the first N_CAL
// stages.
//
// A pass starts on a pulse of start and calibrates the stages from the last
// calibrated one (stage N_CAL) back to stage 1, because a stage's digital
// residue is only right once every later stage uses its measured reference.
// For each stage it puts channel A's sub-ADC of that stage into the shifted
// mode (shift_a), holds the estimator cleared for SETTLE clocks so that only
// samples converted with the shifted thresholds are averaged, lets the
// estimator accumulate, and when it reports done writes the estimate into the
// stage's reference register w[]. After stage 1 channel A returns to the
// normal thresholds and cal_done is set. The converter keeps converting
// throughout. The order of the stages and the two-mode sub-ADC follow the
// design; the start pulse, SETTLE and the reset values are this design's.
//
// Interface: start; est_done/est_w from ref_estimator; shift_a[k] for stage
// k+1 of channel A; est_clear, est_enable, sel to the estimator; w[] the
// references (reset to the ideal Vref); busy; cal_done.
// Timing: the reference is written on the clock edge that sees est_done.
module cal_sequencer #(
  parameter int unsigned N_CAL  = pipe_adc_pkg::N_CAL,
  parameter int unsigned SETTLE = pipe_adc_pkg::N_STAGES + 2,
  localparam int unsigned SELW  = (N_CAL > 1) ? $clog2(N_CAL) : 1
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic                 start,
  input  logic                 est_done,
  input  pipe_adc_pkg::dval_t  est_w,
  output logic [N_CAL-1:0]     shift_a,
  output logic                 est_clear,
  output logic                 est_enable,
  output logic [SELW-1:0]      sel,
  output pipe_adc_pkg::dval_t  w [N_CAL],
  output logic                 busy,
  output logic                 cal_done
);
  import pipe_adc_pkg::*;

  typedef enum logic [1:0] {S_IDLE, S_SETTLE, S_ACCUM} state_t;

  localparam int unsigned CW = $clog2(SETTLE + 1);

  state_t          state;
  logic [CW-1:0]   cnt;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state    <= S_IDLE;
      sel      <= '0;
      cnt      <= '0;
      cal_done <= 1'b0;
      for (int k = 0; k < N_CAL; k++)
        w[k] <= VREF_D;
    end else begin
      unique case (state)
        S_IDLE: begin
          if (start) begin
            state    <= S_SETTLE;
            sel      <= SELW'(N_CAL - 1);
            cnt      <= '0;
            cal_done <= 1'b0;
          end
        end
        S_SETTLE: begin
          if (cnt == CW'(SETTLE - 1))
            state <= S_ACCUM;
          else
            cnt <= cnt + 1'b1;
        end
        S_ACCUM: begin
          if (est_done) begin
            w[sel] <= est_w;
            cnt    <= '0;
            if (sel == '0) begin
              state    <= S_IDLE;
              cal_done <= 1'b1;
            end else begin
              state <= S_SETTLE;
              sel   <= sel - 1'b1;
            end
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

  always_comb begin
    shift_a    = '0;
    if (state != S_IDLE)
      shift_a[sel] = 1'b1;
    busy       = (state != S_IDLE);
    est_clear  = (state == S_SETTLE);
    est_enable = (state == S_ACCUM);
  end
endmodule

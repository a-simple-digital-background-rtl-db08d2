// adc_channel_model -- behavioural model of the analog part of one split-ADC
// channel, not synthesizable.
//
// A chain of N_STAGES 1.5-bit stages followed by a 2-bit flash: a pipelined
// ADC of N_STAGES+2 bits. The first N_CAL stages have amplifiers of finite DC
// gain A_DB and two-mode sub-ADCs (shift_en[i] shifts stage i+1's thresholds
// by Vref/8); the remaining stages and the flash are ideal and play the role
// of the ideal backend. Both channels of the split ADC use this model with the
// same errors. CMP_OFFSET (volts, default 0) is a comparator offset given to
// the sub-ADCs of all 1.5-bit stages of the channel.
//
// Interface: clk, vin (real), shift_en[N_CAL], codes[i] = digit of stage i+1,
// flash_code.
// Timing: for the sample taken at edge t, codes[i] is valid after edge t+i and
// flash_code after edge t+N_STAGES.
module adc_channel_model #(
  parameter int unsigned N_STAGES = pipe_adc_pkg::N_STAGES,
  parameter int unsigned N_CAL    = pipe_adc_pkg::N_CAL,
  parameter real         A_DB     = 50.0,
  parameter real         VREF     = 1.0,
  parameter real         CMP_OFFSET = 0.0
) (
  input  logic                  clk,
  input  real                   vin,
  input  logic [N_CAL-1:0]      shift_en,
  output pipe_adc_pkg::digit_t  codes [N_STAGES],
  output logic [1:0]            flash_code
);
  real v [N_STAGES+1];

  assign v[0] = vin;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_stage
    if (i < N_CAL) begin : g_cal
      stage_1p5b_model #(.VREF(VREF), .A_DB(A_DB), .IDEAL(1'b0), .OFFSET(CMP_OFFSET)) u_stage (
        .clk(clk), .vin(v[i]), .shift_en(shift_en[i]), .b(codes[i]), .vres(v[i+1])
      );
    end else begin : g_ideal
      stage_1p5b_model #(.VREF(VREF), .A_DB(A_DB), .IDEAL(1'b1), .OFFSET(CMP_OFFSET)) u_stage (
        .clk(clk), .vin(v[i]), .shift_en(1'b0), .b(codes[i]), .vres(v[i+1])
      );
    end
  end

  flash_2b_model #(.VREF(VREF)) u_flash (
    .clk(clk), .vin(v[N_STAGES]), .code(flash_code)
  );
endmodule

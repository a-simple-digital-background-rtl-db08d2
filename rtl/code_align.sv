// code_align: bit alignment of the stage digits of one pipelined channel.
//
// In a pipelined ADC stage i+1 (index i) decides its digit of a sample i
// clocks after stage 1, and the last-stage code arrives N_STAGES clocks after.
// This block delays digit i by N_STAGES-i clocks in a shift register so that
// code_out[] and flash_out carry the digits of one and the same sample. The
// delays match the one-clock-per-stage timing of the analog model.
//
// Interface: code_in[i] from stage i+1, flash_in from the last stage;
// code_out[], flash_out aligned. Timing: flash_out is flash_in (no delay),
// code_out[i] is code_in[i] delayed N_STAGES-i clocks. No reset: the shift
// registers flush within N_STAGES clocks.
module code_align #(
  parameter int unsigned N_STAGES = pipe_adc_pkg::N_STAGES
) (
  input  logic                  clk,
  input  pipe_adc_pkg::digit_t  code_in   [N_STAGES],
  input  logic [1:0]            flash_in,
  output pipe_adc_pkg::digit_t  code_out  [N_STAGES],
  output logic [1:0]            flash_out
);
  import pipe_adc_pkg::*;

  for (genvar i = 0; i < N_STAGES; i++) begin : g_delay
    localparam int unsigned D = N_STAGES - i;
    digit_t sr [D];

    always_ff @(posedge clk) begin
      sr[0] <= code_in[i];
      for (int k = 1; k < D; k++)
        sr[k] <= sr[k-1];
    end

    assign code_out[i] = sr[D-1];
  end

  assign flash_out = flash_in;
endmodule

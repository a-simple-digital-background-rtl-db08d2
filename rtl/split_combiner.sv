// split_combiner: output stage of the split ADC.
//
// The two channels convert the same input; the reported output is their
// average (D_A + D_B)/2 and the difference D_B - D_A is brought out as the
// channel disagreement. The average is also rounded down to an N_BITS-bit
// two's complement code (Vref maps to 2**(N_BITS-1)) and saturated. Average
// and difference follow the design; the code format is this design's.
//
// Interface: d_a, d_b, d_avg, d_diff in pipe_adc_pkg::dval_t; code.
// Timing: all outputs registered, one clock after d_a/d_b; reset clears them.
module split_combiner #(
  parameter int unsigned N_BITS = pipe_adc_pkg::N_BITS
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  pipe_adc_pkg::dval_t  d_a,
  input  pipe_adc_pkg::dval_t  d_b,
  output pipe_adc_pkg::dval_t  d_avg,
  output pipe_adc_pkg::dval_t  d_diff,
  output logic [N_BITS-1:0]    code
);
  import pipe_adc_pkg::*;

  localparam int SH = FRAC - (N_BITS - 1);
  localparam logic signed [DW:0] CMAX = (DW+1)'((1 << (N_BITS - 1)) - 1);
  localparam logic signed [DW:0] CMIN = -(DW+1)'(1 << (N_BITS - 1));

  logic signed [DW:0] sum;
  logic signed [DW:0] avg;
  logic signed [DW:0] q;
  logic [N_BITS-1:0]  code_n;

  always_comb begin
    sum = (DW+1)'(signed'(d_a)) + (DW+1)'(signed'(d_b));
    avg = sum >>> 1;
    q   = avg >>> SH;
    if (q > CMAX)
      code_n = CMAX[N_BITS-1:0];
    else if (q < CMIN)
      code_n = CMIN[N_BITS-1:0];
    else
      code_n = q[N_BITS-1:0];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      d_avg  <= '0;
      d_diff <= '0;
      code   <= '0;
    end else begin
      d_avg  <= DW'(avg);
      d_diff <= d_b - d_a;
      code   <= code_n;
    end
  end
endmodule

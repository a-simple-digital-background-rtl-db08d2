// stage_1p5b_model -- behavioural model of one 1.5-bit pipeline stage, not
// synthesizable.
//
// A stage samples its input on the rising clock edge and then holds, for one
// clock, the sub-ADC digit b and the MDAC residue vres of that sample: the
// next stage samples vres on the following edge. The original technique's two
// switched-capacitor phases are folded into this one clock per stage.
// Built from sub_adc_1p5b_model (two-mode comparators) and mdac_model
// (finite-gain residue amplifier). OFFSET is the comparator offset of the
// sub-ADC in volts.
//
// Interface: clk, vin (real), shift_en (threshold-shift mode of the
// sub-ADC, sampled with vin), b, vres (real).
// Timing: b and vres of the sample taken at edge t are valid after edge t.
module stage_1p5b_model #(
  parameter real VREF  = 1.0,
  parameter real A_DB  = 50.0,
  parameter real ALPHA = 0.0,
  parameter bit  IDEAL = 1'b0,
  parameter real OFFSET = 0.0
) (
  input  logic                  clk,
  input  real                   vin,
  input  logic                  shift_en,
  output pipe_adc_pkg::digit_t  b,
  output real                   vres
);
  real  v_hold;
  logic sh_hold;

  initial begin
    v_hold  = 0.0;
    sh_hold = 1'b0;
  end

  always @(posedge clk) begin
    v_hold  <= vin;
    sh_hold <= shift_en;
  end

  sub_adc_1p5b_model #(.VREF(VREF), .OFFSET(OFFSET)) u_sub_adc (
    .vin(v_hold), .shift_en(sh_hold), .b(b)
  );

  mdac_model #(.VREF(VREF), .A_DB(A_DB), .ALPHA(ALPHA), .IDEAL(IDEAL)) u_mdac (
    .vin(v_hold), .b(b), .vres(vres)
  );
endmodule

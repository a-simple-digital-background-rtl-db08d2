// flash_2b_model -- behavioural model of the 2-bit flash last stage, not
// synthesizable.
//
// Three comparators at -Vref/2, 0 and +Vref/2 quantise the residue of the last
// 1.5-bit stage; the output is the number of comparators that fire, 0..3,
// standing for the digital value (2*code-3)*Vref/4. The threshold positions
// are this design's choice; the published technique only names a 2-bit
// flash.
//
// Interface: clk, vin (real), code. Timing: samples on the rising edge, code
// valid after that edge.
module flash_2b_model #(
  parameter real VREF = 1.0
) (
  input  logic       clk,
  input  real        vin,
  output logic [1:0] code
);
  real v_hold;

  initial v_hold = 0.0;

  always @(posedge clk)
    v_hold <= vin;

  always_comb begin
    code = 2'd0;
    if (v_hold > -VREF / 2.0) code = 2'd1;
    if (v_hold > 0.0)         code = 2'd2;
    if (v_hold > VREF / 2.0)  code = 2'd3;
  end
endmodule

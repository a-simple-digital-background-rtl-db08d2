// tb_stage_1p5b_model: drives a clocked 1.5-bit stage with random inputs and
// shift modes, changed on the falling edge, and checks after each rising edge
// that the digit and residue belong to the input sampled on that edge
// (thresholds +/-Vref/4, +Vref/8 when shifted; residue
// (2 vin - b Vref)/(1+2/A) for A = 50 dB).
module tb_stage_1p5b_model;
  import pipe_adc_pkg::*;
  logic   clk = 1'b0;
  real    vin = 0.0;
  logic   shift_en = 1'b0;
  digit_t b;
  real    vres;
  int checks = 0, failures = 0;

  stage_1p5b_model dut (.clk(clk), .vin(vin), .shift_en(shift_en), .b(b), .vres(vres));

  always #5 clk = ~clk;

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real g = 1.0 / (1.0 + 2.0 / (10.0 ** (50.0 / 20.0)));
    for (int i = 0; i < 500; i++) begin
      automatic real v;
      automatic logic s;
      automatic int e;
      automatic real th;
      @(negedge clk);
      v = (real'($urandom_range(20000)) - 10000.0) / 10000.0;
      s = 1'($urandom_range(1));
      vin = v;
      shift_en = s;
      @(posedge clk);
      #1;
      // The new sample must not show before the edge, and must after it.
      vin = -v;
      th = s ? 0.125 : 0.0;
      e = (v > 0.25 + th) ? 1 : (v > -0.25 + th) ? 0 : -1;
      #1;
      checks++; if (int'(b) != e) begin failures++; $display("FAIL v=%f s=%0d b=%0d exp %0d", v, s, b, e); end
      checks++; if (rabs(vres - g * (2.0 * v - real'(e))) > 1e-9) begin failures++; $display("FAIL residue v=%f %f", v, vres); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

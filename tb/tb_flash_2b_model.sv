// tb_flash_2b_model: sweeps the flash input over [-1.2, 1.2] V, one value per
// clock, and checks the code of the value sampled on each rising edge against
// thresholds -1/2, 0, +1/2 of Vref; also checks that the digital value
// (2*code-3)*Vref/4 lies within Vref/4 of every input in [-Vref, Vref].
module tb_flash_2b_model;
  import pipe_adc_pkg::*;
  logic clk = 1'b0;
  real  vin = 0.0;
  logic [1:0] code;
  int checks = 0, failures = 0;

  flash_2b_model dut (.clk(clk), .vin(vin), .code(code));
  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1200; i <= 1200; i += 3) begin
      automatic real v = real'(i) / 1000.0 + 0.0001;
      automatic int e = (v > 0.5) ? 3 : (v > 0.0) ? 2 : (v > -0.5) ? 1 : 0;
      @(negedge clk) vin = v;
      @(posedge clk) #1 vin = 0.0;
      #1;
      checks++; if (int'(code) != e) begin failures++; $display("FAIL v=%f code=%0d exp %0d", v, code, e); end
      if (v >= -1.0 && v <= 1.0) begin
        automatic real dv = real'(flash_value(code)) / real'(VREF_D);
        checks++;
        if (dv - v > 0.25 || v - dv > 0.25) begin failures++; $display("FAIL value v=%f dv=%f", v, dv); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

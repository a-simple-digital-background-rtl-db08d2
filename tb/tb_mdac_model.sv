// tb_mdac_model: compares the MDAC residue with
// (1+gamma)((2+alpha)vin - (1+alpha) b Vref), 1+gamma = 1/(1+(1+Cs/Cf)/A),
// worked out here, for random inputs and all three digits: a 50 dB MDAC, one
// with 40 dB gain and 1 % capacitor mismatch, and an ideal one (2 vin - b).
module tb_mdac_model;
  import pipe_adc_pkg::*;
  real    vin;
  digit_t b;
  real    vres50, vres40, vresid;
  int checks = 0, failures = 0;

  mdac_model #(.A_DB(50.0))               dut50 (.vin(vin), .b(b), .vres(vres50));
  mdac_model #(.A_DB(40.0), .ALPHA(0.01)) dut40 (.vin(vin), .b(b), .vres(vres40));
  mdac_model #(.IDEAL(1'b1))              dutid (.vin(vin), .b(b), .vres(vresid));

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  function automatic real expect_res(input real a_db, input real al, input real v, input int d);
    real a, g;
    a = 10.0 ** (a_db / 20.0);
    g = 1.0 / (1.0 + (1.0 + (1.0 + al)) / a);
    return g * ((2.0 + al) * v - (1.0 + al) * real'(d));
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 300; i++) begin
      automatic int d = int'($urandom_range(2)) - 1;
      vin = (real'($urandom_range(20000)) - 10000.0) / 10000.0;
      b = digit_t'(d);
      #1;
      checks++; if (rabs(vres50 - expect_res(50.0, 0.0, vin, d)) > 1e-9) begin failures++; $display("FAIL 50dB v=%f b=%0d %f", vin, d, vres50); end
      checks++; if (rabs(vres40 - expect_res(40.0, 0.01, vin, d)) > 1e-9) begin failures++; $display("FAIL 40dB v=%f b=%0d %f", vin, d, vres40); end
      checks++; if (rabs(vresid - (2.0 * vin - real'(d))) > 1e-12) begin failures++; $display("FAIL ideal v=%f b=%0d %f", vin, d, vresid); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

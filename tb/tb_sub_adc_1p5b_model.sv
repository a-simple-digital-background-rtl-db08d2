// tb_sub_adc_1p5b_model: sweeps the input of the 1.5-bit sub-ADC over
// [-1.1, 1.1] V in both modes and compares the digit with thresholds worked
// out here: -Vref/4 and +Vref/4, both raised by Vref/8 in the shifted mode.
// Also checks that in the shifted mode the digit is one lower exactly in the
// two regions [-1/4, -1/8) and [1/4, 3/8) of Vref. A second instance with a
// 50 mV comparator offset must have both thresholds 50 mV higher.
module tb_sub_adc_1p5b_model;
  import pipe_adc_pkg::*;
  real    vin;
  logic   shift_en;
  digit_t b;
  int checks = 0, failures = 0;
  int diff_cnt = 0;

  digit_t bo;

  sub_adc_1p5b_model dut (.vin(vin), .shift_en(shift_en), .b(b));
  sub_adc_1p5b_model #(.OFFSET(0.05)) dut_off (.vin(vin), .shift_en(shift_en), .b(bo));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = -1100; i <= 1100; i++) begin
      automatic digit_t b0, b1;
      automatic int e0, e1;
      vin = real'(i) / 1000.0 + 0.0003;
      e0 = (vin > 0.25) ? 1 : (vin > -0.25) ? 0 : -1;
      e1 = (vin > 0.375) ? 1 : (vin > -0.125) ? 0 : -1;
      shift_en = 1'b0; #1; b0 = b;
      checks++; if (int'(b0) != e0) begin failures++; $display("FAIL v=%f b=%0d exp %0d", vin, b0, e0); end
      checks++;
      if (int'(bo) != ((vin > 0.30) ? 1 : (vin > -0.20) ? 0 : -1)) begin failures++; $display("FAIL offset v=%f b=%0d", vin, bo); end
      shift_en = 1'b1; #1; b1 = b;
      checks++; if (int'(b1) != e1) begin failures++; $display("FAIL shifted v=%f b=%0d exp %0d", vin, b1, e1); end
      if (b1 != b0) begin
        diff_cnt++;
        checks++;
        if (!((int'(b1) - int'(b0) == -1) &&
              ((vin >= -0.25 && vin < -0.125) || (vin >= 0.25 && vin < 0.375)))) begin
          failures++; $display("FAIL: channels disagree outside the regions at %f", vin);
        end
      end
    end
    checks++;
    if (diff_cnt != 250) begin failures++; $display("FAIL: %0d disagreeing inputs", diff_cnt); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

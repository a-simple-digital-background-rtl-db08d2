// tb_pipe_adc_pkg: checks the shared constants and the last-stage value
// function of pipe_adc_pkg: 10 stages for 12 bits, Vref = 2**16 in a 20-bit
// word, and flash codes 0..3 mapping to -3/4, -1/4, +1/4, +3/4 of Vref.
module tb_pipe_adc_pkg;
  import pipe_adc_pkg::*;
  int checks = 0, failures = 0;

  initial begin
    #1000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    checks++; if (N_STAGES != 10) begin failures++; $display("FAIL N_STAGES"); end
    checks++; if (longint'(VREF_D) != 65536) begin failures++; $display("FAIL VREF_D"); end
    checks++; if ($bits(dval_t) != 20) begin failures++; $display("FAIL DW"); end
    for (int c = 0; c < 4; c++) begin
      automatic longint e = (longint'(2 * c - 3) * 65536) / 4;
      checks++;
      if (longint'(flash_value(2'(c))) != e) begin
        failures++; $display("FAIL flash_value(%0d) = %0d, expected %0d", c, flash_value(2'(c)), e);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

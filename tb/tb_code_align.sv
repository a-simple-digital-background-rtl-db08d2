// tb_code_align: drives random digits into every stage input and a random
// flash code each clock, keeps the history here, and checks that code_out[i]
// equals the digit stage i+1 delivered N_STAGES-i clocks earlier and that the
// flash code passes without delay.
module tb_code_align;
  import pipe_adc_pkg::*;
  localparam int NS = N_STAGES;
  logic clk = 1'b0;
  digit_t code_in [NS];
  digit_t code_out [NS];
  logic [1:0] flash_in, flash_out;
  int checks = 0, failures = 0;
  digit_t hist [64][NS];

  code_align dut (.clk(clk), .code_in(code_in), .flash_in(flash_in), .code_out(code_out), .flash_out(flash_out));
  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 1000; n++) begin
      @(negedge clk);
      for (int i = 0; i < NS; i++) begin
        code_in[i] = digit_t'(int'($urandom_range(2)) - 1);
        hist[n % 64][i] = code_in[i];
      end
      flash_in = 2'($urandom_range(3));
      #1;
      checks++; if (flash_out != flash_in) begin failures++; $display("FAIL flash"); end
      // Values of clock n-1 have been clocked in; check at this time.
      if (n > NS) begin
        for (int i = 0; i < NS; i++) begin
          // code_out[i] is code_in[i] of NS-i clocks before the current input.
          checks++;
          if (code_out[i] != hist[(n - (NS - i)) % 64][i]) begin
            failures++; $display("FAIL clock %0d stage %0d", n, i + 1);
          end
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

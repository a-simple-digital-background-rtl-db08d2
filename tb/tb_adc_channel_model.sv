// tb_adc_channel_model: feeds random inputs, one per clock, to one analog
// channel (10 stages, first 4 with 50 dB amplifiers) and checks every stage
// digit and the flash code against a stage-by-stage computation done here,
// with the expected latency (stage i+1 digit i clocks after the sample, flash
// N_STAGES clocks after). Stage 2 runs in the shifted mode every other
// clock. It also checks that the ideal reconstruction of a sample with all
// stages ideal lies within one 12-bit LSB of the input.
module tb_adc_channel_model;
  import pipe_adc_pkg::*;
  localparam int NS = N_STAGES;
  localparam int NC = N_CAL;
  logic clk = 1'b0;
  real  vin = 0.0;
  logic [NC-1:0] shift_en = '0;
  digit_t codes [NS];
  logic [1:0] flash_code;
  digit_t codes_i [NS];
  logic [1:0] flash_i;
  int checks = 0, failures = 0;

  adc_channel_model dut (.clk(clk), .vin(vin), .shift_en(shift_en), .codes(codes), .flash_code(flash_code));
  // A channel whose first stages are as good as ideal (200 dB gain).
  adc_channel_model #(.A_DB(200.0)) dut_i (.clk(clk), .vin(vin), .shift_en('0), .codes(codes_i), .flash_code(flash_i));

  always #5 clk = ~clk;

  // Expected digits of each sample, indexed by sample number % 32.
  int exp_b [32][NS];
  int exp_f [32];
  real vhist [32];

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    automatic real g = 1.0 / (1.0 + 2.0 / (10.0 ** (50.0 / 20.0)));
    for (int n = 0; n < 600; n++) begin
      automatic real v = (real'($urandom_range(19800)) - 9900.0) / 10000.0;
      automatic real x = v;
      @(negedge clk);
      vin = v;
      vhist[n % 32] = v;
      shift_en = {1'b0, 1'b0, 1'(n % 2), 1'b0};
      for (int i = 0; i < NS; i++) begin
        // Stage 2 samples this input one clock later, with the next mode.
        automatic real th = (i == 1 && ((n + 1) % 2) == 1) ? 0.125 : 0.0;
        automatic int d = (x > 0.25 + th) ? 1 : (x > -0.25 + th) ? 0 : -1;
        exp_b[n % 32][i] = d;
        x = (i < NC) ? g * (2.0 * x - real'(d)) : 2.0 * x - real'(d);
      end
      exp_f[n % 32] = (x > 0.5) ? 3 : (x > 0.0) ? 2 : (x > -0.5) ? 1 : 0;
      @(posedge clk);
      #1;
      // Stage i+1 now holds sample n-i, the flash sample n-NS.
      if (n >= NS) begin
        for (int i = 0; i < NS; i++) begin
          checks++;
          if (int'(codes[i]) != exp_b[(n - i) % 32][i]) begin
            failures++; $display("FAIL sample %0d stage %0d b=%0d exp %0d", n - i, i + 1, codes[i], exp_b[(n - i) % 32][i]);
          end
        end
        checks++;
        if (int'(flash_code) != exp_f[(n - NS) % 32]) begin
          failures++; $display("FAIL sample %0d flash %0d exp %0d", n - NS, flash_code, exp_f[(n - NS) % 32]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Ideal channel: sum of b_i Vref / 2**i plus the flash value / 2**NS.
  // The first rising edge (t = 5) comes before sample 0 is applied, so the
  // sample the flash holds after edge nn is sample nn - 2 - NS.
  digit_t dl [NS][NS+1];
  int nn = 0;
  always @(posedge clk) begin
    #2;
    for (int i = 0; i < NS; i++) begin
      for (int k = NS; k > 0; k--) dl[i][k] = dl[i][k-1];
      dl[i][0] = codes_i[i];
    end
    nn++;
    if (nn > 2 * NS + 2) begin
      automatic real r = (real'(2 * int'(flash_i) - 3) / 4.0) / real'(1 << NS);
      automatic real v = vhist[(nn - 2 - NS) % 32];
      for (int i = 0; i < NS; i++)
        r += real'(dl[i][NS - i]) / real'(1 << (i + 1));
      checks++;
      if (r - v > 1.0 / 2048.0 || v - r > 1.0 / 2048.0) begin
        failures++; $display("FAIL ideal reconstruction %f of %f", r, v);
      end
    end
  end
endmodule

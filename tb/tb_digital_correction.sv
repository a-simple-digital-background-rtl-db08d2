// tb_digital_correction: for each sample, random stage digits and a random
// flash code are chosen and presented with pipeline timing (stage i+1 digit
// i clocks after the sample, flash code N_STAGES clocks after). With random
// references for the calibrated stages, the expected channel output and the
// digital residues of the calibrated stages are worked out here from the last
// stage back, D = floor((D_next + b*W)/2), and compared N_STAGES+1 clocks
// after the stage-1 digit, together with the aligned digits.
module tb_digital_correction;
  import pipe_adc_pkg::*;
  localparam int NS = N_STAGES;
  localparam int NC = N_CAL;
  logic clk = 1'b0, rst_n = 1'b0;
  digit_t code_in [NS];
  logic [1:0] flash_in;
  dval_t w [NC];
  dval_t dout;
  digit_t b_cal [NC];
  dval_t d_res [NC];
  int checks = 0, failures = 0;

  digital_correction dut (.clk(clk), .rst_n(rst_n), .code_in(code_in), .flash_in(flash_in), .w(w),
                          .dout(dout), .b_cal(b_cal), .d_res(d_res));
  always #5 clk = ~clk;

  int     sb [64][NS];
  int     sf [64];

  function automatic longint half_floor(input longint s);
    return (s >= 0) ? s / 2 : -((-s + 1) / 2);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NC; k++) w[k] = dval_t'(62000 + $urandom_range(3536));
    for (int i = 0; i < NS; i++) code_in[i] = '0;
    flash_in = '0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int n = 0; n < 1500; n++) begin
      // New sample n; stage i+1 presents sample n-i this clock.
      for (int i = 0; i < NS; i++) sb[n % 64][i] = int'($urandom_range(2)) - 1;
      sf[n % 64] = int'($urandom_range(3));
      for (int i = 0; i < NS; i++) code_in[i] = (n >= i) ? digit_t'(sb[(n - i) % 64][i]) : '0;
      flash_in = (n >= NS) ? 2'(sf[(n - NS) % 64]) : 2'd0;
      @(posedge clk);
      #1;
      // Outputs now hold the sample whose stage-1 digit was shown NS+1 clocks ago,
      // i.e. the sample whose flash code was just clocked: m = n - NS.
      if (n >= 2 * NS) begin
        automatic int m = n - NS;
        automatic longint d = longint'(2 * sf[m % 64] - 3) * 16384;
        automatic longint dr [NC];
        for (int i = NS - 1; i >= 0; i--) begin
          automatic longint wk = (i < NC) ? longint'(w[i]) : 65536;
          if (i < NC) dr[i] = d;
          d = half_floor(d + longint'(sb[m % 64][i]) * wk);
        end
        checks++;
        if (longint'(dout) != d) begin failures++; $display("FAIL sample %0d dout %0d exp %0d", m, dout, d); end
        for (int k = 0; k < NC; k++) begin
          checks++;
          if (longint'(d_res[k]) != dr[k] || int'(b_cal[k]) != sb[m % 64][k]) begin
            failures++; $display("FAIL sample %0d stage %0d residue %0d exp %0d", m, k + 1, d_res[k], dr[k]);
          end
        end
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

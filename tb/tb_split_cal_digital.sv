// tb_split_cal_digital: the digital back end driven by two analog channel
// models with 40 dB amplifiers (a larger gain error than the default), fed
// with random inputs. Before calibration the output must deviate from the
// line G*vin by several LSBs somewhere; after one calibration pass every
// reference must be within 0.05 % of D[(1+gamma)Vref] worked out here, and
// every output sample must lie within 1.5 LSB (12-bit) of G*vin, G the
// product of the four stage gains. The latency from sample to d_avg must be
// N_BITS clocks.
module tb_split_cal_digital;
  import pipe_adc_pkg::*;
  localparam int  NS = N_STAGES;
  localparam int  NC = N_CAL;
  localparam real A_DB = 40.0;
  logic clk = 1'b0, rst_n = 1'b0;
  real  vin = 0.0;
  logic cal_start = 1'b0;
  digit_t codes_a [NS];
  digit_t codes_b [NS];
  logic [1:0] flash_a, flash_b;
  logic [NC-1:0] shift_a;
  logic [N_BITS-1:0] code;
  dval_t d_avg, d_diff;
  dval_t w [NC];
  logic cal_busy, cal_done;
  logic [1:0] cal_stage;
  logic [LOG2_AVG:0] cal_hits;
  int checks = 0, failures = 0;

  adc_channel_model #(.A_DB(A_DB)) u_a (.clk(clk), .vin(vin), .shift_en(shift_a), .codes(codes_a), .flash_code(flash_a));
  adc_channel_model #(.A_DB(A_DB)) u_b (.clk(clk), .vin(vin), .shift_en('0), .codes(codes_b), .flash_code(flash_b));

  split_cal_digital dut (
    .clk(clk), .rst_n(rst_n), .codes_a(codes_a), .flash_a(flash_a), .codes_b(codes_b), .flash_b(flash_b),
    .cal_start(cal_start), .shift_a(shift_a), .code(code), .d_avg(d_avg), .d_diff(d_diff), .w(w),
    .cal_busy(cal_busy), .cal_done(cal_done), .cal_stage(cal_stage), .cal_hits(cal_hits)
  );
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  real hist [64];
  int  ne = 0;
  always @(posedge clk) begin hist[ne % 64] = vin; ne++; end

  real g1, gt;
  real maxerr;

  // Applies n random inputs and returns the largest |d_avg - gt*vin| in LSBs.
  task automatic run_random(input int n, output real me);
    me = 0.0;
    for (int i = 0; i < n + N_BITS + 2; i++) begin
      @(negedge clk);
      vin = (real'($urandom_range(19800)) - 9900.0) / 10000.0;
      if (i > N_BITS + 1) begin
        automatic real v = hist[(ne - 1 - N_BITS) % 64];
        automatic real e = (real'(d_avg) / real'(VREF_D) - gt * v) * 2048.0;
        if (e < 0.0) e = -e;
        if (e > me) me = e;
      end
    end
  endtask

  initial begin
    g1 = 1.0 / (1.0 + 2.0 / (10.0 ** (A_DB / 20.0)));
    gt = g1 * g1 * g1 * g1;
    for (int k = 0; k < 64; k++) hist[k] = 0.0;
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    run_random(3000, maxerr);
    $display("before calibration: worst error %0.2f LSB", maxerr);
    checks++; if (maxerr < 4.0) begin failures++; $display("FAIL: no gain error visible before calibration"); end

    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    while (!cal_done) @(negedge clk) vin = (real'($urandom_range(19800)) - 9900.0) / 10000.0;

    begin
      automatic real e = 1.0;
      for (int k = NC - 1; k >= 0; k--) begin
        automatic real d;
        e = e * g1;
        d = real'(w[k]) - e * real'(VREF_D);
        checks++;
        $display("stage %0d reference %0d expected %0.1f", k + 1, w[k], e * real'(VREF_D));
        if (d > 33.0 || d < -33.0) begin failures++; $display("FAIL reference stage %0d", k + 1); end
      end
    end
    run_random(5000, maxerr);
    $display("after calibration: worst error %0.2f LSB", maxerr);
    checks++; if (maxerr > 1.5) begin failures++; $display("FAIL: error after calibration"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_split_adc_freq_sweep: spectral test of the full split ADC at its default
// size over the input-frequency range 0..fs/2.
//
// For nine input frequencies from near DC to near fs/2 (steps of fs/16) the
// testbench records 16384 output codes of a 0.995 Vref sine on an odd,
// coherent bin, takes a 16384-point FFT (radix-2, written here) and computes
// SNDR (fundamental power against all other tone_bin but DC) and SFDR
// (fundamental against the largest other bin). It does this once before and
// once after a calibration pass. Every point must reach SNDR >= 68 dB and
// SFDR >= 75 dB after calibration, and every point must improve by at least
// 10 dB in SNDR.
module tb_split_adc_freq_sweep;
  import pipe_adc_pkg::*;

  localparam int  NB   = N_BITS;
  localparam int  NF   = 16384;
  localparam int  LOGN = 14;
  localparam int  NPT  = 9;
  localparam real PI   = 3.14159265358979;
  localparam real AMP  = 0.995;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  real  vin = 0.0;
  logic cal_start = 1'b0;
  logic [NB-1:0] code;
  dval_t d_avg, d_diff;
  dval_t w [N_CAL];
  logic cal_busy, cal_done;
  logic [1:0] cal_stage;
  logic [LOG2_AVG:0] cal_hits;

  int checks = 0;
  int failures = 0;

  split_adc_top dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .cal_start(cal_start),
    .code(code), .d_avg(d_avg), .d_diff(d_diff), .w(w),
    .cal_busy(cal_busy), .cal_done(cal_done), .cal_stage(cal_stage), .cal_hits(cal_hits)
  );

  always #5 clk = ~clk;

  initial begin
    repeat (800000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Coherent, odd tone_bin near k*fs/16.
  int tone_bin [NPT] = '{3, 1023, 2049, 3071, 4097, 5119, 6143, 7169, 8189};

  real re [NF];
  real im [NF];

  // In-place iterative radix-2 FFT of re/im.
  task automatic fft();
    int j;
    j = 0;
    for (int i = 0; i < NF - 1; i++) begin
      int m;
      if (i < j) begin
        real t;
        t = re[i]; re[i] = re[j]; re[j] = t;
        t = im[i]; im[i] = im[j]; im[j] = t;
      end
      m = NF >> 1;
      while (m >= 1 && (j & m) != 0) begin
        j = j ^ m;
        m = m >> 1;
      end
      j = j | m;
    end
    for (int s = 1; s <= LOGN; s++) begin
      int len, half;
      len  = 1 << s;
      half = len >> 1;
      for (int k = 0; k < half; k++) begin
        real wr, wi;
        wr = $cos(-2.0 * PI * real'(k) / real'(len));
        wi = $sin(-2.0 * PI * real'(k) / real'(len));
        for (int b = 0; b < NF; b += len) begin
          real xr, xi, tr, ti;
          tr = wr * re[b + k + half] - wi * im[b + k + half];
          ti = wr * im[b + k + half] + wi * re[b + k + half];
          xr = re[b + k];
          xi = im[b + k];
          re[b + k]        = xr + tr;
          im[b + k]        = xi + ti;
          re[b + k + half] = xr - tr;
          im[b + k + half] = xi - ti;
        end
      end
    end
  endtask

  // Converts NF samples of a sine on bin kb and leaves the codes in re[].
  task automatic capture(input int kb, input int i0);
    int got;
    got = 0;
    for (int i = 0; got < NF; i++) begin
      @(negedge clk);
      vin = AMP * $sin(2.0 * PI * real'(kb) * real'(i0 + i) / real'(NF) + 0.7);
      // The code seen now belongs to the sample taken NB edges ago, i.e. to
      // input index i - NB - 1 (inputs are applied before their edge).
      if (i >= NB + 1) begin
        re[(i0 + i - NB - 1) % NF] = real'($signed(code));
        im[(i0 + i - NB - 1) % NF] = 0.0;
        got++;
      end
    end
  endtask

  // Spectral figures of merit from re/im after the FFT.
  task automatic metrics(input int kb, output real sndr, output real sfdr);
    real ps, pn, pmax;
    ps = 0.0; pn = 0.0; pmax = 0.0;
    for (int k = 1; k <= NF / 2; k++) begin
      real p;
      p = re[k] * re[k] + im[k] * im[k];
      if (k == kb) ps = p;
      else begin
        pn += p;
        if (p > pmax) pmax = p;
      end
    end
    sndr = 10.0 * $log10(ps / pn);
    sfdr = 10.0 * $log10(ps / pmax);
  endtask

  real sndr_b [NPT];
  real sfdr_b [NPT];

  initial begin
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2 * NB) @(posedge clk);

    for (int p = 0; p < NPT; p++) begin
      capture(tone_bin[p], 0);
      fft();
      metrics(tone_bin[p], sndr_b[p], sfdr_b[p]);
    end

    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    begin
      automatic int i = 0;
      while (!cal_done) begin
        @(negedge clk);
        vin = AMP * $sin(2.0 * PI * real'(tone_bin[7]) * real'(i) / real'(NF));
        i++;
      end
    end

    $display("  f/fs    SNDR before  SFDR before  SNDR after  SFDR after");
    for (int p = 0; p < NPT; p++) begin
      real sa, fa;
      capture(tone_bin[p], 0);
      fft();
      metrics(tone_bin[p], sa, fa);
      $display("  %0.4f  %8.2f     %8.2f     %8.2f    %8.2f",
               real'(tone_bin[p]) / real'(NF), sndr_b[p], sfdr_b[p], sa, fa);
      checks++;
      if (sa < 68.0) begin failures++; $display("FAIL: SNDR after calibration %0.2f dB", sa); end
      checks++;
      if (fa < 75.0) begin failures++; $display("FAIL: SFDR after calibration %0.2f dB", fa); end
      checks++;
      if (sa < sndr_b[p] + 10.0) begin failures++; $display("FAIL: SNDR improved by only %0.2f dB", sa - sndr_b[p]); end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

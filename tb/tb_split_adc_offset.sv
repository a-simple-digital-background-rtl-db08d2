// tb_split_adc_offset: the full split ADC with a +50 mV comparator offset in
// every 1.5-bit stage of both channels (Vref = 1 V). The offset stays inside
// the Vref/16 that the stage redundancy leaves beside the Vref/8 calibration
// shift, so the output must stay correct and the calibration must measure the
// same references as without offset. Both channels carry the same offset: the
// measurement assumes that the stages ahead of the one being calibrated
// decide alike in both channels, so that the calibrated stage sees the same
// input in A and B.
// Same procedure and checks as tb_split_adc_top: latency, SNDR below 60 dB
// before calibration, every reference within 0.05 % of D[(1+gamma)Vref],
// SNDR above 68 dB after calibration and during a second pass, and the
// calibration mechanisms counted.
module tb_split_adc_offset;
  import pipe_adc_pkg::*;

  localparam int  NB     = N_BITS;
  localparam int  NC     = N_CAL;
  localparam real A_DB   = 50.0;
  localparam real PI     = 3.14159265358979;
  localparam int  NFFT   = 16384;
  localparam int  KBIN   = 7149;
  localparam real AMP    = 0.995;
  localparam real OFF_A  = 0.05;
  localparam real OFF_B  = 0.05;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  real  vin = 0.0;
  logic cal_start = 1'b0;
  logic [NB-1:0] code;
  dval_t d_avg, d_diff;
  dval_t w [NC];
  logic cal_busy, cal_done;
  logic [1:0] cal_stage;
  logic [LOG2_AVG:0] cal_hits;

  int checks = 0;
  int failures = 0;

  split_adc_top #(.OFFSET_A(OFF_A), .OFFSET_B(OFF_B)) dut (
    .clk(clk), .rst_n(rst_n), .vin(vin), .cal_start(cal_start),
    .code(code), .d_avg(d_avg), .d_diff(d_diff), .w(w),
    .cal_busy(cal_busy), .cal_done(cal_done), .cal_stage(cal_stage), .cal_hits(cal_hits)
  );

  always #5 clk = ~clk;

  // Watchdog.
  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Input history: vin of the sample taken at edge n is hist[n % 64].
  real hist [64];
  int  n_edge = 0;
  always @(posedge clk) begin
    hist[n_edge % 64] = vin;
    n_edge++;
  end

  function automatic real rabs(input real x);
    return (x < 0.0) ? -x : x;
  endfunction

  // Sine sample of index i.
  function automatic real sine(input int i);
    return AMP * $sin(2.0 * PI * real'(KBIN) * real'(i) / real'(NFFT) + 0.3);
  endfunction

  // Least-squares fit code ~ g*v + c over a record; returns SNDR in dB.
  real sv, sd, svv, svd, sdd;
  int  cnt;
  task automatic clear_stats();
    sv = 0; sd = 0; svv = 0; svd = 0; sdd = 0; cnt = 0;
  endtask
  task automatic add_sample(input real v, input real d);
    sv += v; sd += d; svv += v*v; svd += v*d; sdd += d*d; cnt++;
  endtask
  function automatic real sndr_db();
    real n, mv, md, cvv, cvd, cdd, g, sig, err;
    n   = real'(cnt);
    mv  = sv / n;  md = sd / n;
    cvv = svv / n - mv*mv;
    cvd = svd / n - mv*md;
    cdd = sdd / n - md*md;
    g   = cvd / cvv;
    sig = g*g*cvv;
    err = cdd - g*cvd;
    return 10.0 * $log10(sig / err);
  endfunction

  // Runs nsamp sine samples starting at index i0 and collects statistics of
  // the output, shifted by the latency.
  task automatic run_sine(input int i0, input int nsamp);
    clear_stats();
    for (int i = 0; i < nsamp + NB; i++) begin
      @(negedge clk);
      vin = sine(i0 + i);
      if (i >= NB + 1)
        add_sample(hist[(n_edge - 1 - NB) % 64], real'($signed(code)));
    end
  endtask

  // Mechanism counters, sampled on every edge.
  int shift_seen [NC];
  int hit_region_i = 0, hit_region_ii = 0;
  int ref_writes = 0;
  int order_ok = 1;
  int last_stage = 0;
  always @(posedge clk) if (rst_n) begin
    for (int k = 0; k < NC; k++)
      if (dut.u_digital.shift_a[k]) shift_seen[k]++;
    // A reference is written on an edge where the estimator is done while
    // enabled; the stage must be the one after the previous write, in the
    // order N_CAL..1, wrapping to N_CAL for a new pass.
    if (dut.u_digital.u_est.enable && dut.u_digital.u_est.done) begin
      automatic int s = int'(dut.u_digital.u_est.sel);
      ref_writes++;
      if (s != ((last_stage == 0) ? NC - 1 : last_stage - 1)) order_ok = 0;
      last_stage = s;
    end
    if (dut.u_digital.u_est.enable && !dut.u_digital.u_est.done) begin
      automatic int s = int'(dut.u_digital.u_est.sel);
      automatic digit_t ba = dut.u_digital.bcal_a[s];
      automatic digit_t bb = dut.u_digital.bcal_b[s];
      if (ba == -2'sd1 && bb == 2'sd0) hit_region_i++;
      if (ba == 2'sd0 && bb == 2'sd1) hit_region_ii++;
    end
  end

  real sndr_before, sndr_during, sndr_after, sndr_second;
  dval_t w_first [NC];
  int  lat;

  initial begin
    for (int k = 0; k < NC; k++) begin
      shift_seen[k] = 0;
    end
    for (int k = 0; k < 64; k++) hist[k] = 0.0;
    vin = -0.9;
    repeat (4) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    repeat (2 * NB) @(posedge clk);

    // 1. Latency of a step.
    @(negedge clk) vin = 0.9;
    lat = 0;
    @(posedge clk);  // edge that samples the step
    #1;
    while ($signed(code) < 0 && lat < 100) begin
      @(posedge clk);
      #1;
      lat++;
    end
    checks++;
    if (lat != NB) begin
      failures++;
      $display("FAIL latency %0d, expected %0d", lat, NB);
    end

    // 2. Before calibration.
    run_sine(0, 4096);
    sndr_before = sndr_db();
    $display("SNDR before calibration: %0.2f dB", sndr_before);
    checks++;
    if (sndr_before > 60.0) begin
      failures++;
      $display("FAIL: uncalibrated SNDR unexpectedly high");
    end

    // 3. Calibration pass while the sine keeps running.
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    begin
      automatic int i = 0;
      clear_stats();
      while (!cal_done) begin
        @(negedge clk);
        vin = sine(100000 + i);
        i++;
        if (i > NB + 1)
          add_sample(hist[(n_edge - 1 - NB) % 64], real'($signed(code)));
      end
      $display("calibration took %0d clocks", i);
      sndr_during = sndr_db();
      $display("SNDR while calibrating: %0.2f dB", sndr_during);
    end

    begin
      automatic real g, e, tol;
      g = 1.0 / (1.0 + 2.0 / (10.0 ** (A_DB / 20.0)));
      e = 1.0;
      tol = real'(VREF_D) * 0.0005;
      for (int k = NC - 1; k >= 0; k--) begin
        e = e * g;
        checks++;
        $display("stage %0d reference %0d, expected %0.1f", k + 1, w[k], e * real'(VREF_D));
        if (rabs(real'(w[k]) - e * real'(VREF_D)) > tol) begin
          failures++;
          $display("FAIL reference of stage %0d", k + 1);
        end
      end
    end

    for (int k = 0; k < NC; k++) w_first[k] = w[k];

    // 4. After calibration.
    run_sine(0, NFFT);
    sndr_after = sndr_db();
    $display("SNDR after calibration: %0.2f dB", sndr_after);
    checks++;
    if (sndr_after < 68.0) begin
      failures++;
      $display("FAIL: calibrated SNDR too low");
    end
    checks++;
    if (cal_busy || dut.u_digital.shift_a != '0) begin
      failures++;
      $display("FAIL: channel A left in shifted mode");
    end

    // 5. Second pass while converting.
    @(negedge clk) cal_start = 1'b1;
    @(negedge clk) cal_start = 1'b0;
    begin
      automatic int i = 0;
      clear_stats();
      while (!cal_done) begin
        @(negedge clk);
        vin = sine(200000 + i);
        i++;
        if (i > NB + 1)
          add_sample(hist[(n_edge - 1 - NB) % 64], real'($signed(code)));
      end
      sndr_second = sndr_db();
      $display("SNDR during a second calibration pass: %0.2f dB", sndr_second);
      checks++;
      if (sndr_second < 68.0) begin
        failures++;
        $display("FAIL: output disturbed by the threshold shift");
      end
      for (int k = 0; k < NC; k++) begin
        checks++;
        if (rabs(real'(w[k]) - real'(w_first[k])) > real'(VREF_D) * 0.0005) begin
          failures++;
          $display("FAIL: reference of stage %0d moved to %0d", k + 1, w[k]);
        end
      end
    end

    // Mechanisms.
    for (int k = 0; k < NC; k++) begin
      checks++;
      $display("stage %0d shifted for %0d clocks", k + 1, shift_seen[k]);
      if (shift_seen[k] == 0) begin failures++; $display("FAIL: stage %0d never shifted", k + 1); end
    end
    $display("region i hits %0d, region ii hits %0d, reference writes %0d",
             hit_region_i, hit_region_ii, ref_writes);
    checks++; if (hit_region_i == 0)  begin failures++; $display("FAIL: no region i hit"); end
    checks++; if (hit_region_ii == 0) begin failures++; $display("FAIL: no region ii hit"); end
    checks++; if (hit_region_i + hit_region_ii != 2 * NC * (1 << LOG2_AVG)) begin
      failures++; $display("FAIL: averaged %0d differences", hit_region_i + hit_region_ii);
    end
    checks++; if (ref_writes != 2 * NC) begin failures++; $display("FAIL: %0d reference writes", ref_writes); end
    checks++; if (order_ok == 0) begin failures++; $display("FAIL: stages not calibrated last to first"); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

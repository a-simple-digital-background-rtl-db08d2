// tb_ref_estimator: random digits and residues for all calibrated stages of
// both channels. For the selected stage, samples with b_A - b_B = -1 carry a
// residue difference of a chosen reference plus noise; all other samples
// carry large unrelated differences that must be ignored. The expected
// average, round((sum of differences)/2**LOG2_AVG), the hit count and the
// clock on which done rises are worked out here; clear must restart it and a
// disabled estimator must not count. Repeated for every stage select.
module tb_ref_estimator;
  import pipe_adc_pkg::*;
  localparam int NC = N_CAL;
  localparam int L  = LOG2_AVG;
  logic clk = 1'b0, rst_n = 1'b0;
  logic clear = 1'b0, enable = 1'b0;
  logic [1:0] sel = '0;
  digit_t b_a [NC];
  digit_t b_b [NC];
  dval_t dres_a [NC];
  dval_t dres_b [NC];
  logic done;
  dval_t w_est;
  logic [L:0] hits;
  int checks = 0, failures = 0;

  ref_estimator dut (.clk(clk), .rst_n(rst_n), .clear(clear), .enable(enable), .sel(sel),
                     .b_a(b_a), .b_b(b_b), .dres_a(dres_a), .dres_b(dres_b),
                     .done(done), .w_est(w_est), .hits(hits));
  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic drive_random(input int s, input int wref, output bit is_hit, output longint diff);
    for (int k = 0; k < NC; k++) begin
      b_a[k] = digit_t'(int'($urandom_range(2)) - 1);
      b_b[k] = digit_t'(int'($urandom_range(2)) - 1);
      dres_a[k] = dval_t'(int'($urandom_range(100000)) - 50000);
      dres_b[k] = dval_t'(int'($urandom_range(100000)) - 50000);
    end
    is_hit = (int'(b_a[s]) - int'(b_b[s]) == -1);
    if (is_hit) begin
      dres_b[s] = dval_t'(int'($urandom_range(40000)) - 20000);
      dres_a[s] = dval_t'(int'(dres_b[s]) + wref + int'($urandom_range(600)) - 300);
    end
    diff = longint'(dres_a[s]) - longint'(dres_b[s]);
  endtask

  initial begin
    for (int k = 0; k < NC; k++) begin b_a[k] = '0; b_b[k] = '0; dres_a[k] = '0; dres_b[k] = '0; end
    repeat (3) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int s = 0; s < NC; s++) begin
      automatic int wref = 63000 + 500 * s;
      automatic longint sum = 0;
      automatic int nhit = 0;
      automatic bit h;
      automatic longint df;
      sel = 2'(s);
      clear = 1'b1;
      @(negedge clk) clear = 1'b0;
      // Disabled: nothing may be counted.
      enable = 1'b0;
      repeat (50) begin
        drive_random(s, wref, h, df);
        @(negedge clk);
      end
      checks++; if (hits != '0) begin failures++; $display("FAIL counted while disabled"); end
      enable = 1'b1;
      while (nhit < (1 << L)) begin
        drive_random(s, wref, h, df);
        if (h) begin sum += df; nhit++; end
        @(negedge clk);
        checks++;
        if (int'(hits) != nhit || done != (nhit == (1 << L))) begin
          failures++; $display("FAIL stage %0d hits %0d exp %0d done %0d", s, hits, nhit, done);
        end
      end
      // Further samples must not change the result.
      repeat (20) begin
        drive_random(s, wref, h, df);
        @(negedge clk);
      end
      begin
        automatic longint e = (sum + (1 << (L - 1)));
        e = (e >= 0) ? e >> L : -((-e + (1 << L) - 1) >> L);
        checks++;
        if (longint'(w_est) != e || !done) begin failures++; $display("FAIL stage %0d w_est %0d exp %0d", s, w_est, e); end
        else $display("stage %0d estimate %0d (reference %0d)", s + 1, w_est, wref);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

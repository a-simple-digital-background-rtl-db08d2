// tb_cal_sequencer: plays the estimator: done rises a random number of clocks
// after est_enable, with an estimate that depends on the selected stage. The
// testbench checks the stage order N_CAL..1, that exactly the selected stage
// of channel A is shifted while busy and none otherwise, that the estimator is
// held cleared for SETTLE clocks before each stage, that each reference is
// written with its stage's estimate, that the references reset to Vref, and
// that cal_done is set at the end and cleared by the next start. Two passes.
module tb_cal_sequencer;
  import pipe_adc_pkg::*;
  localparam int NC = N_CAL;
  localparam int SETTLE = N_STAGES + 2;
  logic clk = 1'b0, rst_n = 1'b0;
  logic start = 1'b0, est_done = 1'b0;
  dval_t est_w;
  logic [NC-1:0] shift_a;
  logic est_clear, est_enable, busy, cal_done;
  logic [1:0] sel;
  dval_t w [NC];
  int checks = 0, failures = 0;

  cal_sequencer dut (.clk(clk), .rst_n(rst_n), .start(start), .est_done(est_done), .est_w(est_w),
                     .shift_a(shift_a), .est_clear(est_clear), .est_enable(est_enable), .sel(sel),
                     .w(w), .busy(busy), .cal_done(cal_done));
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Estimator stand-in.
  int en_cnt = 0;
  int en_target = 10;
  always @(posedge clk) begin
    if (est_clear) begin
      en_cnt <= 0;
      est_done <= 1'b0;
      en_target <= 5 + int'($urandom_range(40));
    end else if (est_enable) begin
      en_cnt <= en_cnt + 1;
      if (en_cnt + 1 >= en_target) est_done <= 1'b1;
    end
  end
  assign est_w = dval_t'(60000 + 1000 * int'(sel));

  // Protocol monitor.
  int clear_run = 0;
  int order [$];
  always @(negedge clk) if (rst_n) begin
    checks++;
    if (busy) begin
      if (shift_a != (NC'(1) << sel)) begin failures++; $display("FAIL shift %b sel %0d", shift_a, sel); end
    end else if (shift_a != '0) begin
      failures++; $display("FAIL shift while idle");
    end
    if (est_clear) clear_run++;
    if (est_enable) begin
      if (clear_run != 0 && clear_run != SETTLE) begin failures++; $display("FAIL settle %0d clocks", clear_run); end
      if (clear_run != 0) order.push_back(int'(sel));
      clear_run = 0;
    end
  end

  initial begin
    repeat (3) @(posedge clk);
    #1;
    for (int k = 0; k < NC; k++) begin
      checks++; if (w[k] != VREF_D) begin failures++; $display("FAIL reset reference"); end
    end
    @(negedge clk) rst_n = 1'b1;
    for (int pass = 0; pass < 2; pass++) begin
      order.delete();
      repeat (5) @(negedge clk);
      start = 1'b1;
      @(negedge clk) start = 1'b0;
      checks++; if (!busy || cal_done) begin failures++; $display("FAIL start"); end
      while (!cal_done) @(negedge clk);
      checks++; if (busy) begin failures++; $display("FAIL busy after done"); end
      checks++;
      if (order.size() != NC) begin failures++; $display("FAIL %0d stages visited", order.size()); end
      else for (int i = 0; i < NC; i++)
        if (order[i] != NC - 1 - i) begin failures++; $display("FAIL order %0d at %0d", order[i], i); end
      for (int k = 0; k < NC; k++) begin
        checks++;
        if (w[k] != dval_t'(60000 + 1000 * k)) begin failures++; $display("FAIL reference %0d = %0d", k, w[k]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

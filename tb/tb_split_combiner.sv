// tb_split_combiner: random channel values (including values beyond full
// scale); one clock later the average floor((A+B)/2), the difference B-A and
// the saturated 12-bit code floor(avg/2**(FRAC-11)) must match the values
// worked out here.
module tb_split_combiner;
  import pipe_adc_pkg::*;
  logic clk = 1'b0, rst_n = 1'b0;
  dval_t d_a, d_b, d_avg, d_diff;
  logic [N_BITS-1:0] code;
  int checks = 0, failures = 0;

  split_combiner dut (.clk(clk), .rst_n(rst_n), .d_a(d_a), .d_b(d_b), .d_avg(d_avg), .d_diff(d_diff), .code(code));
  always #5 clk = ~clk;

  function automatic longint fdiv(input longint x, input longint m);
    return (x >= 0) ? x / m : -((-x + m - 1) / m);
  endfunction

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    d_a = '0; d_b = '0;
    repeat (2) @(posedge clk);
    @(negedge clk) rst_n = 1'b1;
    for (int i = 0; i < 2000; i++) begin
      automatic longint a = longint'($urandom_range(2 * 72000)) - 72000;
      automatic longint b = a + longint'($urandom_range(4000)) - 2000;
      automatic longint avg = fdiv(a + b, 2);
      automatic longint c = fdiv(avg, 1 << (FRAC - N_BITS + 1));
      if (c > 2047) c = 2047;
      if (c < -2048) c = -2048;
      d_a = dval_t'(a); d_b = dval_t'(b);
      @(posedge clk); #1;
      checks++;
      if (longint'(d_avg) != avg || longint'(d_diff) != b - a || longint'($signed(code)) != c) begin
        failures++; $display("FAIL a=%0d b=%0d avg %0d diff %0d code %0d exp %0d", a, b, d_avg, d_diff, $signed(code), c);
      end
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_recon_cell: random digital residues, digits and references; the output
// must be floor((d_res + b*w)/2), worked out here in 64-bit integers, and a
// residue of the stage transfer 2v - b must reconstruct v when w = Vref.
module tb_recon_cell;
  import pipe_adc_pkg::*;
  dval_t d_res, w, d_out;
  digit_t b;
  int checks = 0, failures = 0;

  recon_cell dut (.d_res(d_res), .b(b), .w(w), .d_out(d_out));

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 2000; i++) begin
      automatic longint r = longint'($urandom_range(2 * 70000)) - 70000;
      automatic longint ww = 60000 + longint'($urandom_range(8000));
      automatic int bb = int'($urandom_range(2)) - 1;
      automatic longint s = r + longint'(bb) * ww;
      automatic longint e = (s >= 0) ? s / 2 : -((-s + 1) / 2);
      d_res = dval_t'(r); w = dval_t'(ww); b = digit_t'(bb);
      #1;
      checks++;
      if (longint'(d_out) != e) begin failures++; $display("FAIL r=%0d b=%0d w=%0d out=%0d exp %0d", r, bb, ww, d_out, e); end
    end
    // Ideal stage: input v (even), b from thresholds, residue 2v - b*Vref.
    for (int i = 0; i < 500; i++) begin
      automatic longint v = 2 * (longint'($urandom_range(65000)) - 32500);
      automatic int bb = (v > 16384) ? 1 : (v > -16384) ? 0 : -1;
      d_res = dval_t'(2 * v - longint'(bb) * 65536);
      w = VREF_D; b = digit_t'(bb);
      #1;
      checks++;
      if (longint'(d_out) != v) begin failures++; $display("FAIL ideal v=%0d out=%0d", v, d_out); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

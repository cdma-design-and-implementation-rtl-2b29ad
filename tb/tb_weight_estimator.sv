// tb_weight_estimator: random sets of four peaks (some invalid) and pilot
// polarities; checks w_i = b_p * conj(I_pi + jQ_pi) after the common
// normalising shift (the smallest shift that brings every part of the valid
// peaks within +-31), zero for invalid peaks.
module tb_weight_estimator;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic start, pilot_neg, w_valid;
  peak_t peaks [4];
  cplx6_t w [4];
  int checks = 0, failures = 0;

  weight_estimator dut (.clk, .rst_n, .start, .peaks, .pilot_neg, .w, .w_valid);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int mx, sh, b, er, ei;
    start = 0; pilot_neg = 0; peaks = '{default: '0};
    repeat (3) @(posedge clk); rst_n = 1;
    for (int n = 0; n < 300; n++) begin
      @(negedge clk);
      mx = 0;
      for (int k = 0; k < 4; k++) begin
        peaks[k].valid = (k == 0) || ($urandom_range(0, 3) != 0);
        peaks[k].val.re = 13'($urandom_range(0, 4000)) - 13'd2000;
        peaks[k].val.im = 13'($urandom_range(0, 4000)) - 13'd2000;
        if (n % 7 == 0) begin peaks[k].val.re = peaks[k].val.re / 200; peaks[k].val.im = peaks[k].val.im / 200; end
        if (peaks[k].valid) begin
          if ((peaks[k].val.re < 0 ? -peaks[k].val.re : peaks[k].val.re) > mx) mx = peaks[k].val.re < 0 ? -peaks[k].val.re : peaks[k].val.re;
          if ((peaks[k].val.im < 0 ? -peaks[k].val.im : peaks[k].val.im) > mx) mx = peaks[k].val.im < 0 ? -peaks[k].val.im : peaks[k].val.im;
        end
      end
      sh = 0;
      while ((mx >> sh) > 31) sh++;
      pilot_neg = $urandom_range(0, 1);
      b = pilot_neg ? -1 : 1;
      start = 1;
      @(negedge clk);
      start = 0;
      checks++;
      if (!w_valid) failures++;
      for (int k = 0; k < 4; k++) begin
        er = peaks[k].valid ? b * (int'(peaks[k].val.re) >>> sh) : 0;
        ei = peaks[k].valid ? -b * (int'(peaks[k].val.im) >>> sh) : 0;
        if (er > 31) er = 31; if (ei > 31) ei = 31;
        checks++;
        if (w[k].re != 6'(er) || w[k].im != 6'(ei)) begin
          failures++;
          if (failures < 10) $display("n=%0d k=%0d got %0d,%0d exp %0d,%0d sh=%0d", n, k, w[k].re, w[k].im, er, ei, sh);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_beamformer: checks the beamformer's combiner and its antenna-1 bypass.
// Random antenna samples and weights are applied every clock, with bf_en
// toggling; the expected output, computed here with integer arithmetic as
// sum(ant*bw) >> 7 saturated to 6 bits, or antenna 1 for the bypass, is
// compared 4 clocks later (the latency of both paths).
module tb_beamformer;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx6_t ant [N_ANT], bw [N_ANT], out;
  logic bf_en;
  int checks = 0, failures = 0;
  int cre [2000], cim [2000], bre [2000], bim [2000];
  logic bfh [2000];

  beamformer dut (.clk, .rst_n, .ant, .bw, .bf_en, .out);

  always #5 clk = ~clk;

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic int clip6(int v);
    return v > 31 ? 31 : (v < -32 ? -32 : v);
  endfunction

  initial begin
    int sr, si, er, ei, n_bf, n_byp;
    n_bf = 0; n_byp = 0;
    bf_en = 0;
    foreach (ant[a]) begin ant[a] = '0; bw[a] = '0; end
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      if (t >= 8) begin
        // output now holds sample t-4, selected by the bf_en applied with sample t-1
        er = bfh[t-1] ? cre[t-4] : bre[t-4];
        ei = bfh[t-1] ? cim[t-4] : bim[t-4];
        checks++;
        if (out.re != er || out.im != ei) begin
          failures++;
          if (failures < 10) $display("mismatch t=%0d got %0d,%0d exp %0d,%0d", t, out.re, out.im, er, ei);
        end
        if (bfh[t-1]) n_bf++; else n_byp++;
      end
      bf_en = (t / 50) % 2 == 1;
      sr = 0; si = 0;
      foreach (ant[a]) begin
        ant[a].re = 6'($urandom); ant[a].im = 6'($urandom);
        bw[a].re  = 6'($urandom); bw[a].im  = 6'($urandom);
        sr += int'(ant[a].re) * int'(bw[a].re) - int'(ant[a].im) * int'(bw[a].im);
        si += int'(ant[a].re) * int'(bw[a].im) + int'(ant[a].im) * int'(bw[a].re);
      end
      bfh[t] = bf_en;
      cre[t] = clip6(sr >>> 7); cim[t] = clip6(si >>> 7);
      bre[t] = ant[0].re;       bim[t] = ant[0].im;
    end
    checks++;
    if (n_bf == 0 || n_byp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

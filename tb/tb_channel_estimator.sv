// tb_channel_estimator: a pilot channel (QPSK-chip code, one +-1 bit per
// 1024-sample symbol) reaches the estimator over three paths with different
// delays and complex gains, plus noise; then only noise. Checks:
//  * est_valid comes once every 1024 clocks;
//  * the three paths are found, strongest first, with pos equal to the
//    sample_pos of the last sample of the symbol received over that path
//    (this is the dump position a Rake finger uses);
//  * each peak phasor has the path gain's phase (the bit removed);
//  * the weights w_i from the weight estimator undo the path phase
//    (Re(w_i * phasor_i) > 0, |Im| small);
//  * with noise only the threshold rejects every candidate.
module tb_channel_estimator;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx6_t in;
  qcode_t code [CHIPS];
  logic [7:0] thr_coef;
  logic pilot_neg;
  logic [POS_W-1:0] sample_pos;
  cplx13_t mf_out;
  logic [MFO_W-1:0] mf_mag, avg_mag;
  peak_t peaks [N_FINGER];
  logic est_valid, w_valid;
  cplx6_t w [N_FINGER];
  int checks = 0, failures = 0, n_est = 0, last_est = -1, cyc = 0, n_good = 0, n_rej = 0;
  int dly [3] = '{0, 13, 38};
  int gr [3] = '{22, -9, 7}, gi [3] = '{9, 10, -6};
  int exp_pos [3];
  logic noise_only = 0;
  logic bits [64];

  channel_estimator dut (.clk, .rst_n, .in, .code, .thr_coef, .pilot_neg, .sample_pos, .mf_out,
                         .mf_mag, .avg_mag, .peaks, .est_valid, .w, .w_valid);

  always #5 clk = ~clk;
  initial begin #5000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
  always @(posedge clk) cyc++;

  function automatic int satv(int v, int wd);
    int h = (1 << (wd - 1)) - 1;
    if (v > h) return h;
    if (v < -h - 1) return -h - 1;
    return v;
  endfunction

  // est_valid checks
  always @(posedge clk) if (rst_n && est_valid) begin
    int nv, cr, ci;
    #1;
    n_est++;
    if (last_est >= 0) begin
      checks++;
      if (cyc - last_est != 1024) failures++;
    end
    last_est = cyc;
    nv = 0;
    foreach (peaks[i]) nv += peaks[i].valid;
    if (n_est >= 4 && !noise_only) begin
      n_good++;
      checks += 2;
      if (nv != 3) begin
        failures++;
        $display("est %0d: %0d peaks avg %0d", n_est, nv, avg_mag);
        foreach (peaks[i]) $display("  %0d pos %0d mag %0d", peaks[i].valid, peaks[i].pos, peaks[i].mag);
      end
      for (int i = 1; i < 4; i++) if (peaks[i].valid && peaks[i].mag > peaks[i-1].mag) failures++;
      for (int p = 0; p < 3 && p < nv; p++) begin
        checks += 2;
        if (peaks[p].pos != 10'(exp_pos[p])) begin
          failures++; $display("est %0d: peak %0d pos %0d expected %0d", n_est, p, peaks[p].pos, exp_pos[p]);
        end
        // phasor times conj(gain), bit removed: real part dominant and positive
        cr = int'(peaks[p].val.re) * gr[p] + int'(peaks[p].val.im) * gi[p];
        ci = int'(peaks[p].val.im) * gr[p] - int'(peaks[p].val.re) * gi[p];
        if (pilot_neg) begin cr = -cr; ci = -ci; end
        if (cr <= 0 || 3 * (ci < 0 ? -ci : ci) > cr) begin
          failures++; $display("est %0d: peak %0d phase wrong", n_est, p);
        end
      end
    end
    if (noise_only && n_est > 2 + 14) begin
      n_rej++;
      checks++;
      if (nv != 0) begin failures++; $display("noise: %0d peaks avg %0d mag %0d", nv, avg_mag, peaks[0].mag); end
    end
  end

  always @(posedge clk) if (rst_n && w_valid && n_est >= 4 && !noise_only) begin
    int cr, ci;
    #1;
    for (int p = 0; p < 3; p++) begin
      cr = int'(w[p].re) * int'(peaks[p].val.re) - int'(w[p].im) * int'(peaks[p].val.im);
      ci = int'(w[p].re) * int'(peaks[p].val.im) + int'(w[p].im) * int'(peaks[p].val.re);
      if (pilot_neg) begin cr = -cr; ci = -ci; end
      checks++;
      if (cr <= 0 || 3 * (ci < 0 ? -ci : ci) > cr) begin failures++; $display("weight %0d wrong", p); end
    end
  end

  initial begin
    int xr, xi, loc, s, k, n0;
    foreach (code[c]) code[c] = 2'($urandom);
    foreach (bits[b]) bits[b] = 1'($urandom);
    thr_coef = 8'd64; pilot_neg = 0; in = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    // start so that the paths fall in the middle of the estimator's window
    do @(negedge clk); while (sample_pos != 10'd512);
    n0 = sample_pos;
    for (int p = 0; p < 3; p++) exp_pos[p] = (n0 + dly[p] + 1023) % 1024;
    for (int n = 0; n < 14 * 1024; n++) begin
      xr = 0; xi = 0;
      for (int p = 0; p < 3; p++) begin
        loc = n - dly[p];
        if (loc >= 0) begin
          k = code[(loc / 4) % 256];
          s = bits[loc / 1024] ? -1 : 1;
          unique case (k)
            0: begin xr += s * gr[p]; xi += s * gi[p]; end
            1: begin xr -= s * gi[p]; xi += s * gr[p]; end
            2: begin xr -= s * gr[p]; xi -= s * gi[p]; end
            default: begin xr += s * gi[p]; xi -= s * gr[p]; end
          endcase
        end
      end
      in.re = 6'(satv(xr + $urandom_range(0, 10) - 5, 6));
      in.im = 6'(satv(xi + $urandom_range(0, 10) - 5, 6));
      // the estimate for the symbol received on path 0 comes 2 clocks after
      // its end; the pilot bit it carries is known to the receiver
      if (n % 1024 == 512) pilot_neg = (n >= 1024) ? bits[n / 1024 - 1] : 1'b0;
      @(negedge clk);
    end
    noise_only = 1;
    for (int n = 0; n < 4 * 1024; n++) begin
      in.re = 6'($urandom_range(0, 20) - 10);
      in.im = 6'($urandom_range(0, 20) - 10);
      @(negedge clk);
    end
    checks += 2;
    if (n_good < 10) failures++;
    if (n_rej < 2) failures++;
    $display("estimates %0d, rejected %0d", n_good, n_rej);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

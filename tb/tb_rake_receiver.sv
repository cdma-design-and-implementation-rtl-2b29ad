// tb_rake_receiver: a BPSK symbol stream spread by a random +-1 code reaches
// the receiver over up to four paths with different delays and complex gains,
// plus noise. The fingers get the code and dumps placed on the path delays
// and the weights conj(gain). Checks:
//  * every soft/hard decision against a bit-exact model of the fingers
//    (accumulate, bit selection, Re(y*w) combining, output scaling);
//  * the hard decisions against the transmitted bits (the paths combine in
//    phase, so at this signal-to-noise ratio no errors are expected);
//  * the number of decisions.
// Runs at SF 16, SF 64 and SF 4 and with different finger enables.
module tb_rake_receiver;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx6_t in;
  logic code [4], dump [4], combine;
  logic [3:0] sf_log2, finger_en;
  cplx6_t w [4];
  logic signed [3:0] soft_dec;
  logic hard_dec, dec_valid;
  int checks = 0, failures = 0, n_dec = 0, bit_err = 0;
  int exp_soft [$], exp_bit [$];
  logic exp_hard [$];

  rake_receiver dut (.clk, .rst_n, .in, .code, .dump, .combine, .sf_log2, .w, .finger_en,
                     .soft_dec, .hard_dec, .dec_valid);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && dec_valid) begin
    #1;
    n_dec++;
    checks += 2;
    if (exp_soft.size() == 0) failures++;
    else begin
      if (soft_dec != 4'(exp_soft[0]) || hard_dec != exp_hard.pop_front()) begin
        failures++;
        if (failures < 10) $display("decision %0d: soft %0d exp %0d hard %0d", n_dec, soft_dec, exp_soft[0], hard_dec);
      end
      void'(exp_soft.pop_front());
      if (hard_dec != (exp_bit.pop_front() != 0)) bit_err++;
    end
  end

  function automatic int satv(int v, int wd);
    int hi = (1 << (wd - 1)) - 1;
    if (v > hi) return hi;
    if (v < -hi - 1) return -hi - 1;
    return v;
  endfunction

  task automatic run(input int sfl, input int nsym, input logic [3:0] fen);
    int sf4, dly [4], g_re [4], g_im [4], maxd, lastf, loc, yre [4], yim [4], are [4], aim [4];
    int n_total, xr, xi, s, acc;
    logic cbits [2048];
    logic dbits [64];
    sf_log2 = 4'(sfl); finger_en = fen;
    sf4 = 4 << sfl;
    dly = '{0, 5 + $urandom_range(0, 3), 13 + $urandom_range(0, 6), 27 + $urandom_range(0, 9)};
    if (sf4 <= 40) dly = '{0, 3, 6, 9};
    g_re = '{14, -6, 3, 5}; g_im = '{3, 9, -7, 2};
    for (int f = 0; f < 4; f++) begin w[f].re = 6'(2 * g_re[f]); w[f].im = 6'(-2 * g_im[f]); end
    maxd = -1; lastf = 0;
    for (int f = 0; f < 4; f++) if (fen[f] && dly[f] > maxd) begin maxd = dly[f]; lastf = f; end
    foreach (cbits[k]) cbits[k] = 1'($urandom);
    foreach (dbits[k]) dbits[k] = 1'($urandom);
    foreach (are[f]) begin are[f] = 0; aim[f] = 0; yre[f] = 0; yim[f] = 0; end
    n_total = nsym * sf4 + maxd + 1;
    for (int n = 0; n < n_total; n++) begin
      @(negedge clk);
      // channel: four paths, each symbol bit times code chip times gain
      xr = 0; xi = 0;
      for (int p = 0; p < 4; p++) begin
        loc = n - dly[p];
        if (loc >= 0 && loc < nsym * sf4) begin
          s = ((cbits[(loc / 4) % 2048] ^ dbits[(loc / sf4) % 64]) ? -1 : 1);
          xr += s * g_re[p]; xi += s * g_im[p];
        end
      end
      xr += $urandom_range(0, 6) - 3; xi += $urandom_range(0, 6) - 3;
      in.re = 6'(satv(xr, 6)); in.im = 6'(satv(xi, 6));
      combine = 0;
      for (int f = 0; f < 4; f++) begin
        loc = n - dly[f];
        code[f] = (loc >= 0) ? cbits[(loc / 4) % 2048] : 1'b0;
        dump[f] = (loc >= 0) && (loc % sf4 == sf4 - 1);
        are[f] += code[f] ? -int'(in.re) : int'(in.re);
        aim[f] += code[f] ? -int'(in.im) : int'(in.im);
        if (dump[f]) begin
          yre[f] = satv(are[f] >>> (sfl + 2), 6); yim[f] = satv(aim[f] >>> (sfl + 2), 6);
          are[f] = 0; aim[f] = 0;
        end
      end
      combine = dump[lastf];
      if (combine) begin
        acc = 0;
        for (int f = 0; f < 4; f++)
          if (fen[f]) acc += yre[f] * int'(w[f].re) - yim[f] * int'(w[f].im);
        exp_soft.push_back(satv(acc >>> 7, 4));
        exp_hard.push_back(acc < 0);
        exp_bit.push_back(dbits[((n - maxd) / sf4) % 64]);
      end
    end
    // flush the partial symbol left in the correlators
    @(negedge clk);
    foreach (dump[f]) begin dump[f] = 1; code[f] = 0; end
    combine = 0; in = '0;
    @(negedge clk);
    foreach (dump[f]) dump[f] = 0;
    repeat (8) @(negedge clk);
  endtask

  initial begin
    in = '0; combine = 0;
    foreach (dump[f]) begin dump[f] = 0; code[f] = 0; w[f] = '0; end
    sf_log2 = 4; finger_en = 4'hF;
    repeat (3) @(posedge clk); rst_n = 1;
    run(4, 60, 4'b1111);
    run(6, 30, 4'b0111);
    run(2, 64, 4'b0011);
    run(4, 40, 4'b0001);
    checks += 2;
    if (n_dec != 194) begin failures++; $display("decisions %0d", n_dec); end
    if (bit_err != 0) begin failures++; $display("bit errors %0d", bit_err); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_wcdma_rx_top: end-to-end test of the receiver at its default sizes.
//
// A behavioural uplink transmitter and channel, written inline, produce the
// four antenna signals at four samples per chip:
//   * two symbols of noise only;
//   * a PRACH preamble: 16 symbols of 256 chips, each the preamble code
//     (QPSK chips) times one bit of the 16-bit signature;
//   * the message part: data on I (real data code, spreading factor 64,
//     random bits) and the pilot on Q (real pilot code, one bit of the
//     16-bit pilot pattern per 256-chip symbol).
// The channel has three paths (delays 0, 7 and 22 samples, different
// complex gains), one direction of arrival (62 degrees of phase between
// neighbouring antennas), a carrier frequency offset of 27/2048 of a turn
// per symbol (200 Hz at 3.84 Mcps) and uniform noise; the antennas are quantised to 6 bits.
//
// This runs twice: first with data at spreading factor 64, then, after a
// restart, a new preamble and data at spreading factor 256. The second pass
// also checks that the receiver acquires again after a restart.
// Each transmission is started so that the strongest path's symbols end
// in the middle of the channel estimator's 1024-sample window.
// Checks and mechanism counts (a mechanism that never happens is a failure):
//   * threshold rejection: estimates with no valid peak during noise;
//   * random access request: exactly one, after the 16th preamble symbol,
//     upright, with correlation 16;
//   * mode switches SEARCH -> INIT -> MESSAGE, after init_syms estimates;
//   * beam searcher updates and beamformer switched in, with weights that
//     point at the source (array gain);
//   * NCO load with the initial phase at the switch to MESSAGE, and loop
//     filter updates, the phase error within 1/16 of a turn over the
//     last six symbols;
//   * every legitimate peak from the fourth message symbol on (the
//     threshold has then settled on the pilot code) within one sample (a quarter
//     chip; noise can move the top of the two-chip-wide peak) of a path delay,
//     and all three paths in use as fingers in most estimates;
//   * Rake decisions equal to the transmitted data bits (after lining the
//     decision sequence up with the bit sequence);
//   * restart back to SEARCH after each pass.
module tb_wcdma_rx_top;
  import wcdma_pkg::*;
  localparam int N_MSG = 28, DELTA = 27;
  int sf = 64;
  logic clk = 0, rst_n = 0, restart;
  cplx6_t ant [N_ANT];
  qcode_t pre_code [CHIPS], pilot_code [CHIPS];
  logic [CHIPS-1:0] data_code;
  logic [SIG_LEN-1:0] signature, pilot_seq;
  logic [3:0] sf_log2, init_syms;
  logic [7:0] thr_coef;
  logic [6:0] c1;
  logic [1:0] c2;
  logic [N_FINGER-1:0] finger_en;
  logic bf_allow;
  logic signed [3:0] soft_dec;
  logic hard_dec, dec_valid, raq, raq_inverted, est_valid, lf_upd;
  logic signed [5:0] pre_corr;
  logic [1:0] mode;
  peak_t peaks [N_FINGER];
  cplx6_t w [N_FINGER], bw [N_ANT];
  logic signed [MFO_W-1:0] dpcch;
  logic signed [PH_W-1:0] phase_err;
  logic [MFO_W-1:0] agc_level;

  wcdma_rx_top dut (.*);

  int checks = 0, failures = 0, cyc = 0;
  int n_rej = 0, n_raq = 0, n_init = 0, n_msg = 0, n_bw = 0, n_bf = 0, n_load = 0, n_upd = 0;
  int n_fing3 = 0, n_dec = 0, raq_sym = -1, tx_sym = -1, n_restart = 0, late_err = 0;
  logic dec_list [$];
  logic dbits [N_MSG * CHIPS / 4];
  logic cc [CHIPS];                       // real pilot code, 1 = -1
  int dly [3] = '{0, 7, 22};
  real gre [3], gim [3];
  rx_mode_t mode_d = MODE_SEARCH;

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  initial begin #3000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // ---------------- mechanism counters (sampled between clock edges) ----------------
  always @(negedge clk) if (rst_n) begin
    int nv;
    mode_d <= rx_mode_t'(mode);
    if (mode == MODE_INIT && mode_d == MODE_SEARCH) n_init++;
    if (mode == MODE_MESSAGE && mode_d == MODE_INIT) n_msg++;
    if (mode == MODE_SEARCH && mode_d == MODE_MESSAGE) n_restart++;
    if (dut.bf_en) n_bf++;
    if (dut.bw_valid) n_bw++;
    if (dut.u_cr.load) n_load++;
    if (lf_upd) n_upd++;
    if (raq) begin
      n_raq++; raq_sym = tx_sym;
      checks += 2;
      if (raq_inverted) begin failures++; $display("raq inverted"); end
      if (pre_corr != 6'sd16) begin failures++; $display("pre_corr %0d", pre_corr); end
    end
    if (est_valid) begin
      nv = 0;
      foreach (peaks[i]) nv += peaks[i].valid;
      if (tx_sym < 0 && nv == 0) n_rej++;
      if (dut.path_ok == 4'b0111 || dut.path_ok == 4'b1111) n_fing3++;
      // during the message every legitimate peak must be one of the paths,
      // give or take one sample
      if (tx_sym > SIG_LEN + 3)
        foreach (peaks[i]) if (peaks[i].valid) begin
          checks++;
          if (!near_path(int'(peaks[i].pos))) begin
            failures++; $display("peak %0d at %0d is no path (symbol %0d, mag %0d, avg %0d)", i, peaks[i].pos, tx_sym, peaks[i].mag, agc_level);
          end
        end
    end
    if (dec_valid) begin
      n_dec++; dec_list.push_back(hard_dec);
    end
  end

  function automatic bit near_path(int pos);
    foreach (dly[p]) if (pos - (511 + dly[p]) <= 1 && pos - (511 + dly[p]) >= -1) return 1;
    return 0;
  endfunction

  function automatic int satv(int v, int wd);
    int h = (1 << (wd - 1)) - 1;
    if (v > h) return h;
    if (v < -h - 1) return -h - 1;
    return v;
  endfunction

  // baseband symbol of path p at transmit sample n (before gain and carrier)
  function automatic void tx_chip(input int loc, output int sr, output int si);
    int sym, chip, m, s;
    sr = 0; si = 0;
    if (loc < 0) return;
    if (loc < SIG_LEN * SYM_LEN) begin
      sym = loc / SYM_LEN; chip = (loc / SPC) % CHIPS;
      s = signature[sym] ? -1 : 1;
      unique case (pre_code[chip])
        2'd0: sr = s;
        2'd1: si = s;
        2'd2: sr = -s;
        default: si = -s;
      endcase
    end else begin
      m = loc - SIG_LEN * SYM_LEN;
      if (m >= N_MSG * SYM_LEN) return;
      sym = m / SYM_LEN; chip = (m / SPC) % CHIPS;
      sr = (dbits[m / (SPC * sf)] ^ data_code[chip]) ? -1 : 1;
      si = (pilot_seq[sym % 16] ^ cc[chip]) ? -1 : 1;
    end
  endfunction

  int best_o, errs;

  // one transmission: noise, preamble and message at spreading factor 2**l
  task automatic run_pass(input int l);
    real th, cr, ci, ar, ai, phi;
    int sr, si, best, c0, k0;
    sf = 1 << l; sf_log2 = 4'(l);
    foreach (dbits[k]) dbits[k] = 1'($urandom);
    dec_list.delete();
    tx_sym = -1; raq_sym = -1; c0 = cyc;
    // noise, then start the preamble so that path 0's symbols end mid-window
    do begin
      @(negedge clk);
      foreach (ant[a]) begin ant[a].re = 6'($urandom_range(0, 6) - 3); ant[a].im = 6'($urandom_range(0, 6) - 3); end
    end while (!(cyc > c0 + 2 * SYM_LEN && dut.sample_pos == 10'(512 - 6)));
    for (int n = 0; n < (SIG_LEN + N_MSG) * SYM_LEN + 64; n++) begin
      tx_sym = n / SYM_LEN;
      th = -0.9 + 6.283185307 * real'(DELTA) * real'(n) / (1024.0 * 2048.0);
      for (int a = 0; a < N_ANT; a++) begin
        ar = 0.0; ai = 0.0;
        for (int p = 0; p < 3; p++) begin
          tx_chip(n - dly[p], sr, si);
          // gain, carrier and the antenna's phase for the arrival direction
          phi = th + 1.082 * real'(a);
          cr = gre[p] * $cos(phi) - gim[p] * $sin(phi);
          ci = gre[p] * $sin(phi) + gim[p] * $cos(phi);
          ar += real'(sr) * cr - real'(si) * ci;
          ai += real'(sr) * ci + real'(si) * cr;
        end
        ant[a].re = 6'(satv(int'(ar) + $urandom_range(0, 6) - 3, 6));
        ant[a].im = 6'(satv(int'(ai) + $urandom_range(0, 6) - 3, 6));
      end
      @(negedge clk);
      if (n > (SIG_LEN + N_MSG - 6) * SYM_LEN && lf_upd && (phase_err > 128 || phase_err < -128)) begin
        late_err++; $display("phase error %0d", phase_err);
      end
    end
    tx_sym = -2;
    // decisions against the data bits: line the sequences up, skipping the
    // first decisions after the switch to MESSAGE
    k0 = 3 * 256 / sf;
    best = -1; best_o = 0;
    for (int o = 0; o < 32; o++) begin
      int ok;
      ok = 0;
      for (int k = k0; k < dec_list.size() && k + o < N_MSG * CHIPS / sf; k++) ok += (dec_list[k] == dbits[k + o]);
      if (ok > best) begin best = ok; best_o = o; end
    end
    errs = 0;
    for (int k = k0; k < dec_list.size() && k + best_o < N_MSG * CHIPS / sf; k++) errs += (dec_list[k] != dbits[k + best_o]);
    checks++;
    if (errs != 0) begin failures++; $display("SF %0d: bit errors %0d", sf, errs); end
    checks += 2;
    if (dec_list.size() < N_MSG * 256 / (2 * sf)) begin failures++; $display("SF %0d: decisions %0d", sf, dec_list.size()); end
    if (best_o > 6 * 256 / sf) begin failures++; $display("SF %0d: decision offset %0d", sf, best_o); end
    $display("SF %0d: decisions %0d (offset %0d, errors %0d)", sf, dec_list.size(), best_o, errs);
    // beamformer weights point at the source and keep antenna 1's phase:
    // (sum over antennas of h_a * bw_a) * conj(h_1), h_a = exp(j*1.082*a)
    begin
      real gr, gi, hr, hi;
      gr = 0.0; gi = 0.0;
      for (int a = 0; a < N_ANT; a++) begin
        hr = $cos(1.082 * real'(a)); hi = $sin(1.082 * real'(a));
        gr += hr * real'(bw[a].re) - hi * real'(bw[a].im);
        gi += hr * real'(bw[a].im) + hi * real'(bw[a].re);
      end
      checks++;
      if (gr <= 0.0 || 4.0 * (gi < 0.0 ? -gi : gi) > gr) begin failures++; $display("beam off %f %f", gr, gi); end
    end
    // restart
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    repeat (4) @(negedge clk);
    checks += 2;
    if (mode != MODE_SEARCH) begin failures++; $display("no restart"); end
    if (raq_sym != SIG_LEN) begin failures++; $display("SF %0d: raq during symbol %0d", sf, raq_sym); end
  endtask

  initial begin
    real amp;
    // configuration: random codes, the signature and pilot pattern
    foreach (pre_code[k]) pre_code[k] = 2'($urandom);
    foreach (cc[k]) begin cc[k] = 1'($urandom); pilot_code[k] = cc[k] ? 2'd3 : 2'd1; end
    data_code = {8{$urandom}};
    signature = 16'b1011_0010_1110_0100;
    pilot_seq = 16'b0110_1001_0011_1010;
    init_syms = 4'd3; thr_coef = 8'd64; c1 = 7'd48; c2 = 2'd1;
    finger_en = 4'b1111; bf_allow = 1; restart = 0;
    amp = 9.0;
    gre[0] = amp * $cos(0.35);  gim[0] = amp * $sin(0.35);
    gre[1] = 0.6 * amp * $cos(-1.2); gim[1] = 0.6 * amp * $sin(-1.2);
    gre[2] = 0.4 * amp * $cos(2.6);  gim[2] = 0.4 * amp * $sin(2.6);
    foreach (ant[a]) ant[a] = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    run_pass(6);
    run_pass(8);

    // every mechanism must have happened, once per pass
    checks += 11;
    if (n_rej == 0)   begin failures++; $display("no threshold rejection"); end
    if (n_raq != 2)   begin failures++; $display("raq count %0d", n_raq); end
    if (n_init != 2)  begin failures++; $display("INIT count %0d", n_init); end
    if (n_msg != 2)   begin failures++; $display("MESSAGE count %0d", n_msg); end
    if (n_bw < 20)    begin failures++; $display("beam searcher updates %0d", n_bw); end
    if (n_bf == 0)    begin failures++; $display("beamformer never on"); end
    if (n_load != 2)  begin failures++; $display("NCO loads %0d", n_load); end
    if (n_upd < 40)   begin failures++; $display("loop updates %0d", n_upd); end
    if (late_err != 0) begin failures++; $display("late phase errors %0d", late_err); end
    if (n_fing3 < 20) begin failures++; $display("three fingers only %0d times", n_fing3); end
    if (n_restart != 2 || mode != MODE_SEARCH) begin failures++; $display("restarts %0d", n_restart); end
    $display("mechanisms: rejections %0d raq %0d init %0d message %0d bw updates %0d bf cycles %0d nco loads %0d loop updates %0d 3-finger estimates %0d decisions %0d restarts %0d",
             n_rej, n_raq, n_init, n_msg, n_bw, n_bf, n_load, n_upd, n_fing3, n_dec, n_restart);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

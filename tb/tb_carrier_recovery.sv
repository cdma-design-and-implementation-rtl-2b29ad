// tb_carrier_recovery: a carrier with a constant frequency offset (DELTA
// phase units of 2*pi/2048 per 1024-clock symbol) modulated by random +-1
// pilot bits. Once per symbol the testbench hands the loop the peak phasor
// the matched filter would see: the carrier phase minus the NCO phase at
// that instant, times the bit, with amplitude noise.
//  * Open loop (preamble search): Initial Freq must settle at DELTA (+-3).
//  * After preamble_det: Last Phase must follow the carrier phase (+-6).
//  * On the rising edge of en_msg the NCO must be loaded with
//    Initial Phase = Last Phase + 4 * Initial Freq and the loop filter
//    integrator with Initial Freq, so the NCO runs at the carrier frequency.
//  * Closed loop: the phase error stays within +-24 units (4.2 degrees)
//    after 8 updates, and lf_upd pulses once per symbol.
//  * A symbol without a valid peak (pk_ok = 0) must not update the loop.
module tb_carrier_recovery;
  import wcdma_pkg::*;
  localparam int DELTA = 37;
  logic clk = 0, rst_n = 0;
  logic pk_valid, pk_ok, pol_neg, preamble_det, en_msg, lf_upd;
  cplx13_t pk;
  logic [6:0] c1;
  logic [1:0] c2;
  logic signed [5:0] nco_cos, nco_sin;
  logic signed [10:0] phase_err, init_freq;
  logic [10:0] last_phase, init_phase;
  logic [27:0] nco_phase;
  int checks = 0, failures = 0, n_upd = 0, cyc = 0;
  real theta0 = 1.3;

  carrier_recovery dut (.clk, .rst_n, .pk_valid, .pk_ok, .pk, .pol_neg, .preamble_det, .en_msg,
                        .c1, .c2, .nco_cos, .nco_sin, .phase_err, .init_freq, .last_phase,
                        .init_phase, .nco_phase, .lf_upd);

  always #5 clk = ~clk;
  always @(posedge clk) cyc++;
  always @(posedge clk) if (lf_upd) n_upd++;
  initial begin #10000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int wrapd(int a);   // phase difference to -1024..1023
    a = a % 2048;
    if (a < 0) a += 2048;
    return a >= 1024 ? a - 2048 : a;
  endfunction

  function automatic real carrier(int c);  // carrier phase in units at clock c
    return theta0 * 2048.0 / 6.283185307 + real'(DELTA) * real'(c) / 1024.0;
  endfunction

  // one symbol: 1023 idle clocks then the peak strobe
  task automatic symbol(input logic ok, output int ph_true);
    real ph, a;
    logic neg;
    repeat (1023) @(negedge clk);
    neg = 1'($urandom);
    ph = carrier(cyc) - (en_msg ? real'(nco_phase) / 131072.0 : 0.0);
    ph_true = int'(carrier(cyc)) % 2048;
    a = 1200.0 + real'($urandom_range(0, 100));
    if (neg) a = -a;
    pk.re = 13'(int'(a * $cos(ph * 6.283185307 / 2048.0)));
    pk.im = 13'(int'(a * $sin(ph * 6.283185307 / 2048.0)));
    pol_neg = neg; pk_ok = ok; pk_valid = 1;
    @(negedge clk);
    pk_valid = 0;
  endtask

  initial begin
    int pt, e, n0;
    pk_valid = 0; pk_ok = 0; pk = '0; pol_neg = 0; preamble_det = 0; en_msg = 0;
    c1 = 7'd48; c2 = 2'd1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 24; s++) symbol(1'b1, pt);
    repeat (3) @(negedge clk);
    checks++;
    if (wrapd(init_freq - DELTA) > 3 || wrapd(init_freq - DELTA) < -3) begin
      failures++; $display("init_freq %0d expected %0d", init_freq, DELTA);
    end
    preamble_det = 1;
    for (int s = 0; s < 4; s++) begin
      symbol(1'b1, pt);
      repeat (3) @(negedge clk);
      checks++;
      e = wrapd(int'(last_phase) - pt);
      if (e > 6 || e < -6) begin failures++; $display("last_phase %0d expected %0d", last_phase, pt); end
    end
    // close the loop
    @(negedge clk);
    en_msg = 1;
    @(negedge clk);
    checks += 2;
    if (nco_phase[27:17] != init_phase) begin failures++; $display("NCO not loaded"); end
    if (init_phase != 11'(last_phase + 11'(4 * init_freq))) failures++;
    n0 = n_upd;
    for (int s = 0; s < 40; s++) begin
      symbol(1'b1, pt);
      repeat (3) @(negedge clk);
      if (s >= 8) begin
        checks++;
        if (phase_err > 24 || phase_err < -24) begin failures++; $display("symbol %0d phase error %0d", s, phase_err); end
      end
    end
    checks++;
    if (n_upd - n0 != 40) begin failures++; $display("updates %0d", n_upd - n0); end
    n0 = n_upd;
    symbol(1'b0, pt);
    repeat (3) @(negedge clk);
    checks++;
    if (n_upd != n0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

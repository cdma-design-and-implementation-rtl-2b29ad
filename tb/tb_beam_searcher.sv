// tb_beam_searcher: a plane wave (antenna gains h_a) carrying a QPSK-chip
// pilot with random +-1 symbol polarity, plus noise, reaches the four
// antennas. Checks every weight update against a bit-exact model of the
// correlators, the acquisition load / (1-alpha, alpha) averaging, the
// antenna 1 phase reference, the conjugation and the common normalisation
// with its kept shift;
// checks that the weights point at the source and keep antenna 1's phase
// ((sum of h_a*bw_a) * conj(h_1) nearly real and positive); and that en = 0
// freezes the weights.
module tb_beam_searcher;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx6_t ant [4], bw [4];
  qcode_t code;
  logic dump, pol_neg, acq, en, bw_valid;
  int checks = 0, failures = 0, n_upd = 0, n_exp = 0;
  int ar [4], ai [4], vr [4], vi [4];
  int sh_m = 0;                          // model of the kept weight shift
  int ebr [$], ebi [$];
  int hr [4] = '{20, -12, 5, 14}, hi [4] = '{4, 15, -19, -8};

  beam_searcher dut (.clk, .rst_n, .ant, .code, .dump, .pol_neg, .acq, .en, .bw, .bw_valid);

  always #5 clk = ~clk;
  initial begin #20000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int satv(int v, int wd);
    int h = (1 << (wd - 1)) - 1;
    if (v > h) return h;
    if (v < -h - 1) return -h - 1;
    return v;
  endfunction

  always @(posedge clk) if (rst_n && bw_valid) begin
    int gr, gi;
    #1;
    n_upd++;
    for (int a = 0; a < 4; a++) begin
      checks += 2;
      if (bw[a].re != 6'(ebr.pop_front())) failures++;
      if (bw[a].im != 6'(ebi.pop_front())) failures++;
    end
    // beam points at the source and keeps antenna 1's phase:
    // (h . bw) * conj(h_1) has a dominant positive real part
    gr = 0; gi = 0;
    for (int a = 0; a < 4; a++) begin
      int tr, ti;
      tr = hr[a] * bw[a].re - hi[a] * bw[a].im;
      ti = hr[a] * bw[a].im + hi[a] * bw[a].re;
      gr += tr * hr[0] + ti * hi[0];
      gi += ti * hr[0] - tr * hi[0];
    end
    checks++;
    if (gr <= 0 || 4 * (gi < 0 ? -gi : gi) > gr) begin
      failures++; $display("beam off: %0d %0d", gr, gi);
    end
  end

  task automatic symbol(input int len, input logic neg, input logic acq_i, input logic en_i);
    int xr, xi, sr, si, m, sh, b;
    for (int n = 0; n < len; n++) begin
      @(negedge clk);
      code = 2'($urandom);
      dump = (n == len - 1);
      if (n == 1) begin pol_neg = neg; acq = acq_i; en = en_i; end
      for (int a = 0; a < 4; a++) begin
        // transmitted chip = (+-1) * j**code; rotate h_a by it
        unique case (code)
          2'd0: begin xr =  hr[a]; xi =  hi[a]; end
          2'd1: begin xr = -hi[a]; xi =  hr[a]; end
          2'd2: begin xr = -hr[a]; xi = -hi[a]; end
          default: begin xr = hi[a]; xi = -hr[a]; end
        endcase
        if (neg) begin xr = -xr; xi = -xi; end
        ant[a].re = 6'(satv(xr + $urandom_range(0, 8) - 4, 6));
        ant[a].im = 6'(satv(xi + $urandom_range(0, 8) - 4, 6));
        // despread: multiply by conj(j**code)
        unique case (code)
          2'd0: begin sr =  ant[a].re; si =  ant[a].im; end
          2'd1: begin sr =  ant[a].im; si = -ant[a].re; end
          2'd2: begin sr = -ant[a].re; si = -ant[a].im; end
          default: begin sr = -ant[a].im; si = ant[a].re; end
        endcase
        ar[a] += sr; ai[a] += si;
      end
      if (dump) begin
        for (int a = 0; a < 4; a++) begin
          sr = neg ? -ar[a] : ar[a]; si = neg ? -ai[a] : ai[a];
          if (en_i) begin
            if (acq_i) begin vr[a] = sr; vi[a] = si; end
            else begin vr[a] = vr[a] + ((sr - vr[a]) >>> 3); vi[a] = vi[a] + ((si - vi[a]) >>> 3); end
          end
          ar[a] = 0; ai[a] = 0;
        end
        if (en_i) begin
          longint rr [4], ri [4], mx, cur;
          int shf;
          mx = 0;
          for (int a = 0; a < 4; a++) begin
            rr[a] = longint'(vr[a]) * vr[0] + longint'(vi[a]) * vi[0];
            ri[a] = longint'(vi[a]) * vr[0] - longint'(vr[a]) * vi[0];
            if ((rr[a] < 0 ? -rr[a] : rr[a]) > mx) mx = rr[a] < 0 ? -rr[a] : rr[a];
            if ((ri[a] < 0 ? -ri[a] : ri[a]) > mx) mx = ri[a] < 0 ? -ri[a] : ri[a];
          end
          shf = 0;
          for (b = 0; b < 35; b++) if (mx >= (64'd1 << b)) shf = (b >= 4) ? b - 4 : 0;
          cur = mx >>> sh_m;
          if (acq_i || cur > 31 || cur < 8) sh_m = shf;
          for (int a = 0; a < 4; a++) begin
            ebr.push_back(satv(int'(rr[a] >>> sh_m), 6));
            ebi.push_back(satv(int'(-(ri[a] >>> sh_m)), 6));
          end
          n_exp++;
        end
      end
    end
  endtask

  initial begin
    cplx6_t hold [4];
    foreach (ant[a]) ant[a] = '0;
    foreach (ar[a]) begin ar[a] = 0; ai[a] = 0; vr[a] = 0; vi[a] = 0; end
    code = 0; dump = 0; pol_neg = 0; acq = 0; en = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    symbol(1024, 1'b0, 1'b1, 1'b1);                 // acquisition load
    for (int s = 0; s < 20; s++) symbol(s % 4 == 0 ? 1024 : 64 * $urandom_range(1, 4), 1'($urandom), 1'b0, 1'b1);
    @(negedge clk); dump = 0; foreach (ant[a]) ant[a] = '0;
    repeat (4) @(negedge clk);
    hold = bw;
    for (int s = 0; s < 3; s++) symbol(256, 1'($urandom), 1'b0, 1'b0);   // frozen
    @(negedge clk); dump = 0;
    repeat (4) @(negedge clk);
    checks += 3;
    if (bw != hold) failures++;
    if (n_upd != 21 || n_exp != 21) begin failures++; $display("updates %0d %0d", n_upd, n_exp); end
    if (ebr.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// beam_searcher: spatial signature estimation and beamformer weights.
//
// Four identical fingers, one per antenna. Each despreads the raw complex
// antenna signal with the pilot code (QPSK phase-index chips, as in the
// matched filter) in a 17-bit integrate-and-dump correlator whose symbol
// window is placed on the strongest path's delay delta_0 (code and dump come
// from the code generator). The despread pilot, multiplied by the pilot bit
// polarity, is the antenna's entry of the spatial signature. The averager
// keeps
//   avg_new = (1 - alpha) * avg_old + alpha * s,   alpha = 2**-ALPHA_SHIFT,
// except while acq is high, when it is loaded with s directly (the weights
// start from the signature measured right after the random access request).
// The weight bw_i is the conjugate of avg_i, scaled to 6 bits with one
// common right shift for all four antennas (the largest part in 16..31 when
// the shift is chosen, and the shift kept while that part stays in 8..31);
// averaging the signature and conjugating it is the same as averaging the
// conjugates. Before that the signature is referred to antenna 1
// (avg_i * conj(avg_1)), so the weight of antenna 1 is real and positive:
// the beamformer output then
// keeps the carrier phase of antenna 1, the signal the receiver used before
// the beamformer was switched in, and a carrier frequency offset (which
// turns all four averages together) does not turn the weights.
//
// Timing: en enables updates; bw and bw_valid are registered four clocks
// after the dump sample. The correlator / averager / weight-calculation
// structure and the update rule are the document's (its Eq. 2); the antenna 1
// phase reference, the normalisation and alpha = 1/8 are this design's choice.
module beam_searcher
  import wcdma_pkg::*;
#(
  parameter int ALPHA_SHIFT = 3
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cplx6_t ant [N_ANT],
  input  qcode_t code,
  input  logic   dump,
  input  logic   pol_neg,
  input  logic   acq,
  input  logic   en,
  output cplx6_t bw [N_ANT],
  output logic   bw_valid
);

  cplx6_t                  x_q [N_ANT];
  qcode_t                  code_q;
  logic                    dump_q, upd_q;
  logic signed [COR_W-1:0] acc_re [N_ANT], acc_im [N_ANT];
  logic signed [COR_W-1:0] avg_re [N_ANT], avg_im [N_ANT];

  function automatic logic signed [ANT_W:0] dsp_re(input cplx6_t x, input qcode_t k);
    unique case (k)
      2'd0: return  (ANT_W+1)'(x.re);
      2'd1: return  (ANT_W+1)'(x.im);
      2'd2: return -(ANT_W+1)'(x.re);
      default: return -(ANT_W+1)'(x.im);
    endcase
  endfunction

  function automatic logic signed [ANT_W:0] dsp_im(input cplx6_t x, input qcode_t k);
    unique case (k)
      2'd0: return  (ANT_W+1)'(x.im);
      2'd1: return -(ANT_W+1)'(x.re);
      2'd2: return -(ANT_W+1)'(x.im);
      default: return  (ANT_W+1)'(x.re);
    endcase
  endfunction

  function automatic logic [COR_W-1:0] absv(input logic signed [COR_W-1:0] v);
    return v[COR_W-1] ? COR_W'(-v) : COR_W'(v);
  endfunction

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x_q    <= '{default: '0};
      code_q <= '0;
      dump_q <= 1'b0;
      upd_q  <= 1'b0;
      acc_re <= '{default: '0};
      acc_im <= '{default: '0};
      avg_re <= '{default: '0};
      avg_im <= '{default: '0};
    end else begin
      x_q    <= ant;
      code_q <= code;
      dump_q <= dump;
      upd_q  <= dump_q && en;
      for (int a = 0; a < N_ANT; a++) begin
        logic signed [COR_W-1:0] sr, si, s_re, s_im;
        sr = acc_re[a] + COR_W'(dsp_re(x_q[a], code_q));
        si = acc_im[a] + COR_W'(dsp_im(x_q[a], code_q));
        if (dump_q) begin
          acc_re[a] <= '0;
          acc_im[a] <= '0;
          if (en) begin
            s_re = pol_neg ? -sr : sr;
            s_im = pol_neg ? -si : si;
            if (acq) begin
              avg_re[a] <= s_re;
              avg_im[a] <= s_im;
            end else begin
              avg_re[a] <= avg_re[a] + ((s_re - avg_re[a]) >>> ALPHA_SHIFT);
              avg_im[a] <= avg_im[a] + ((s_im - avg_im[a]) >>> ALPHA_SHIFT);
            end
          end
        end else begin
          acc_re[a] <= sr;
          acc_im[a] <= si;
        end
      end
    end
  end

  // weight calculation, stage 1: phase reference on antenna 1,
  // r_i = avg_i * conj(avg_1), at full precision
  localparam int RW = 2 * COR_W + 1;
  logic signed [RW-1:0] r_re [N_ANT], r_im [N_ANT];
  logic                 upd_q2, acq_q, acq_q2;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      r_re   <= '{default: '0};
      r_im   <= '{default: '0};
      upd_q2 <= 1'b0;
      acq_q  <= 1'b0;
      acq_q2 <= 1'b0;
    end else begin
      upd_q2 <= upd_q;
      acq_q  <= acq;
      acq_q2 <= acq_q;
      if (upd_q) begin
        for (int a = 0; a < N_ANT; a++) begin
          r_re[a] <= (RW'(avg_re[a]) * RW'(avg_re[0])) + (RW'(avg_im[a]) * RW'(avg_im[0]));
          r_im[a] <= (RW'(avg_im[a]) * RW'(avg_re[0])) - (RW'(avg_re[a]) * RW'(avg_im[0]));
        end
      end
    end
  end

  // stage 2: conjugate and scale to six bits with one common right shift.
  // The shift is kept from the previous update while the largest part stays
  // within 8..31, so the beamformer gain does not step with every small
  // change of the signal level; it is chosen afresh (largest part 16..31)
  // on the initial estimate or when the part leaves that range.
  function automatic logic [RW-1:0] absr(input logic signed [RW-1:0] v);
    return v[RW-1] ? RW'(-v) : RW'(v);
  endfunction

  logic [RW-1:0] maxr, cur;
  logic [5:0]    sh_fit, sh_q, sh_use;
  always_comb begin
    maxr = '0;
    for (int a = 0; a < N_ANT; a++) begin
      if (absr(r_re[a]) > maxr) maxr = absr(r_re[a]);
      if (absr(r_im[a]) > maxr) maxr = absr(r_im[a]);
    end
    sh_fit = '0;
    for (int b = 0; b < RW; b++) if (maxr[b]) sh_fit = (b >= 4) ? 6'(b - 4) : '0;
    cur    = maxr >> sh_q;
    sh_use = (acq_q2 || cur > RW'(31) || cur < RW'(8)) ? sh_fit : sh_q;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      bw       <= '{default: '0};
      bw_valid <= 1'b0;
      sh_q     <= '0;
    end else begin
      bw_valid <= upd_q2;
      if (upd_q2) begin
        sh_q <= sh_use;
        for (int a = 0; a < N_ANT; a++) begin
          bw[a].re <= ANT_W'(sat(32'(r_re[a] >>> sh_use), ANT_W));
          bw[a].im <= ANT_W'(sat(-(32'(r_im[a] >>> sh_use)), ANT_W));
        end
      end
    end
  end

endmodule

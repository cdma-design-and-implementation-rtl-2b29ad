// weight_estimator: maximal-ratio-combining weights of the Rake fingers.
//
// For each of the four paths found by the peak detector the weight is
//   w_i = b_p * (I_pi - j*Q_pi),
// the conjugate of the path's pilot phasor times the polarity b_p of the
// current pilot bit, so that after multiplication every finger's despread
// symbol lands on the I axis with a gain equal to its path strength. The
// 13-bit phasors are brought to the 6-bit weight format with one common right
// shift (block floating point), chosen so that the largest part fits in 5
// magnitude bits; the ratios between paths are kept. Paths that were not
// found get weight 0, which switches their finger off.
//
// Timing: w and w_valid are registered one clock after start.
// The weight formula is the document's (its Eq. 1); the common normalising
// shift is this design's choice.
module weight_estimator
  import wcdma_pkg::*;
#(
  parameter int NP = N_FINGER
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   start,
  input  peak_t  peaks [NP],
  input  logic   pilot_neg,     // 1: current pilot bit is -1
  output cplx6_t w [NP],
  output logic   w_valid
);

  logic [MFO_W-1:0] maxabs;
  int unsigned      sh;
  cplx6_t           w_n [NP];

  function automatic logic [MFO_W-1:0] absv(input logic signed [MFO_W-1:0] v);
    return v[MFO_W-1] ? MFO_W'(-v) : MFO_W'(v);
  endfunction

  always_comb begin
    maxabs = '0;
    for (int i = 0; i < NP; i++) begin
      if (peaks[i].valid) begin
        if (absv(peaks[i].val.re) > maxabs) maxabs = absv(peaks[i].val.re);
        if (absv(peaks[i].val.im) > maxabs) maxabs = absv(peaks[i].val.im);
      end
    end
    sh = 0;
    for (int b = 0; b < MFO_W; b++) if (maxabs[b]) sh = (b >= 4) ? unsigned'(b - 4) : 0;
    for (int i = 0; i < NP; i++) begin
      logic signed [MFO_W:0] re_s, im_s;
      re_s = (MFO_W+1)'(peaks[i].val.re) >>> sh;
      im_s = (MFO_W+1)'(peaks[i].val.im) >>> sh;
      if (!peaks[i].valid) begin
        w_n[i] = '0;
      end else if (pilot_neg) begin
        w_n[i].re = ANT_W'(sat(32'(-re_s), ANT_W));
        w_n[i].im = ANT_W'(sat(32'(im_s), ANT_W));
      end else begin
        w_n[i].re = ANT_W'(sat(32'(re_s), ANT_W));
        w_n[i].im = ANT_W'(sat(32'(-im_s), ANT_W));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      w       <= '{default: '0};
      w_valid <= 1'b0;
    end else begin
      w_valid <= start;
      if (start) w <= w_n;
    end
  end

endmodule

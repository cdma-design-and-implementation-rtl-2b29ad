// beamformer: linear combiner of the four antenna signals.
//
// Each complex 6-bit antenna sample is multiplied by its complex 6-bit weight
// bw_i (the conjugated spatial signature from the beam searcher) and the four
// products are summed, so signals from the desired direction add in phase.
// The sum is scaled back to 6 bits with saturation (SHIFT right shifts; with
// weights normalised to a largest part of 31 a shift of 7 keeps the combined
// signal at about the level of one antenna). As in the block diagram, a
// "BF enable" multiplexer selects between the combiner and antenna 1 delayed by
// three registers, and the selected signal is registered.
//
// Timing: one sample per clock. Both paths have 4 cycles of latency
// (combiner: product register, sum register, scaled register, output
// register; bypass: three delay registers, output register), so switching the
// beamformer on does not move the symbol timing.
// The 6-bit widths, the three-register bypass and the output register are
// the document's; the pipeline split of the combiner and the scaling are this
// design's choice.
module beamformer
  import wcdma_pkg::*;
#(
  parameter int SHIFT = 7
) (
  input  logic   clk,
  input  logic   rst_n,
  input  cplx6_t ant [N_ANT],   // antenna samples In1..In4
  input  cplx6_t bw  [N_ANT],   // beamformer weights bw1..bw4
  input  logic   bf_en,         // 1: combiner, 0: antenna 1 bypass
  output cplx6_t out
);

  typedef logic signed [12:0] prod_t;

  prod_t              pr_re [N_ANT], pr_im [N_ANT];
  logic signed [14:0] sum_re, sum_im;
  cplx6_t             comb_q;
  cplx6_t             byp [3];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < N_ANT; i++) begin
        pr_re[i] <= '0;
        pr_im[i] <= '0;
      end
      sum_re <= '0;
      sum_im <= '0;
      comb_q <= '0;
      byp    <= '{default: '0};
      out    <= '0;
    end else begin
      for (int i = 0; i < N_ANT; i++) begin
        pr_re[i] <= (13'(ant[i].re) * 13'(bw[i].re)) - (13'(ant[i].im) * 13'(bw[i].im));
        pr_im[i] <= (13'(ant[i].re) * 13'(bw[i].im)) + (13'(ant[i].im) * 13'(bw[i].re));
      end
      sum_re <= 15'(pr_re[0]) + 15'(pr_re[1]) + 15'(pr_re[2]) + 15'(pr_re[3]);
      sum_im <= 15'(pr_im[0]) + 15'(pr_im[1]) + 15'(pr_im[2]) + 15'(pr_im[3]);
      comb_q.re <= ANT_W'(sat(32'(sum_re >>> SHIFT), ANT_W));
      comb_q.im <= ANT_W'(sat(32'(sum_im >>> SHIFT), ANT_W));
      byp[0] <= ant[0];
      byp[1] <= byp[0];
      byp[2] <= byp[1];
      out    <= bf_en ? comb_q : byp[2];
    end
  end

endmodule

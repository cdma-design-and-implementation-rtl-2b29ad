// prefilter: chip-matched running sum in front of the matched filter.
//
// With four samples per chip, the sum of four consecutive samples is the
// output of a filter matched to the rectangular chip. It is kept as a running
// sum: acc <= acc + x[n] - x[n-4], with x[n-4] from a four-register delay line.
// The 8-bit accumulator holds the exact sum of four 6-bit samples; its four
// most significant bits go to the matched filter (4-bit input word length).
//
// Timing: one sample per clock; out is acc, i.e. the sum of the four samples
// presented on the previous four clocks (1 cycle latency). The structure and
// the 6/8/4-bit widths are the document's.
module prefilter
  import wcdma_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  cplx6_t in,
  output cplx4_t out
);

  cplx6_t            dly [SPC];
  logic signed [7:0] acc_re, acc_im;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      dly    <= '{default: '0};
      acc_re <= '0;
      acc_im <= '0;
    end else begin
      dly[0] <= in;
      for (int i = 1; i < SPC; i++) dly[i] <= dly[i-1];
      acc_re <= acc_re + 8'(in.re) - 8'(dly[SPC-1].re);
      acc_im <= acc_im + 8'(in.im) - 8'(dly[SPC-1].im);
    end
  end

  assign out.re = acc_re[7:4];
  assign out.im = acc_im[7:4];

endmodule

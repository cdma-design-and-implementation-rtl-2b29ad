// phase_derotator: removes the carrier phase from the beamformer output.
//
// The complex 6-bit input is multiplied by the NCO phasor (cos, sin), which the
// NCO already gives as exp(-j*theta) with 31 standing for 1.0; the product is
// scaled by 2**-5 and saturated to 6 bits. An "enable_message" multiplexer
// selects the de-rotated signal (carrier loop closed) or the input delayed by
// two registers (loop open, during the preamble and initial estimation). The
// result feeds the Rake receiver and the pre-filter of the channel estimator.
//
// Timing: one sample per clock, 2 cycles of latency on both paths; the output
// comes straight from the multiplexer, as in the block diagram. The bypass of
// two registers and the 6-bit widths are the document's; the rounding is this
// design's choice (truncation).
module phase_derotator
  import wcdma_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  cplx6_t                  in,
  input  logic signed [ANT_W-1:0] nco_cos,
  input  logic signed [ANT_W-1:0] nco_sin,
  input  logic                    en_msg,
  output cplx6_t                  out
);

  logic signed [12:0] p_re, p_im;
  cplx6_t             rot_q, byp0, byp1;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      p_re  <= '0;
      p_im  <= '0;
      rot_q <= '0;
      byp0  <= '0;
      byp1  <= '0;
    end else begin
      p_re     <= (13'(in.re) * 13'(nco_cos)) - (13'(in.im) * 13'(nco_sin));
      p_im     <= (13'(in.re) * 13'(nco_sin)) + (13'(in.im) * 13'(nco_cos));
      rot_q.re <= ANT_W'(sat(32'(p_re >>> 5), ANT_W));
      rot_q.im <= ANT_W'(sat(32'(p_im >>> 5), ANT_W));
      byp0     <= in;
      byp1     <= byp0;
    end
  end

  assign out = en_msg ? rot_q : byp1;

endmodule

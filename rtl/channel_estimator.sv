// channel_estimator: multipath delay profile and Rake weights from the pilot.
//
// The de-rotated (or, while the carrier loop is open, raw) 6-bit signal runs
// through the pre-filter (sum of four samples), the 1024-tap complex matched
// filter correlating with the pilot or preamble code, and the magnitude unit.
// The peak detector picks the four largest local maxima above a threshold
// (threshold coefficient times the average magnitude) in each 1024-sample
// symbol period and reports their delays delta_i and phasors (I_pi, Q_pi);
// the weight estimator turns the phasors into Rake weights w_i. The strongest
// phasor (I_p0, Q_p0) drives the carrier recovery loop, the preamble
// signature detector and, as the detected pilot symbol, the outside world.
//
// A free-running counter numbers the input samples 0..1023 (sample_pos). A
// peak's pos is the number of the last input sample of the symbol it
// correlates, corrected for the PIPE_LAT clocks of pre-filter, matched filter
// and magnitude pipeline, so a Rake finger for that path must dump on the
// sample whose sample_pos equals the peak's pos.
//
// Timing: one sample per clock; est_valid pulses once per symbol period with
// new peaks; w_valid follows one clock later. The block structure is the
// document's; the counter, the latency correction and the symbol framing are
// this design's choice.
module channel_estimator
  import wcdma_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cplx6_t           in,
  input  qcode_t           code [CHIPS],
  input  logic [7:0]       thr_coef,
  input  logic             pilot_neg,
  output logic [POS_W-1:0] sample_pos,
  output cplx13_t          mf_out,
  output logic [MFO_W-1:0] mf_mag,
  output logic [MFO_W-1:0] avg_mag,
  output peak_t            peaks [N_FINGER],
  output logic             est_valid,
  output cplx6_t           w [N_FINGER],
  output logic             w_valid
);

  // clocks from a sample at `in` to its effect on mf_mag:
  // pre-filter 1, delay line 1, two adder stages 2, magnitude 1
  localparam int PIPE_LAT = 5;

  cplx4_t           pf_out;
  cplx13_t          mf_d1;
  logic [POS_W-1:0] pd_pos;
  logic             sym_end;
  logic [MFO_W-1:0] thr;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sample_pos <= '0;
      mf_d1      <= '0;
    end else begin
      sample_pos <= sample_pos + 1'b1;
      mf_d1      <= mf_out;
    end
  end

  assign pd_pos  = sample_pos - POS_W'(PIPE_LAT);
  assign sym_end = (pd_pos == '1);

  prefilter u_pf (.clk, .rst_n, .in, .out(pf_out));

  matched_filter u_mf (.clk, .rst_n, .in(pf_out), .code, .out(mf_out));

  magnitude u_mag (.clk, .rst_n, .in(mf_out), .mag(mf_mag));

  peak_threshold u_thr (
    .clk, .rst_n, .mag(mf_mag), .sym_end, .thr_coef, .avg(avg_mag), .thr
  );

  peak_detector u_pd (
    .clk, .rst_n, .mag(mf_mag), .val(mf_d1), .pos(pd_pos), .sym_end, .thr,
    .peaks, .est_valid
  );

  weight_estimator u_we (
    .clk, .rst_n, .start(est_valid), .peaks, .pilot_neg, .w, .w_valid
  );

endmodule

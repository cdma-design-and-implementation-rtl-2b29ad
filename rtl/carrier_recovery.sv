// carrier_recovery: carrier phase/frequency acquisition and tracking loop.
//
// Works on the phasor of the strongest matched filter peak (I_p0, Q_p0),
// delivered once per 1024-sample symbol by the channel estimator, and drives
// the de-rotation phasor for the beamformer output at sample rate.
//
// Acquisition (en_msg = 0, loop open). The phase-average path forms the
// differential phasor d = p_k * conj(p_(k-1)) of consecutive peaks, flips it
// onto the right half plane (this removes the +-1 modulation of the preamble
// and pilot bits, valid for offsets below a quarter turn per symbol) and
// averages it with a leaky accumulator (17 bits, time constant 16 symbols)
// while preamble_det is low. Its atan is the Initial Freq, the phase advance
// per symbol. The direct path gives atan(p_k) plus 0 or pi by the polarity of
// the current pilot/preamble bit, the Last Phase. One atan ROM serves both
// paths, selected by atan_mode on consecutive clocks.
// The Initial Phase is Last Phase + 4 * Initial Freq.
//
// Tracking (en_msg = 1, loop closed). On the rising edge of en_msg the NCO
// is loaded with the Initial Phase and the loop filter integrator with the
// Initial Freq. Then every symbol the phase detector takes atan of the peak
// of the de-rotated signal, plus pi for a negative pilot bit (a
// decision-directed detector on the known pilot), as the phase error; the
// proportional-integral loop filter updates the NCO increment.
//
// Timing: pk_valid is a one-clock strobe with pk; the atan result is ready one
// clock later, the averaged one two clocks later; lf_upd pulses when the loop
// filter is updated. The structure, the 0/pi correction, the factor 4 and the
// 13/17/9/11/18/19/20/28-bit widths are the document's; the differential
// phasor, the leaky average and the half-plane flip are this design's
// reading of "an average of the phase difference between two consecutive
// symbols".
module carrier_recovery
  import wcdma_pkg::*;
#(
  parameter int DIFF_SHIFT = 10,   // scaling of the differential phasor to 13 bits
  parameter int AVG_SHIFT  = 4,    // leaky average time constant 2**AVG_SHIFT symbols
  parameter int EXTRAP     = 4     // Initial Phase = Last Phase + EXTRAP * Initial Freq
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    pk_valid,
  input  logic                    pk_ok,         // a peak was found this symbol
  input  cplx13_t                 pk,
  input  logic                    pol_neg,       // current pilot/preamble bit is -1
  input  logic                    preamble_det,  // stop frequency averaging
  input  logic                    en_msg,        // close the loop
  input  logic [6:0]              c1,
  input  logic [1:0]              c2,
  output logic signed [ANT_W-1:0] nco_cos,
  output logic signed [ANT_W-1:0] nco_sin,
  output logic signed [PH_W-1:0]  phase_err,
  output logic signed [PH_W-1:0]  init_freq,
  output logic        [PH_W-1:0]  last_phase,
  output logic        [PH_W-1:0]  init_phase,
  output logic        [NCO_W-1:0] nco_phase,
  output logic                    lf_upd
);

  localparam int DW = 2 * MFO_W + 1;

  cplx13_t                 pk_prev;
  logic signed [DW-1:0]    d_re, d_im;
  logic signed [MFO_W-1:0] d13_re, d13_im;
  logic signed [COR_W-1:0] avg_re, avg_im;
  logic                    atan_mode;            // 0: direct path, 1: averaged path
  logic signed [COR_W-1:0] at_re, at_im;
  logic [PH_W-1:0]         angle;
  logic                    st1, st2, st1_ok, st1_pol;
  logic                    en_msg_d;
  logic                    load;
  logic signed [PH_W-1:0]  err_n;
  logic signed [LF_OUT_W-1:0] lf_out;

  // differential phasor of consecutive peaks, flipped to Re >= 0
  always_comb begin
    logic signed [DW-1:0] r, i;
    r = DW'(pk.re) * DW'(pk_prev.re) + DW'(pk.im) * DW'(pk_prev.im);
    i = DW'(pk.im) * DW'(pk_prev.re) - DW'(pk.re) * DW'(pk_prev.im);
    d_re   = r[DW-1] ? -r : r;
    d_im   = r[DW-1] ? -i : i;
    d13_re = MFO_W'(sat(32'(d_re >>> DIFF_SHIFT), MFO_W));
    d13_im = MFO_W'(sat(32'(d_im >>> DIFF_SHIFT), MFO_W));
  end

  assign atan_mode = st1;
  assign at_re = atan_mode ? avg_re : COR_W'(pk.re);
  assign at_im = atan_mode ? avg_im : COR_W'(pk.im);

  atan_rom #(.W(COR_W)) u_atan (.clk, .rst_n, .x_re(at_re), .x_im(at_im), .angle);

  assign err_n      = PH_W'(angle + (st1_pol ? PH_W'(1024) : PH_W'(0)));
  assign init_phase = last_phase + PH_W'(EXTRAP) * PH_W'(init_freq);
  assign load       = en_msg && !en_msg_d;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pk_prev    <= '0;
      avg_re     <= '0;
      avg_im     <= '0;
      st1        <= 1'b0;
      st2        <= 1'b0;
      st1_ok     <= 1'b0;
      st1_pol    <= 1'b0;
      en_msg_d   <= 1'b0;
      phase_err  <= '0;
      init_freq  <= '0;
      last_phase <= '0;
      lf_upd     <= 1'b0;
    end else begin
      en_msg_d <= en_msg;
      st1      <= pk_valid;
      st2      <= st1 && !preamble_det && !en_msg;
      st1_ok   <= pk_ok;
      st1_pol  <= pol_neg;
      lf_upd   <= 1'b0;
      if (pk_valid && pk_ok) begin
        pk_prev <= pk;
        if (!preamble_det && !en_msg) begin
          avg_re <= avg_re - (avg_re >>> AVG_SHIFT) + COR_W'(d13_re);
          avg_im <= avg_im - (avg_im >>> AVG_SHIFT) + COR_W'(d13_im);
        end
      end
      if (st1 && st1_ok) begin
        if (en_msg) begin
          phase_err <= err_n;
          lf_upd    <= 1'b1;
        end else begin
          last_phase <= err_n;
        end
      end
      if (st2) init_freq <= angle;
    end
  end

  loop_filter u_lf (
    .clk, .rst_n, .upd(lf_upd), .err(phase_err), .c1, .c2, .load,
    .load_val(LF_INT_W'(init_freq) <<< 7), .lf_out
  );

  nco u_nco (
    .clk, .rst_n, .load, .load_phase(init_phase), .freq(lf_out),
    .phase(nco_phase), .cos_o(nco_cos), .sin_o(nco_sin)
  );

endmodule

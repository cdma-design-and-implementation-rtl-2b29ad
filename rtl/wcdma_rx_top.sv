// wcdma_rx_top: WCDMA uplink base-station baseband receiver (PRACH and DPCH).
//
// Datapath, one complex sample per clock at four samples per chip:
//   antennas -> beamformer (or antenna 1 bypass) -> phase de-rotator (or
//   bypass) -> channel estimator and Rake receiver.
// The channel estimator correlates with the preamble code while searching and
// with the pilot code afterwards; its strongest peak feeds the preamble
// signature detector, the carrier recovery loop (which drives the
// de-rotator's NCO) and, through delta_0, the beam searcher (which sets the
// beamformer weights). Its four peaks give the Rake fingers their delays and
// maximal-ratio weights. The controller sequences SEARCH (preamble
// detection, open loop), INIT (signature and phase measurement on the
// pilot) and MESSAGE (beamformer on, loop closed, Rake decisions valid).
//
// Interface: ant are the four antennas' 6-bit I/Q samples; the codes are
// configuration: pre_code and pilot_code as QPSK phase indices per chip,
// data_code as real chips (1 = -1) over one 256-chip period, signature the
// 16-bit preamble signature and pilot_seq the pilot bit pattern (bit 1 = -1).
// dec_valid marks each Rake decision (soft_dec, hard_dec). est_valid marks the
// once-per-symbol channel estimate (peaks, Rake weights w, pilot symbol
// dpcch). agc_level, the average matched filter magnitude, is offered to an
// external AGC. The RF/IF module, converters, AGC and channel decoder are
// outside this block.
// The block structure and connections are the document's; the controller,
// code generator and the detailed timing are this design's choice.
module wcdma_rx_top
  import wcdma_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  cplx6_t             ant [N_ANT],
  input  qcode_t             pre_code [CHIPS],
  input  qcode_t             pilot_code [CHIPS],
  input  logic [CHIPS-1:0]   data_code,
  input  logic [SIG_LEN-1:0] signature,
  input  logic [SIG_LEN-1:0] pilot_seq,
  input  logic [3:0]         sf_log2,
  input  logic [7:0]         thr_coef,
  input  logic [6:0]         c1,
  input  logic [1:0]         c2,
  input  logic [N_FINGER-1:0] finger_en,
  input  logic               bf_allow,
  input  logic [3:0]         init_syms,
  output logic signed [3:0]  soft_dec,
  output logic               hard_dec,
  output logic               dec_valid,
  output logic               raq,
  output logic               raq_inverted,
  output logic signed [5:0]  pre_corr,
  output logic [1:0]         mode,
  output logic               est_valid,
  output peak_t              peaks [N_FINGER],
  output cplx6_t             w [N_FINGER],
  output cplx6_t             bw [N_ANT],
  output logic signed [MFO_W-1:0] dpcch,
  output logic signed [PH_W-1:0]  phase_err,
  output logic               lf_upd,
  output logic [MFO_W-1:0]   agc_level
);

  rx_mode_t         mode_s;
  logic             preamble_det, en_msg, bf_en, bs_acq, bs_en, use_pilot, pilot_neg;
  cplx6_t           bf_out, rot_out;
  logic signed [ANT_W-1:0] nco_cos, nco_sin;
  qcode_t           mf_code [CHIPS];
  logic [POS_W-1:0] sample_pos;
  cplx13_t          mf_out;
  logic [MFO_W-1:0] mf_mag;
  logic             w_valid;
  logic             bw_valid;
  logic signed [PH_W-1:0] init_freq;
  logic [PH_W-1:0]  last_phase, init_phase;
  logic [NCO_W-1:0] nco_phase;

  // path delays and enables for the Rake, taken with each new estimate
  logic [POS_W-1:0]    delay [N_FINGER];
  logic [N_FINGER-1:0] path_ok;
  logic                rake_code [N_FINGER], rake_dump [N_FINGER], combine;
  qcode_t              bs_code;
  logic                bs_dump;
  logic                dec_v;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      delay   <= '{default: '0};
      path_ok <= '0;
    end else if (est_valid) begin
      for (int f = 0; f < N_FINGER; f++) begin
        delay[f]   <= peaks[f].pos;
        path_ok[f] <= peaks[f].valid;
      end
    end
  end

  always_comb begin
    for (int k = 0; k < CHIPS; k++) mf_code[k] = use_pilot ? pilot_code[k] : pre_code[k];
  end

  rx_controller u_ctrl (
    .clk, .rst_n, .restart, .raq, .sym_valid(est_valid), .bf_allow, .init_syms,
    .pilot_seq, .mode(mode_s), .preamble_det, .en_msg, .bf_en, .bs_acq, .bs_en,
    .use_pilot, .pilot_neg
  );

  beamformer u_bf (.clk, .rst_n, .ant, .bw, .bf_en, .out(bf_out));

  phase_derotator u_rot (
    .clk, .rst_n, .in(bf_out), .nco_cos, .nco_sin, .en_msg, .out(rot_out)
  );

  channel_estimator u_ce (
    .clk, .rst_n, .in(rot_out), .code(mf_code), .thr_coef, .pilot_neg,
    .sample_pos, .mf_out, .mf_mag, .avg_mag(agc_level), .peaks, .est_valid,
    .w, .w_valid
  );

  carrier_recovery u_cr (
    .clk, .rst_n, .pk_valid(est_valid), .pk_ok(peaks[0].valid), .pk(peaks[0].val),
    .pol_neg(pilot_neg), .preamble_det, .en_msg, .c1, .c2, .nco_cos, .nco_sin,
    .phase_err, .init_freq, .last_phase, .init_phase, .nco_phase, .lf_upd
  );

  preamble_detector u_pre (
    .clk, .rst_n, .en(mode_s == MODE_SEARCH), .sym_valid(est_valid),
    .ip0(peaks[0].val.re), .signature, .corr(pre_corr), .raq, .inverted(raq_inverted)
  );

  code_generator u_cg (
    .sample_pos, .delay, .finger_en(finger_en & path_ok), .sf_log2, .data_code,
    .pilot_code, .delta0(peaks[0].pos), .rake_code, .rake_dump, .combine,
    .bs_code, .bs_dump
  );

  beam_searcher u_bs (
    .clk, .rst_n, .ant, .code(bs_code), .dump(bs_dump), .pol_neg(pilot_neg),
    .acq(bs_acq), .en(bs_en), .bw, .bw_valid
  );

  rake_receiver u_rake (
    .clk, .rst_n, .in(rot_out), .code(rake_code), .dump(rake_dump), .combine,
    .sf_log2, .w, .finger_en(finger_en & path_ok), .soft_dec, .hard_dec,
    .dec_valid(dec_v)
  );

  assign dec_valid = dec_v && en_msg;
  assign mode      = mode_s;
  assign dpcch     = peaks[0].val.re;

endmodule

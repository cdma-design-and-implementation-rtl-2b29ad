// rx_controller: operating phases of the receiver.
//
// SEARCH: the channel estimator correlates antenna 1 with the preamble code,
// the beamformer and the Rake are idle and the carrier loop is open while the
// frequency offset is averaged. A random access request (raq) moves to INIT:
// the matched filter switches to the pilot code, the frequency average is
// frozen (preamble_det), the Last Phase follows the pilot, and the beam
// searcher measures the spatial signature (bs_acq). After init_syms symbols
// the receiver enters MESSAGE: the beamformer is switched in (if bf_allow),
// the carrier loop is closed (en_msg) and the beam searcher and channel
// estimator keep tracking. restart returns to SEARCH.
// The pilot bit polarity is taken from the repeating 16-symbol pattern
// pilot_seq, indexed by the number of symbols estimated since the request
// (pilot_neg); bit value 1 means a -1 pilot symbol.
//
// Timing: sym_valid is the channel estimator's once-per-symbol strobe; the
// mode changes on the clock after the strobe or raq. The phases and the named
// control signals follow the document's description of the receiver; the
// state machine, the INIT length and the pilot indexing are this design's
// choice.
module rx_controller
  import wcdma_pkg::*;
(
  input  logic               clk,
  input  logic               rst_n,
  input  logic               restart,
  input  logic               raq,
  input  logic               sym_valid,
  input  logic               bf_allow,
  input  logic [3:0]         init_syms,
  input  logic [SIG_LEN-1:0] pilot_seq,
  output rx_mode_t           mode,
  output logic               preamble_det,
  output logic               en_msg,
  output logic               bf_en,
  output logic               bs_acq,
  output logic               bs_en,
  output logic               use_pilot,
  output logic               pilot_neg
);

  logic [3:0] sym_cnt;
  logic [3:0] pilot_idx;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mode      <= MODE_SEARCH;
      sym_cnt   <= '0;
      pilot_idx <= '0;
    end else if (restart) begin
      mode      <= MODE_SEARCH;
      sym_cnt   <= '0;
      pilot_idx <= '0;
    end else begin
      unique case (mode)
        MODE_SEARCH: begin
          if (raq) begin
            mode      <= MODE_INIT;
            sym_cnt   <= '0;
            pilot_idx <= '0;
          end
        end
        MODE_INIT: begin
          if (sym_valid) begin
            pilot_idx <= pilot_idx + 4'd1;
            sym_cnt   <= sym_cnt + 4'd1;
            if (sym_cnt + 4'd1 >= init_syms) mode <= MODE_MESSAGE;
          end
        end
        default: begin
          if (sym_valid) pilot_idx <= pilot_idx + 4'd1;
        end
      endcase
    end
  end

  assign preamble_det = (mode != MODE_SEARCH);
  assign use_pilot    = (mode != MODE_SEARCH);
  assign en_msg       = (mode == MODE_MESSAGE);
  assign bf_en        = en_msg && bf_allow;
  assign bs_acq       = (mode == MODE_INIT);
  assign bs_en        = (mode != MODE_SEARCH);
  assign pilot_neg    = use_pilot && pilot_seq[pilot_idx];

endmodule

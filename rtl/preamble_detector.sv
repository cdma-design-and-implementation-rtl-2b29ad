// preamble_detector: PRACH preamble signature detector.
//
// A random access preamble repeats one 16-bit signature, one bit per 256-chip
// symbol, on the preamble code. After the matched filter, each symbol gives a
// peak whose I part, I_p0, carries the signature bit. The detector keeps the
// signs of the last 16 I_p0 values and correlates them with the signature:
// corr = sum over k of (+1 if the sign matches bit k, else -1), k = 0 the
// first transmitted bit. Because the carrier phase is unknown before
// acquisition, the received signs may be all inverted, so a random access
// request (raq) is flagged when |corr| >= RAQ_THR; inverted tells which
// polarity matched. Signature bit value 1 stands for a -1 symbol.
//
// Timing: sym_valid is the once-per-symbol strobe with ip0; corr, raq and
// inverted are registered one clock later, raq as a one-clock pulse. Only
// enabled symbols (en high) are taken in. Matching the signs of I_p0 against
// the 16-bit signature is the document's; the correlation score and the
// threshold are this design's choice.
module preamble_detector
  import wcdma_pkg::*;
#(
  parameter int RAQ_THR = 15
) (
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic                    en,
  input  logic                    sym_valid,
  input  logic signed [MFO_W-1:0] ip0,
  input  logic [SIG_LEN-1:0]      signature,
  output logic signed [5:0]       corr,
  output logic                    raq,
  output logic                    inverted
);

  logic [SIG_LEN-1:0] hist, hist_n;   // hist[SIG_LEN-1] is the newest sign
  logic signed [5:0]  c_n;
  logic [4:0]         seen;           // symbols taken in, saturating at 16

  always_comb begin
    hist_n = {ip0[MFO_W-1], hist[SIG_LEN-1:1]};
    c_n = '0;
    for (int k = 0; k < SIG_LEN; k++) c_n = c_n + ((hist_n[k] == signature[k]) ? 6'sd1 : -6'sd1);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hist     <= '0;
      corr     <= '0;
      raq      <= 1'b0;
      inverted <= 1'b0;
      seen     <= '0;
    end else begin
      raq <= 1'b0;
      if (!en) begin
        seen <= '0;
      end else if (sym_valid) begin
        hist <= hist_n;
        corr <= c_n;
        if (seen != 5'd16) seen <= seen + 5'd1;
        if (seen >= 5'd15 && (c_n >= 6'(RAQ_THR) || c_n <= -6'(RAQ_THR))) begin
          raq      <= 1'b1;
          inverted <= c_n[5];
        end
      end
    end
  end

endmodule

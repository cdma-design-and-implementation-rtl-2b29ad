// peak_threshold: adaptive detection threshold of the peak detector.
//
// Sums the matched filter magnitude over one symbol period (2**LOG2_LEN
// samples) to form its average, the "AVG" block, and multiplies the average
// by the threshold coefficient thr_coef (unsigned, THR_FRAC fractional bits).
// Peaks below the result are treated as noise and discarded. The average is
// also offered as a level indication for the external AGC.
//
// Timing: sym_end marks the last sample of a symbol period; the clock after
// it, avg and thr take their new values and hold them for the next period.
// That the threshold is the product of the average magnitude and a
// coefficient is the document's; the window, the fraction bits and the
// saturation are this design's choice.
module peak_threshold
  import wcdma_pkg::*;
#(
  parameter int LOG2_LEN = POS_W,
  parameter int THR_FRAC = 4
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MFO_W-1:0] mag,
  input  logic             sym_end,
  input  logic [7:0]       thr_coef,
  output logic [MFO_W-1:0] avg,
  output logic [MFO_W-1:0] thr
);

  localparam int ACC_W = MFO_W + LOG2_LEN;

  logic [ACC_W-1:0]   acc, acc_next;
  logic [MFO_W-1:0]   avg_next;
  logic [MFO_W+7:0]   prod;

  always_comb begin
    acc_next = acc + ACC_W'(mag);
    avg_next = MFO_W'(acc_next >> LOG2_LEN);
    prod     = ((MFO_W+8)'(avg_next) * (MFO_W+8)'(thr_coef)) >> THR_FRAC;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      acc <= '0;
      avg <= '0;
      thr <= '1;
    end else if (sym_end) begin
      acc <= '0;
      avg <= avg_next;
      thr <= (prod > (MFO_W+8)'({MFO_W{1'b1}})) ? {MFO_W{1'b1}} : MFO_W'(prod);
    end else begin
      acc <= acc_next;
    end
  end

endmodule

// peak_detector: finds the four strongest propagation paths in each symbol.
//
// Scans the matched filter magnitude sample by sample. A sample is a peak
// candidate when it is a local maximum (not below the previous sample and
// above the next one) and exceeds the threshold; candidates are kept in a list
// of four entries sorted by magnitude, by insertion. At the end of each symbol
// period the list is published: entry 0 is the most significant path (its
// phasor is I_p0, Q_p0 and its delay delta_0), invalid entries have
// valid = 0, and the list is cleared for the next period.
//
// Inputs: mag and val are the magnitude and phasor of the sample whose delay
// is pos (the CE aligns pos to the symbol's last input sample); sym_end marks
// the last sample of the period. Timing: est_valid pulses for one clock, two
// clocks after sym_end, together with new peaks.
// Four peaks per symbol and the threshold test are the document's; the
// local-maximum test (so that one wide correlation peak is not taken four
// times) and the sorted insertion are this design's choice.
module peak_detector
  import wcdma_pkg::*;
#(
  parameter int NP = N_FINGER
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [MFO_W-1:0] mag,
  input  cplx13_t          val,
  input  logic [POS_W-1:0] pos,
  input  logic             sym_end,
  input  logic [MFO_W-1:0] thr,
  output peak_t            peaks [NP],
  output logic             est_valid
);

  logic [MFO_W-1:0] mag_d1, mag_d2;
  cplx13_t          val_d1;
  logic [POS_W-1:0] pos_d1;
  logic             end_d1;
  peak_t            list [NP];
  peak_t            list_ins [NP];
  logic             cand;
  peak_t            cp;

  always_comb begin
    cand     = (mag_d1 > thr) && (mag_d1 >= mag_d2) && (mag_d1 > mag);
    cp.valid = 1'b1;
    cp.pos   = pos_d1;
    cp.mag   = mag_d1;
    cp.val   = val_d1;
    // sorted insertion of the candidate
    list_ins = list;
    if (cand) begin
      for (int i = 0; i < NP; i++) begin
        if (!list[i].valid || list[i].mag < mag_d1) begin
          list_ins[i] = cp;
          for (int j = i + 1; j < NP; j++) list_ins[j] = list[j-1];
          break;
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mag_d1    <= '0;
      mag_d2    <= '0;
      val_d1    <= '0;
      pos_d1    <= '0;
      end_d1    <= 1'b0;
      list      <= '{default: '0};
      peaks     <= '{default: '0};
      est_valid <= 1'b0;
    end else begin
      mag_d1    <= mag;
      mag_d2    <= mag_d1;
      val_d1    <= val;
      pos_d1    <= pos;
      end_d1    <= sym_end;
      est_valid <= end_d1;
      if (end_d1) begin
        peaks <= list_ins;
        list  <= '{default: '0};
      end else begin
        list  <= list_ins;
      end
    end
  end

endmodule

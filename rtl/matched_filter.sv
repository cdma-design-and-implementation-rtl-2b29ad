// matched_filter: complex matched filter of the channel estimator.
//
// Correlates the pre-filtered signal with a 256-chip code at every sample:
//   y[n] = sum_k conj(c[k]) * x[n - STEP*(CHIPS-1-k)],
// with c[0] the first chip of the symbol. The taps come from a 1024-tap delay
// line (mf_delay_line), one per chip, and each of the 256 "complex
// multipliers" is a multiplication by the conjugate of a QPSK code chip j**k,
// i.e. a swap and/or negation of the 4-bit parts. The code chips are given as
// 2-bit phase indices (see wcdma_pkg::qcode_t), which covers real codes (+-1),
// codes on the quadrature branch (+-j) and the four-phase PRACH preamble code.
// The 256 products are summed in two pipelined stages (16 partial sums of 16,
// then the total) into the 13-bit output. A peak appears once per symbol per
// propagation path, 1024 samples apart.
//
// Timing: one sample per clock; out is registered and shows the correlation
// whose newest sample was presented at in three clocks earlier.
// The 1024-tap line, the 256 multipliers, the adder and the 4-bit input and
// 13-bit output widths are the document's; the code encoding and the adder
// pipeline are this design's choice.
module matched_filter
  import wcdma_pkg::*;
#(
  parameter int CHIPS_P = CHIPS,
  parameter int STEP    = SPC
) (
  input  logic    clk,
  input  logic    rst_n,
  input  cplx4_t  in,
  input  qcode_t  code [CHIPS_P],
  output cplx13_t out
);

  localparam int GROUP = 16;
  localparam int NGRP  = (CHIPS_P + GROUP - 1) / GROUP;

  cplx4_t tap [CHIPS_P];

  mf_delay_line #(.TAPS(CHIPS_P * STEP), .STEP(STEP)) u_line (
    .clk, .rst_n, .en(1'b1), .in, .tap
  );

  logic signed [MFO_W-1:0] part_re [NGRP], part_im [NGRP];
  logic signed [MFO_W-1:0] grp_re  [NGRP], grp_im  [NGRP];

  always_comb begin
    for (int g = 0; g < NGRP; g++) begin
      grp_re[g] = '0;
      grp_im[g] = '0;
      for (int j = 0; j < GROUP; j++) begin
        if (g * GROUP + j < CHIPS_P) begin
          grp_re[g] = grp_re[g] + MFO_W'(despread_re(tap[CHIPS_P-1-(g*GROUP+j)], code[g*GROUP+j]));
          grp_im[g] = grp_im[g] + MFO_W'(despread_im(tap[CHIPS_P-1-(g*GROUP+j)], code[g*GROUP+j]));
        end
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      part_re <= '{default: '0};
      part_im <= '{default: '0};
      out     <= '0;
    end else begin
      part_re <= grp_re;
      part_im <= grp_im;
      out.re  <= sum_parts(part_re);
      out.im  <= sum_parts(part_im);
    end
  end

  function automatic logic signed [MFO_W-1:0] sum_parts(input logic signed [MFO_W-1:0] p [NGRP]);
    logic signed [MFO_W-1:0] s;
    s = '0;
    for (int g = 0; g < NGRP; g++) s = s + p[g];
    return s;
  endfunction

endmodule

// rake_receiver: four-finger Rake receiver with maximal ratio combining.
//
// Each finger despreads the de-rotated complex signal with its own code
// timing (code_i and dump_i come from the code generator, placed on the path
// delay delta_i): two rake_correlator branches, I and Q. "Bit selection" keeps
// six bits of each 17-bit result: a right shift by log2(SF) + 2 (SF chips of
// four samples) with saturation, so a despread symbol has the amplitude of
// one input sample. The 6-bit results are registered per finger. The combiner
// forms Re(y_i * w_i) = y_i.re*w_i.re - y_i.im*w_i.im for each finger
// (13 bits), which rotates every path onto the I axis and weights it by its
// strength, adds the enabled fingers and keeps a 4-bit soft decision (soft_dec)
// (OUT_SHIFT right shifts, saturated). The hard decision (hard_dec) is its sign bit
// (1 means the symbol -1).
//
// combine marks the moment when every enabled finger holds its result for
// the same data symbol (the code generator places it half a data symbol after
// the strongest finger's dump); the combiner uses the registered finger
// results three clocks later, matching the correlator latency.
// finger_en switches fingers off.
// Timing: soft_dec, hard_dec and dec_valid are registered, 4 clocks after combine.
// The correlator, bit selection, 6/13/4-bit widths and the four fingers are
// the document's; the I/Q branch pair, the combine alignment and the output
// scaling are this design's choice.
module rake_receiver
  import wcdma_pkg::*;
#(
  parameter int NF        = N_FINGER,
  parameter int OUT_SHIFT = 7
) (
  input  logic        clk,
  input  logic        rst_n,
  input  cplx6_t      in,
  input  logic        code [NF],
  input  logic        dump [NF],
  input  logic        combine,
  input  logic [3:0]  sf_log2,     // log2 of the spreading factor, 2..8
  input  cplx6_t      w [NF],
  input  logic [NF-1:0] finger_en,
  output logic signed [3:0] soft_dec,
  output logic        hard_dec,
  output logic        dec_valid
);

  logic signed [COR_W-1:0] c_re [NF], c_im [NF];
  logic                    c_vr [NF], c_vi [NF];
  cplx6_t                  y [NF];
  logic [2:0]              comb_d;

  for (genvar f = 0; f < NF; f++) begin : g_finger
    rake_correlator u_cre (
      .clk, .rst_n, .in(in.re), .code(code[f]), .dump(dump[f]),
      .out(c_re[f]), .out_valid(c_vr[f])
    );
    rake_correlator u_cim (
      .clk, .rst_n, .in(in.im), .code(code[f]), .dump(dump[f]),
      .out(c_im[f]), .out_valid(c_vi[f])
    );

    always_ff @(posedge clk or negedge rst_n) begin
      if (!rst_n) begin
        y[f] <= '0;
      end else if (c_vr[f] && c_vi[f]) begin
        y[f].re <= ANT_W'(sat(32'(c_re[f] >>> (sf_log2 + 4'd2)), ANT_W));
        y[f].im <= ANT_W'(sat(32'(c_im[f] >>> (sf_log2 + 4'd2)), ANT_W));
      end
    end
  end

  logic signed [15:0] acc;

  always_comb begin
    acc = '0;
    for (int f = 0; f < NF; f++) begin
      if (finger_en[f]) begin
        acc = acc + 16'((13'(y[f].re) * 13'(w[f].re)) - (13'(y[f].im) * 13'(w[f].im)));
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comb_d     <= '0;
      soft_dec       <= '0;
      hard_dec       <= 1'b0;
      dec_valid <= 1'b0;
    end else begin
      comb_d     <= {comb_d[1:0], combine};
      dec_valid <= comb_d[2];
      if (comb_d[2]) begin
        soft_dec <= 4'(sat(32'(acc >>> OUT_SHIFT), 4));
        hard_dec <= acc[15];
      end
    end
  end

endmodule

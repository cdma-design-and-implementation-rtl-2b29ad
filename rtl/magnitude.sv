// magnitude: envelope of the complex matched filter output.
//
// Computes floor(sqrt(I*I + Q*Q)) exactly with a bit-serial restoring square
// root, unrolled into combinational logic (13 iterations for the 26-bit sum of
// squares), and registers the 13-bit result. The peak detector and the
// threshold averager work on this value.
//
// Timing: one sample per clock, 1 cycle of latency. The document names the
// operation sqrt(I*I+Q*Q); the exact integer square root is this design's
// choice of how to compute it.
module magnitude
  import wcdma_pkg::*;
(
  input  logic             clk,
  input  logic             rst_n,
  input  cplx13_t          in,
  output logic [MFO_W-1:0] mag
);

  localparam int SQ_W = 2 * MFO_W;

  function automatic logic [MFO_W-1:0] isqrt(input logic [SQ_W-1:0] v);
    logic [SQ_W-1:0] rem, root, trial;
    rem  = v;
    root = '0;
    for (int b = MFO_W - 1; b >= 0; b--) begin
      trial = (root << (b + 1)) | (SQ_W'(1) << (2 * b));
      if (rem >= trial) begin
        rem  = rem - trial;
        root = root | (SQ_W'(1) << b);
      end
    end
    return MFO_W'(root);
  endfunction

  logic [SQ_W-1:0] sq;

  always_comb begin
    sq = SQ_W'(unsigned'(32'(in.re) * 32'(in.re))) + SQ_W'(unsigned'(32'(in.im) * 32'(in.im)));
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) mag <= '0;
    else        mag <= isqrt(sq);
  end

endmodule

// rake_correlator: integrate-and-dump PN despreader of one Rake finger branch.
//
// The 6-bit input sample and its 1-bit code chip (0: +1, 1: -1) are
// registered; the "PN coder" applies the code (a 7-bit signed value) and a
// 17-bit accumulator sums the coded samples. When dump is given with the last
// sample of a symbol, that sample is still added, the total is moved to the
// output register and the accumulator restarts from zero, so consecutive
// symbols are despread back to back. 17 bits hold a full 256-chip symbol at
// four samples per chip.
//
// Timing: out and out_valid change two clocks after the dump sample is
// presented; out holds its value until the next dump. The structure and the
// 6/7/17-bit widths are the document's.
module rake_correlator
  import wcdma_pkg::*;
(
  input  logic                    clk,
  input  logic                    rst_n,
  input  logic signed [ANT_W-1:0] in,
  input  logic                    code,
  input  logic                    dump,
  output logic signed [COR_W-1:0] out,
  output logic                    out_valid
);

  logic signed [ANT_W-1:0] in_q;
  logic                    code_q, dump_q;
  logic signed [ANT_W:0]   coded;
  logic signed [COR_W-1:0] acc, sum;

  assign coded = code_q ? -(ANT_W+1)'(in_q) : (ANT_W+1)'(in_q);
  assign sum   = acc + COR_W'(coded);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      in_q      <= '0;
      code_q    <= 1'b0;
      dump_q    <= 1'b0;
      acc       <= '0;
      out       <= '0;
      out_valid <= 1'b0;
    end else begin
      in_q      <= in;
      code_q    <= code;
      dump_q    <= dump;
      out_valid <= dump_q;
      if (dump_q) begin
        out <= sum;
        acc <= '0;
      end else begin
        acc <= sum;
      end
    end
  end

endmodule

// tb_prefilter: random 6-bit samples; the output must be the four most
// significant bits of the 8-bit sum of the last four samples, one clock
// after the newest of them.
module tb_prefilter;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx6_t in;
  cplx4_t out;
  int checks = 0, failures = 0;
  int hre [1000], him [1000];

  prefilter dut (.clk, .rst_n, .in, .out);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int sr, si;
    in = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      if (t >= 5) begin
        sr = hre[t-1] + hre[t-2] + hre[t-3] + hre[t-4];
        si = him[t-1] + him[t-2] + him[t-3] + him[t-4];
        checks++;
        if (out.re != 4'(sr >>> 4) || out.im != 4'(si >>> 4)) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d,%0d sums %0d,%0d", t, out.re, out.im, sr, si);
        end
      end
      in.re = 6'($urandom); in.im = 6'($urandom);
      hre[t] = in.re; him[t] = in.im;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

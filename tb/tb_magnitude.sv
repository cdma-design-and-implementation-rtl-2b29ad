// tb_magnitude: random and corner 13-bit phasors; the registered output must
// be floor(sqrt(I*I+Q*Q)), checked here with real arithmetic (the largest
// integer m with m*m <= I*I+Q*Q).
module tb_magnitude;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx13_t in;
  logic [12:0] mag;
  int checks = 0, failures = 0;

  magnitude dut (.clk, .rst_n, .in, .mag);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    longint sq, m;
    in = '0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      case (t)
        0: begin in.re = -13'sd4096; in.im = -13'sd4096; end
        1: begin in.re = 13'sd4095; in.im = 0; end
        2: begin in.re = 0; in.im = 0; end
        3: begin in.re = 3; in.im = 4; end
        default: begin in.re = 13'($urandom); in.im = (t % 3 == 0) ? 13'($urandom_range(0, 40)) : 13'($urandom); end
      endcase
      sq = longint'(in.re) * in.re + longint'(in.im) * in.im;
      m = longint'($floor($sqrt(real'(sq))));
      while (m * m > sq) m--;
      while ((m + 1) * (m + 1) <= sq) m++;
      @(posedge clk); #1;
      checks++;
      if (longint'(mag) != m) begin
        failures++;
        if (failures < 10) $display("in %0d,%0d got %0d exp %0d", in.re, in.im, mag, m);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_atan_rom: random complex values of all sizes and in every octant; the
// angle (2048 units per turn) must be within 4 units of atan2(Q, I) computed
// with real arithmetic (the 6-bit ratio quantisation allows about 2.6
// units), and zero input must give 0.
module tb_atan_rom;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [16:0] x_re, x_im;
  logic [10:0] angle;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  atan_rom dut (.clk, .rst_n, .x_re, .x_im, .angle);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    real a;
    int e, d;
    x_re = 0; x_im = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3000; t++) begin
      @(negedge clk);
      if (t == 0) begin x_re = 0; x_im = 0; end
      else begin
        int sc;
        sc = $urandom_range(2, 16);
        x_re = 17'($signed($urandom) >>> (32 - sc));
        x_im = 17'($signed($urandom) >>> (32 - sc));
        if (x_re == 0 && x_im == 0) x_re = 1;
      end
      @(posedge clk); #1;
      checks++;
      if (t == 0) begin
        if (angle != 0) failures++;
      end else begin
        a = $atan2(real'(x_im), real'(x_re));
        if (a < 0) a += 2 * PI;
        e = int'(a * 2048.0 / (2 * PI));
        d = (int'(angle) - e) & 2047;
        if (d > 1024) d = 2048 - d;
        if (d > 4) begin
          failures++;
          if (failures < 10) $display("x=%0d,%0d angle %0d exp %0d", x_re, x_im, angle, e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_phase_derotator: random samples and phasors; checks the de-rotated
// product ((x * (cos + j sin)) >> 5, saturated) and the two-register bypass,
// both 2 clocks after the input, with en_msg switching between them.
module tb_phase_derotator;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx6_t in, out;
  logic signed [5:0] c, s;
  logic en_msg;
  int checks = 0, failures = 0, n_rot = 0, n_byp = 0;
  int rre [1000], rim [1000], bre [1000], bim [1000];

  phase_derotator dut (.clk, .rst_n, .in, .nco_cos(c), .nco_sin(s), .en_msg, .out);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  function automatic int clip6(int v); return v > 31 ? 31 : (v < -32 ? -32 : v); endfunction

  initial begin
    int er, ei;
    in = '0; c = 0; s = 0; en_msg = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1000; t++) begin
      @(negedge clk);
      // en_msg drives the output mux directly; data are 2 clocks old
      if (t >= 4) begin
        er = en_msg ? rre[t-2] : bre[t-2];
        ei = en_msg ? rim[t-2] : bim[t-2];
        checks++;
        if (out.re != er || out.im != ei) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d,%0d exp %0d,%0d", t, out.re, out.im, er, ei);
        end
        if (en_msg) n_rot++; else n_byp++;
      end
      in.re = 6'($urandom); in.im = 6'($urandom);
      c = 6'($urandom); s = 6'($urandom);
      rre[t] = clip6((int'(in.re) * c - int'(in.im) * s) >>> 5);
      rim[t] = clip6((int'(in.re) * s + int'(in.im) * c) >>> 5);
      bre[t] = in.re; bim[t] = in.im;
      if (t % 40 == 0) en_msg = ~en_msg;
    end
    checks++; if (n_rot == 0 || n_byp == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

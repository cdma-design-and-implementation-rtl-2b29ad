// tb_matched_filter: random 4-bit input and a random QPSK code; at every
// sample the output is compared with sum_k conj(j**code[k]) * x[n-4*(255-k)],
// computed here with real/imaginary arithmetic, 3 clocks after the newest
// sample. A last phase sends one code-matched symbol and checks that the
// peak value is the full correlation energy.
module tb_matched_filter;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  cplx4_t in;
  qcode_t code [CHIPS];
  cplx13_t out;
  int hre [4000], him [4000];
  int checks = 0, failures = 0;

  matched_filter dut (.clk, .rst_n, .in, .code, .out);

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  // conj(j**k) as (cr, ci)
  function automatic void cj(input int k, output int cr, output int ci);
    cr = (k == 0) ? 1 : (k == 2) ? -1 : 0;
    ci = (k == 1) ? -1 : (k == 3) ? 1 : 0;
  endfunction

  initial begin
    int er, ei, cr, ci, xr, xi, peak;
    in = '0;
    foreach (code[k]) code[k] = 2'($urandom);
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 3240; t++) begin
      @(negedge clk);
      if (t >= 1030 && t < 2200) begin
        er = 0; ei = 0;
        for (int k = 0; k < CHIPS; k++) begin
          cj(code[k], cr, ci);
          xr = hre[t-3-4*(255-k)]; xi = him[t-3-4*(255-k)];
          er += xr * cr - xi * ci;
          ei += xr * ci + xi * cr;
        end
        checks++;
        if (out.re != er || out.im != ei) begin
          failures++;
          if (failures < 10) $display("t=%0d got %0d,%0d exp %0d,%0d", t, out.re, out.im, er, ei);
        end
      end
      if (t < 2200) begin
        in.re = 4'($urandom); in.im = 4'($urandom);
      end else begin
        // chip k of the symbol as 5*j**code[k] (rounded into 4 bits), 4 samples per chip
        int k;
        k = ((t - 2200) / 4) % CHIPS;
        case (code[k])
          0: begin in.re = 5;  in.im = 0;  end
          1: begin in.re = 0;  in.im = 5;  end
          2: begin in.re = -5; in.im = 0;  end
          default: begin in.re = 0; in.im = -5; end
        endcase
      end
      hre[t] = in.re; him[t] = in.im;
      if (t == 2200 + 1023 + 3) begin
        checks++;
        peak = out.re;
        if (out.re != 5 * CHIPS || out.im != 0) failures++;
      end
    end
    $display("matched symbol peak %0d (expected %0d)", peak, 5 * CHIPS);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

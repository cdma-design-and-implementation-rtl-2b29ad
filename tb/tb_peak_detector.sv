// tb_peak_detector: symbol periods of low noise with planted triangular
// peaks of known height, position and phasor, some below the threshold and
// more than four in one period. Checks that the four largest legal peaks are
// reported in order of magnitude with their positions and phasors, that a
// sub-threshold peak is dropped and that unused entries are invalid.
module tb_peak_detector;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [12:0] mag, thr;
  cplx13_t val;
  logic [9:0] pos;
  logic sym_end, est_valid;
  peak_t peaks [4];
  int checks = 0, failures = 0;

  peak_detector dut (.clk, .rst_n, .mag, .val, .pos, .sym_end, .thr, .peaks, .est_valid);

  always #5 clk = ~clk;
  initial begin #300000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  int prof [1024];
  int ppos [6], pmag [6];

  task automatic run_window(input int np);
    for (int i = 0; i < 1024; i++) prof[i] = $urandom_range(0, 30);
    for (int p = 0; p < np; p++)
      for (int d = -3; d <= 3; d++) prof[ppos[p] + d] = (pmag[p] - 40 * (d < 0 ? -d : d)) < 0 ? 0 : pmag[p] - 40 * (d < 0 ? -d : d);
    for (int i = 0; i < 1024; i++) begin
      @(negedge clk);
      mag = 13'(prof[i]); pos = 10'(i);
      val.re = 13'(prof[i] / 2); val.im = -13'(i);
      sym_end = (i == 1023);
    end
    @(negedge clk); sym_end = 0; mag = 0;
    @(posedge est_valid); #1;
  endtask

  initial begin
    mag = 0; val = '0; pos = 0; sym_end = 0; thr = 13'd100;
    repeat (3) @(posedge clk); rst_n = 1;
    // six peaks, one below threshold; expect the four largest legal ones
    ppos = '{100, 300, 500, 700, 900, 950};
    pmag = '{400, 900, 90, 600, 800, 500};
    run_window(6);
    begin
      int ep [4] = '{300, 900, 700, 950};
      int em [4] = '{900, 800, 600, 500};
      for (int k = 0; k < 4; k++) begin
        checks += 3;
        if (!peaks[k].valid) failures++;
        if (peaks[k].pos != 10'(ep[k])) begin failures++; $display("peak %0d pos %0d exp %0d", k, peaks[k].pos, ep[k]); end
        if (peaks[k].mag != 13'(em[k]) || peaks[k].val.im != -13'(ep[k])) failures++;
      end
    end
    // two peaks only: entries 2 and 3 invalid
    ppos = '{200, 600, 0, 0, 0, 0};
    pmag = '{300, 700, 0, 0, 0, 0};
    run_window(2);
    checks += 4;
    if (!peaks[0].valid || peaks[0].pos != 10'd600) failures++;
    if (!peaks[1].valid || peaks[1].pos != 10'd200) failures++;
    if (peaks[2].valid) failures++;
    if (peaks[3].valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

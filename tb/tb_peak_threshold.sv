// tb_peak_threshold: feeds symbol periods of random magnitudes (16-sample
// windows, LOG2_LEN = 4) and checks that after each period avg is the mean
// (sum >> 4) and thr is avg * thr_coef / 16, saturated to 13 bits.
module tb_peak_threshold;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic [12:0] mag, avg, thr;
  logic sym_end;
  logic [7:0] thr_coef;
  int checks = 0, failures = 0;

  peak_threshold #(.LOG2_LEN(4)) dut (.clk, .rst_n, .mag, .sym_end, .thr_coef, .avg, .thr);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int sum, ea, et;
    mag = 0; sym_end = 0; thr_coef = 8'd48;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int w = 0; w < 40; w++) begin
      sum = 0;
      thr_coef = (w == 39) ? 8'd255 : 8'($urandom_range(16, 80));
      for (int i = 0; i < 16; i++) begin
        @(negedge clk);
        mag = (w == 39) ? 13'd8000 : 13'($urandom_range(0, 2000));
        sum += mag;
        sym_end = (i == 15);
      end
      @(negedge clk);
      sym_end = 0; mag = 0;
      ea = sum >> 4;
      et = (ea * thr_coef) >> 4;
      if (et > 8191) et = 8191;
      checks += 2;
      if (avg != ea) failures++;
      if (thr != et) begin failures++; $display("w=%0d thr %0d exp %0d", w, thr, et); end
      // the cycle with sym_end low and mag 0 belongs to the next window
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

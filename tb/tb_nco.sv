// tb_nco: loads a phase, runs with several frequency words and checks the
// 28-bit accumulator against a model, and the registered outputs against
// 31*cos(theta) and -31*sin(theta) of the previous accumulator value, within
// 1 LSB (8-bit phase quantisation).
module tb_nco;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0, load;
  logic [10:0] load_phase;
  logic signed [19:0] freq;
  logic [27:0] phase;
  logic signed [5:0] cos_o, sin_o;
  int checks = 0, failures = 0;
  localparam real PI = 3.14159265358979;

  nco dut (.clk, .rst_n, .load, .load_phase, .freq, .phase, .cos_o, .sin_o);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    longint ph, prev;
    real th;
    int ec, es;
    load = 0; load_phase = 0; freq = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    @(negedge clk);
    load = 1; load_phase = 11'd300;
    @(negedge clk);
    load = 0;
    ph = 300 <<< 17;
    checks++; if (phase != 28'(ph)) failures++;
    for (int t = 0; t < 6000; t++) begin
      prev = ph;
      freq = (t < 2000) ? 20'sd123457 : (t < 4000) ? -20'sd300001 : 20'sd524287;
      @(negedge clk);
      ph = ph + longint'(freq);
      ph = ph & 64'hFFFFFFF;
      checks++;
      if (phase != 28'(ph)) failures++;
      // outputs registered from the accumulator value before this clock
      th = 2.0 * PI * real'(prev >> 20) / 256.0;
      ec = int'($floor(31.0 * $cos(th) + 0.5));
      es = -int'($floor(31.0 * $sin(th) + 0.5));
      checks++;
      if (cos_o - ec > 1 || ec - cos_o > 1 || sin_o - es > 1 || es - sin_o > 1) begin
        failures++;
        if (failures < 10) $display("t=%0d cos %0d exp %0d sin %0d exp %0d", t, cos_o, ec, sin_o, es);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_preamble_detector: sends noise symbols, then the 16-bit signature with
// inverted polarity (as seen with a half-turn carrier phase), then random
// signs again. Checks that raq pulses exactly once, right after the last
// signature symbol, with corr = -16 and inverted = 1, and that disabling the
// detector suppresses detection of a second, upright signature.
module tb_preamble_detector;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0, en, sym_valid, raq, inverted;
  logic signed [12:0] ip0;
  logic [15:0] signature;
  logic signed [5:0] corr;
  int checks = 0, failures = 0, n_raq = 0, raq_sym = -1, sym = 0;

  preamble_detector dut (.clk, .rst_n, .en, .sym_valid, .ip0, .signature, .corr, .raq, .inverted);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (raq) begin n_raq++; raq_sym = sym; end

  task automatic send(input logic neg);
    @(negedge clk);
    ip0 = neg ? -13'sd300 - 13'($urandom_range(0, 100)) : 13'sd300 + 13'($urandom_range(0, 100));
    sym_valid = 1;
    @(negedge clk);
    sym_valid = 0;
    sym++;
    repeat (3) @(negedge clk);
  endtask

  initial begin
    en = 1; sym_valid = 0; ip0 = 0;
    signature = 16'b0100_1101_0011_1010;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int i = 0; i < 20; i++) send(i % 3 == 0);           // noise-like pattern
    for (int k = 0; k < 16; k++) send(!signature[k]);        // inverted signature
    checks += 4;
    if (n_raq != 1) failures++;
    if (raq_sym != 36) begin failures++; $display("raq at symbol %0d", raq_sym); end
    if (corr != -6'sd16) failures++;
    if (!inverted) failures++;
    for (int i = 0; i < 5; i++) send(i % 2 == 0);
    en = 0;
    for (int k = 0; k < 16; k++) send(signature[k]);
    checks++;
    if (n_raq != 1) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

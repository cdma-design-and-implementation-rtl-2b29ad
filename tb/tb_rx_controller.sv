// tb_rx_controller: walks the controller through SEARCH -> INIT -> MESSAGE
// and back with restart; checks the mode, the derived control signals at each
// phase, the INIT length in symbols, the pilot pattern indexing and that the
// beamformer stays off when bf_allow is low.
module tb_rx_controller;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0, restart, raq, sym_valid, bf_allow;
  logic [3:0] init_syms;
  logic [15:0] pilot_seq;
  rx_mode_t mode;
  logic preamble_det, en_msg, bf_en, bs_acq, bs_en, use_pilot, pilot_neg;
  int checks = 0, failures = 0;

  rx_controller dut (.clk, .rst_n, .restart, .raq, .sym_valid, .bf_allow, .init_syms, .pilot_seq,
                     .mode, .preamble_det, .en_msg, .bf_en, .bs_acq, .bs_en, .use_pilot, .pilot_neg);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  task automatic chk(input logic c, input string what);
    checks++;
    if (!c) begin failures++; $display("fail: %s", what); end
  endtask

  task automatic sym();
    @(negedge clk); sym_valid = 1; @(negedge clk); sym_valid = 0;
  endtask

  initial begin
    restart = 0; raq = 0; sym_valid = 0; bf_allow = 1; init_syms = 4'd3;
    pilot_seq = 16'b1010_0000_1100_0110;
    repeat (3) @(posedge clk); rst_n = 1;
    repeat (3) sym();
    chk(mode == MODE_SEARCH && !preamble_det && !en_msg && !bf_en && !use_pilot && !pilot_neg, "search");
    @(negedge clk); raq = 1; @(negedge clk); raq = 0;
    chk(mode == MODE_INIT && preamble_det && !en_msg && bs_acq && bs_en && use_pilot, "init");
    for (int k = 0; k < 3; k++) begin
      chk(pilot_neg == pilot_seq[k], "pilot index in init");
      chk(mode == MODE_INIT, "still init");
      sym();
    end
    chk(mode == MODE_MESSAGE && en_msg && bf_en && !bs_acq && bs_en, "message");
    for (int k = 3; k < 20; k++) begin
      chk(pilot_neg == pilot_seq[k % 16], "pilot index in message");
      sym();
    end
    bf_allow = 0; #1;
    chk(!bf_en && en_msg, "bf not allowed");
    @(negedge clk); restart = 1; @(negedge clk); restart = 0;
    chk(mode == MODE_SEARCH && !en_msg, "restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

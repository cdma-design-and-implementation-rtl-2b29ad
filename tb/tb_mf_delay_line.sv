// tb_mf_delay_line: pushes a random stream through the full 1024-tap line
// and checks every one of the 256 taps (tap k = the sample pushed k*4+1
// clocks ago) for a run of clocks, plus that a low en freezes the line.
module tb_mf_delay_line;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0, en;
  cplx4_t in;
  cplx4_t tap [256];
  cplx4_t hist [3000];
  int checks = 0, failures = 0;

  mf_delay_line dut (.clk, .rst_n, .en, .in, .tap);

  always #5 clk = ~clk;
  initial begin #200000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    cplx4_t frozen;
    in = '0; en = 1;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 1300; t++) begin
      @(negedge clk);
      if (t > 1100) begin
        for (int k = 0; k < 256; k++) begin
          checks++;
          if (tap[k] != hist[t-1-4*k]) failures++;
        end
      end
      in.re = 4'($urandom); in.im = 4'($urandom);
      hist[t] = in;
    end
    @(negedge clk);
    en = 0; frozen = tap[100];
    repeat (5) @(negedge clk);
    checks++;
    if (tap[100] != frozen) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

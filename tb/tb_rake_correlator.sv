// tb_rake_correlator: random samples and code chips with dumps at random
// symbol lengths (8 to 1024 samples); each dumped value must be the sum of
// code*sample over exactly the samples since the previous dump, appearing
// two clocks after the dump sample.
module tb_rake_correlator;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic signed [5:0] in;
  logic code, dump, out_valid;
  logic signed [16:0] out;
  int checks = 0, failures = 0;
  int exp_q [$];

  rake_correlator dut (.clk, .rst_n, .in, .code, .dump, .out, .out_valid);

  always #5 clk = ~clk;
  initial begin #400000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  always @(posedge clk) if (rst_n && out_valid) begin
    #1;
    checks++;
    if (exp_q.size() == 0 || out != 17'(exp_q.pop_front())) begin
      failures++;
      if (failures < 10) $display("dump value %0d wrong", out);
    end
  end

  initial begin
    int acc, len, n;
    in = 0; code = 0; dump = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int s = 0; s < 60; s++) begin
      len = (s % 5 == 0) ? 1024 : $urandom_range(8, 300);
      acc = 0;
      for (n = 0; n < len; n++) begin
        @(negedge clk);
        in = (s % 5 == 0) ? 6'sd31 : 6'($urandom);
        code = (s % 5 == 0) ? 1'b0 : 1'($urandom);
        acc += code ? -int'(in) : int'(in);
        dump = (n == len - 1);
        if (dump) exp_q.push_back(acc);
      end
    end
    @(negedge clk); dump = 0;
    repeat (5) @(negedge clk);
    checks++; if (exp_q.size() != 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

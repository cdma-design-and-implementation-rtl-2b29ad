// tb_loop_filter: random phase errors, gains, updates and loads; a model of
// the proportional-integral filter (prop = err*C1, integ += err*C2,
// out = integ + prop) kept here is compared with the output every clock.
module tb_loop_filter;
  import wcdma_pkg::*;
  logic clk = 0, rst_n = 0;
  logic upd, load;
  logic signed [10:0] err;
  logic [6:0] c1;
  logic [1:0] c2;
  logic signed [18:0] load_val;
  logic signed [19:0] lf_out;
  int checks = 0, failures = 0;

  loop_filter dut (.clk, .rst_n, .upd, .err, .c1, .c2, .load, .load_val, .lf_out);

  always #5 clk = ~clk;
  initial begin #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end

  initial begin
    int prop, integ;
    upd = 0; load = 0; err = 0; c1 = 0; c2 = 0; load_val = 0;
    prop = 0; integ = 0;
    repeat (3) @(posedge clk); rst_n = 1;
    for (int t = 0; t < 2000; t++) begin
      @(negedge clk);
      checks++;
      if (lf_out != 20'(integ + prop)) begin
        failures++;
        if (failures < 10) $display("t=%0d got %0d exp %0d", t, lf_out, integ + prop);
      end
      err = 11'($urandom); c1 = 7'($urandom); c2 = 2'($urandom);
      load = ($urandom_range(0, 99) == 0);
      upd = !load && ($urandom_range(0, 3) == 0);
      load_val = 19'($urandom_range(0, 200000)) - 19'sd100000;
      if (load) begin prop = 0; integ = load_val; end
      else if (upd) begin
        prop = int'(err) * int'(c1);
        integ = integ + int'(err) * int'(c2);
        integ = int'(19'(integ));
        if (integ >= 262144) integ -= 524288;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_code_generator: random path delays, spreading factors and codes; for
// every sample position checks each finger's code chip and dump against
// local = pos - delay - 1 (chip local/4, dump on local mod 4SF = 4SF-1), the
// combine strobe against finger 0's dump delayed by half a data symbol,
// and the beam searcher's code and dump with its 6-sample lead.
module tb_code_generator;
  import wcdma_pkg::*;
  logic [9:0] sample_pos, delay [4], delta0;
  logic [3:0] finger_en;
  logic [3:0] sf_log2;
  logic [255:0] data_code;
  qcode_t pilot_code [256];
  logic rake_code [4], rake_dump [4], combine, bs_dump;
  qcode_t bs_code;
  int checks = 0, failures = 0, n_comb = 0;

  code_generator dut (.sample_pos, .delay, .finger_en, .sf_log2, .data_code, .pilot_code,
                      .delta0, .rake_code, .rake_dump, .combine, .bs_code, .bs_dump);

  initial begin
    int loc, bl, sf4;
    for (int r = 0; r < 12; r++) begin
      sf_log2 = 4'($urandom_range(2, 8));
      sf4 = 4 << sf_log2;
      data_code = {8{$urandom}};
      foreach (pilot_code[k]) pilot_code[k] = 2'($urandom);
      foreach (delay[f]) delay[f] = 10'($urandom);
      finger_en = (r == 0) ? 4'b1111 : 4'($urandom_range(0, 15));
      delta0 = 10'($urandom);
      for (int p = 0; p < 1024; p++) begin
        sample_pos = 10'(p);
        #1;
        for (int f = 0; f < 4; f++) begin
          loc = (p - int'(delay[f]) - 1 + 2048) % 1024;
          checks += 2;
          if (rake_code[f] != data_code[loc / 4]) failures++;
          if (rake_dump[f] != (loc % sf4 == sf4 - 1)) failures++;
        end
        checks++;
        loc = (p - int'(delay[0]) - 1 - sf4 / 2 + 2048) % 1024;
        if (combine != (finger_en[0] && (loc % sf4 == sf4 - 1))) failures++;
        if (combine) n_comb++;
        bl = (p + 6 - int'(delta0) - 1 + 2048) % 1024;
        checks += 2;
        if (bs_code != pilot_code[bl / 4]) failures++;
        if (bs_dump != (bl == 1023)) failures++;
      end
    end
    checks++; if (n_comb == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin #1000000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish; end
endmodule

// mf_delay_line: tapped delay line of the complex matched filter.
//
// Holds the last TAPS complex 4-bit pre-filter outputs (four per chip, so 1024
// taps span one 256-chip symbol) and brings out every STEP-th of them, one per
// chip, to the code multipliers. tap[0] is the newest sample, tap[k] is the
// sample k*STEP clocks older. In the chip this delay line is a full-custom
// latch file, which saves area and switching power; here it is an ordinary
// register shift line with the same behaviour (latch-file cells are
// process-specific and not described at gate level).
//
// Timing: one sample enters per clock while en is high; tap[0] shows the
// sample presented on the previous enabled clock.
module mf_delay_line
  import wcdma_pkg::*;
#(
  parameter int TAPS = 1024,
  parameter int STEP = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   en,
  input  cplx4_t in,
  output cplx4_t tap [TAPS/STEP]
);

  cplx4_t line [TAPS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      line <= '{default: '0};
    end else if (en) begin
      line[0] <= in;
      for (int i = 1; i < TAPS; i++) line[i] <= line[i-1];
    end
  end

  for (genvar k = 0; k < TAPS / STEP; k++) begin : g_tap
    assign tap[k] = line[k*STEP];
  end

endmodule

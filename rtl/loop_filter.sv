// loop_filter: proportional-plus-integral filter of the carrier loop.
//
// On each symbol-rate update the 11-bit phase error (2048 = 2*pi) is
// multiplied by the proportional gain C1 (an 18-bit product kept as the
// proportional term) and by the integral gain C2 (a 13-bit product added to
// the 19-bit integrator). The 20-bit output, integrator plus proportional
// term, is the NCO's phase increment per sample and is held between updates.
// In units: an integrator value of f*128 advances the NCO by f phase units
// (of 2*pi/2048) per 1024-sample symbol, and the proportional term corrects
// C1/128 of the error within one symbol. load presets the integrator with the
// frequency estimate found during acquisition and clears the proportional
// term.
//
// Timing: the output changes the clock after upd or load.
// The proportional-integral structure and the 13/18/19/20-bit widths are the
// document's; the gain widths (C1 7 bits, C2 2 bits, both unsigned) are this
// design's reading of those product widths.
module loop_filter
  import wcdma_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       upd,
  input  logic signed [PH_W-1:0]     err,
  input  logic        [6:0]          c1,
  input  logic        [1:0]          c2,
  input  logic                       load,
  input  logic signed [LF_INT_W-1:0] load_val,
  output logic signed [LF_OUT_W-1:0] lf_out
);

  logic signed [17:0]         prop;
  logic signed [LF_INT_W-1:0] integ;
  logic signed [17:0]         p_n;
  logic signed [12:0]         i_n;

  always_comb begin
    p_n = 18'(err) * $signed({11'd0, c1});
    i_n = 13'(err) * $signed({11'd0, c2});
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      prop  <= '0;
      integ <= '0;
    end else if (load) begin
      prop  <= '0;
      integ <= load_val;
    end else if (upd) begin
      prop  <= p_n;
      integ <= integ + LF_INT_W'(i_n);
    end
  end

  assign lf_out = LF_OUT_W'(integ) + LF_OUT_W'(prop);

endmodule

// nco: numerically controlled oscillator of the carrier recovery loop.
//
// A 28-bit phase accumulator (2**28 = 2*pi) adds the signed 20-bit loop filter
// output every sample. Its eight most significant bits address a cosine/sine
// table whose 6-bit outputs use 31 for 1.0; the table is built from a quarter
// wave, sin_tab[k] = round(31*sin(2*pi*k/256)), k = 0..64. The oscillator
// gives the de-rotation phasor exp(-j*theta) = (cos, -sin), so multiplying the
// received signal by it removes the tracked carrier phase theta. load sets
// the accumulator to an 11-bit phase (2048 = 2*pi), which the loop uses to
// start from the phase found during acquisition.
//
// Timing: cos/sin are registered from the accumulator value, so they follow a
// change of phase by one clock. The 28-bit accumulator, the 20-bit input, the
// 8-bit ROM address and the 6-bit output are the document's word lengths.
module nco
  import wcdma_pkg::*;
(
  input  logic                       clk,
  input  logic                       rst_n,
  input  logic                       load,
  input  logic        [PH_W-1:0]     load_phase,
  input  logic signed [LF_OUT_W-1:0] freq,
  output logic        [NCO_W-1:0]    phase,
  output logic signed [ANT_W-1:0]    cos_o,
  output logic signed [ANT_W-1:0]    sin_o
);

  localparam logic [4:0] SIN_TAB [65] = '{
    5'd0,  5'd1,  5'd2,  5'd2,  5'd3,  5'd4,  5'd5,  5'd5,  5'd6,  5'd7,
    5'd8,  5'd8,  5'd9,  5'd10, 5'd10, 5'd11, 5'd12, 5'd13, 5'd13, 5'd14,
    5'd15, 5'd15, 5'd16, 5'd17, 5'd17, 5'd18, 5'd18, 5'd19, 5'd20, 5'd20,
    5'd21, 5'd21, 5'd22, 5'd22, 5'd23, 5'd23, 5'd24, 5'd24, 5'd25, 5'd25,
    5'd26, 5'd26, 5'd27, 5'd27, 5'd27, 5'd28, 5'd28, 5'd28, 5'd29, 5'd29,
    5'd29, 5'd29, 5'd30, 5'd30, 5'd30, 5'd30, 5'd30, 5'd31, 5'd31, 5'd31,
    5'd31, 5'd31, 5'd31, 5'd31, 5'd31
  };

  function automatic logic signed [ANT_W-1:0] sin_lut(input logic [NCO_A_W-1:0] k);
    logic [5:0] m;
    logic [4:0] v;
    m = k[5:0];
    v = k[6] ? SIN_TAB[7'd64 - 7'(m)] : SIN_TAB[7'(m)];
    return k[7] ? -ANT_W'(v) : ANT_W'(v);
  endfunction

  logic [NCO_A_W-1:0] addr;
  assign addr = phase[NCO_W-1 -: NCO_A_W];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      phase <= '0;
      cos_o <= '0;
      sin_o <= '0;
    end else begin
      if (load) phase <= {load_phase, {(NCO_W-PH_W){1'b0}}};
      else      phase <= phase + NCO_W'(freq);
      cos_o <= sin_lut(addr + NCO_A_W'(64));
      sin_o <= -sin_lut(addr);
    end
  end

endmodule

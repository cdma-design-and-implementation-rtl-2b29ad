// code_generator: despreading code timing for the Rake fingers and the beam
// searcher.
//
// Rake finger f is placed on the path whose symbol ends at sample number
// delay[f] (sample_pos counts the samples reaching the Rake input, 0..1023,
// and the channel estimator reports path delays on the same count). For the
// sample now at the Rake input, the finger's local time is
//   local = sample_pos - delay[f] - 1  (mod 1024),
// its chip index is local/4 into the 256-chip data code (real chips, 1 means
// -1), and it dumps on the last sample of every data symbol of SF chips,
// local mod 4*SF = 4*SF - 1. combine comes half a data symbol (2*SF
// samples) after finger 0's dump. Finger 0 is on the strongest path, so this
// reference moves only when another path becomes the strongest, and every
// finger whose delay is within 2*SF samples of finger 0's has then dumped the
// same data symbol, and not yet the next one.
// The beam searcher works on raw antenna samples, which reach it BS_LEAD
// clocks before the same samples reach the Rake input; its window is placed on
// delta_0 over a whole 256-chip pilot symbol with the pilot code.
//
// All outputs are combinational from the inputs. The document only names a
// code generator; everything here is this design's choice.
module code_generator
  import wcdma_pkg::*;
#(
  parameter int NF      = N_FINGER,
  parameter int BS_LEAD = 6
) (
  input  logic [POS_W-1:0] sample_pos,
  input  logic [POS_W-1:0] delay [NF],
  input  logic [NF-1:0]    finger_en,
  input  logic [3:0]       sf_log2,
  input  logic [CHIPS-1:0] data_code,
  input  qcode_t           pilot_code [CHIPS],
  input  logic [POS_W-1:0] delta0,
  output logic             rake_code [NF],
  output logic             rake_dump [NF],
  output logic             combine,
  output qcode_t           bs_code,
  output logic             bs_dump
);

  logic [POS_W-1:0] loc [NF];
  logic [POS_W-1:0] sym_mask;
  logic [POS_W-1:0] bs_loc;
  logic [POS_W-1:0] cmb_loc;

  always_comb begin
    sym_mask = POS_W'((32'd4 << sf_log2) - 1);
    for (int f = 0; f < NF; f++) begin
      loc[f]       = sample_pos - delay[f] - POS_W'(1);
      rake_code[f] = data_code[loc[f][POS_W-1:2]];
      rake_dump[f] = (loc[f] & sym_mask) == sym_mask;
    end
    cmb_loc = sample_pos - delay[0] - POS_W'(1) - ((sym_mask >> 1) + POS_W'(1));
    combine = finger_en[0] && ((cmb_loc & sym_mask) == sym_mask);
    bs_loc  = sample_pos + POS_W'(BS_LEAD) - delta0 - POS_W'(1);
    bs_code = pilot_code[bs_loc[POS_W-1:2]];
    bs_dump = (bs_loc == '1);
  end

endmodule

// wcdma_pkg: types and constants shared by the WCDMA uplink baseband receiver.
//
// The receiver works on complex baseband samples taken four times per chip
// (3.84 Mcps, 15.36 Msample/s). One symbol of the pilot / preamble channel is
// 256 chips = 1024 samples long; the channel estimator, carrier recovery loop
// and beam searcher update once per such symbol.
//
// Word lengths follow the receiver's fixed-point plan: 6-bit beamformer input,
// weights and output, 6-bit NCO output with an 8-bit NCO ROM address, 6-bit
// pre-filter input, 4-bit matched filter input, 9-bit atan ROM address and
// 11-bit atan ROM output, 6-bit Rake input. The 13-bit matched filter output,
// the 17-bit correlators and the 28-bit NCO accumulator are the widths printed
// on the block diagrams. Complex values are packed structs {re, im}, both
// two's complement.
package wcdma_pkg;

  localparam int SPC        = 4;            // samples per chip
  localparam int CHIPS      = 256;          // chips per pilot / preamble symbol
  localparam int SYM_LEN    = SPC * CHIPS;  // samples per symbol (1024)
  localparam int POS_W      = 10;           // sample position within a symbol
  localparam int N_ANT      = 4;
  localparam int N_FINGER   = 4;
  localparam int SIG_LEN    = 16;           // preamble signature length (symbols)

  localparam int ANT_W      = 6;            // beamformer / Rake / pre-filter input
  localparam int MFI_W      = 4;            // matched filter input
  localparam int MFO_W      = 13;           // matched filter output
  localparam int COR_W      = 17;           // correlator accumulators
  localparam int PH_W       = 11;           // phase, 2*pi = 2**11
  localparam int NCO_W      = 28;           // NCO phase accumulator, 2*pi = 2**28
  localparam int NCO_A_W    = 8;            // NCO LUT address
  localparam int LF_OUT_W   = 20;           // loop filter output
  localparam int LF_INT_W   = 19;           // loop filter integrator

  typedef struct packed {
    logic signed [ANT_W-1:0] re;
    logic signed [ANT_W-1:0] im;
  } cplx6_t;

  typedef struct packed {
    logic signed [MFI_W-1:0] re;
    logic signed [MFI_W-1:0] im;
  } cplx4_t;

  typedef struct packed {
    logic signed [MFO_W-1:0] re;
    logic signed [MFO_W-1:0] im;
  } cplx13_t;

  typedef struct packed {
    logic signed [COR_W-1:0] re;
    logic signed [COR_W-1:0] im;
  } cplx17_t;

  // One path found by the peak detector.
  typedef struct packed {
    logic               valid;
    logic [POS_W-1:0]   pos;    // delay: position of the symbol's last sample
    logic [MFO_W-1:0]   mag;    // sqrt(I*I+Q*Q)
    cplx13_t            val;    // matched filter phasor (I_pi, Q_pi)
  } peak_t;

  // Code chip as a phase index k: the chip value is j**k (1, j, -1, -j).
  typedef logic [1:0] qcode_t;

  typedef enum logic [1:0] {
    MODE_SEARCH  = 2'd0,   // PRACH preamble search, open loop
    MODE_INIT    = 2'd1,   // initial estimation on the pilot after a request
    MODE_MESSAGE = 2'd2    // message part / DPCH, beamformer and loop closed
  } rx_mode_t;

  // Saturate a signed value held in 32 bits to a signed W-bit range.
  function automatic logic signed [31:0] sat(input logic signed [31:0] v, input int w);
    logic signed [31:0] hi, lo;
    hi = (32'sd1 <<< (w - 1)) - 32'sd1;
    lo = -(32'sd1 <<< (w - 1));
    if (v > hi) return hi;
    if (v < lo) return lo;
    return v;
  endfunction

  // Multiply a complex 4-bit sample by the conjugate of the code chip j**k.
  function automatic logic signed [MFI_W:0] despread_re(input cplx4_t x, input qcode_t k);
    unique case (k)
      2'd0: return  (MFI_W+1)'(x.re);
      2'd1: return  (MFI_W+1)'(x.im);
      2'd2: return -(MFI_W+1)'(x.re);
      default: return -(MFI_W+1)'(x.im);
    endcase
  endfunction

  function automatic logic signed [MFI_W:0] despread_im(input cplx4_t x, input qcode_t k);
    unique case (k)
      2'd0: return  (MFI_W+1)'(x.im);
      2'd1: return -(MFI_W+1)'(x.re);
      2'd2: return -(MFI_W+1)'(x.im);
      default: return  (MFI_W+1)'(x.re);
    endcase
  endfunction

endpackage

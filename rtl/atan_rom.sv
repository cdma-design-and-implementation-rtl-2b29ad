// atan_rom: phase of a complex value, atan(Q/I) over the full circle.
//
// The operands are folded into the first octant: the signs of I and Q and
// whether |Q| > |I| form three octant bits, and the ratio min(|I|,|Q|) /
// max(|I|,|Q|) is quantised to six bits by a small divider. These nine bits
// address a ROM whose 11-bit word is the angle, unfolded back to the full
// circle, with 2048 units per 2*pi. The ROM contents are generated from a
// 64-entry first-octant table, atan_tab[r] = round(atan(r/64) * 2048/(2*pi)).
// A zero input gives angle 0.
//
// Timing: the angle is registered, 1 cycle after the operands.
// The 9-bit ROM input and 11-bit ROM output are the document's word lengths;
// the octant folding and ratio quantisation that produce the 9-bit address
// are this design's reading of them.
module atan_rom
  import wcdma_pkg::*;
#(
  parameter int W = COR_W
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  logic signed [W-1:0]  x_re,
  input  logic signed [W-1:0]  x_im,
  output logic        [PH_W-1:0] angle
);

  localparam logic [7:0] ATAN_TAB [64] = '{
    8'd0,   8'd5,   8'd10,  8'd15,  8'd20,  8'd25,  8'd30,  8'd36,
    8'd41,  8'd46,  8'd51,  8'd55,  8'd60,  8'd65,  8'd70,  8'd75,
    8'd80,  8'd85,  8'd89,  8'd94,  8'd99,  8'd103, 8'd108, 8'd112,
    8'd117, 8'd121, 8'd126, 8'd130, 8'd134, 8'd139, 8'd143, 8'd147,
    8'd151, 8'd155, 8'd159, 8'd163, 8'd167, 8'd171, 8'd175, 8'd178,
    8'd182, 8'd186, 8'd189, 8'd193, 8'd196, 8'd200, 8'd203, 8'd206,
    8'd210, 8'd213, 8'd216, 8'd219, 8'd222, 8'd225, 8'd228, 8'd231,
    8'd234, 8'd237, 8'd240, 8'd243, 8'd245, 8'd248, 8'd251, 8'd253
  };

  // ROM word for a 9-bit address {I negative, Q negative, swapped, ratio}
  function automatic logic [PH_W-1:0] rom(input logic [8:0] addr);
    logic [PH_W-1:0] a;
    a = PH_W'(ATAN_TAB[addr[5:0]]);
    if (addr[6]) a = PH_W'(512) - a;     // |Q| > |I|: 90 deg - a
    if (addr[8]) a = PH_W'(1024) - a;    // I < 0: 180 deg - a
    if (addr[7]) a = PH_W'(0) - a;       // Q < 0: mirror
    return a;
  endfunction

  logic [W-1:0]   ax, ay, mx, mn;
  logic [W+5:0]   q;
  logic [5:0]     r;
  logic [8:0]     addr;
  logic           zero;

  always_comb begin
    ax   = x_re[W-1] ? W'(-x_re) : W'(x_re);
    ay   = x_im[W-1] ? W'(-x_im) : W'(x_im);
    mx   = (ay > ax) ? ay : ax;
    mn   = (ay > ax) ? ax : ay;
    zero = (mx == '0);
    q    = zero ? '0 : (((W+6)'(mn) << 6) + (W+6)'(mx >> 1)) / (W+6)'(mx);
    r    = (q > (W+6)'(63)) ? 6'd63 : q[5:0];
    addr = {x_re[W-1], x_im[W-1], (ay > ax), r};
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)    angle <= '0;
    else if (zero) angle <= '0;
    else           angle <= rom(addr);
  end

endmodule

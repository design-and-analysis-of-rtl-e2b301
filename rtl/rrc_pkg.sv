// rrc_pkg: widths and helpers shared by the reconfigurable RRC interpolation
// filter. The input sample is 16-bit two's complement and a coefficient is
// 17 bits: a sign bit and a 16-bit magnitude field (negative values are the
// bitwise inverse of the magnitude). The multiplier splits the 16-bit
// magnitude into eight 2-bit binary common sub-expressions (BCSs), four
// nibbles and two bytes. The filter is a polyphase interpolator with seven
// taps per branch and interpolation factors 4, 6 and 8 (25, 37 and 49 taps).
package rrc_pkg;
  localparam int XW    = 16;       // input sample width
  localparam int HW    = 17;       // coefficient width, sign included
  localparam int MW    = HW - 1;   // coefficient magnitude width
  localparam int PPW   = XW + 2;   // 2-bit BCS partial product (3X)
  localparam int NW    = XW + 4;   // nibble sum (15X)
  localparam int BW    = XW + 8;   // byte sum (255X)
  localparam int SW    = XW + MW;  // |H| * X
  localparam int PW    = 16;       // multiplier output width
  localparam int NSUB  = 7;        // sub-filters (taps per polyphase branch)
  localparam int LMAX  = 8;        // largest interpolation factor
  localparam int PHW   = 3;        // polyphase index width
  localparam int ACCW  = PW + 3;   // accumulator width, 7 terms
  localparam int TAPW  = 6;        // tap index width (0..48)

  typedef logic signed [XW-1:0]   sample_t;
  typedef logic        [HW-1:0]   coef_t;
  typedef logic signed [PPW-1:0]  pp_t;
  typedef logic signed [NW-1:0]   nsum_t;
  typedef logic signed [BW-1:0]   bsum_t;
  typedef logic signed [PW-1:0]   prod_t;
  typedef logic signed [ACCW-1:0] acc_t;

  // INTP_SEL encoding: 0 -> L=4, 1 -> L=6, 2 and 3 -> L=8
  function automatic logic [3:0] intp_factor(input logic [1:0] sel);
    case (sel)
      2'd0:    return 4'd4;
      2'd1:    return 4'd6;
      default: return 4'd8;
    endcase
  endfunction
endpackage

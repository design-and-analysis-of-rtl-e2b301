// vhbcse_mult: shift-and-add multiplier of a 16-bit signed sample by a
// 17-bit coefficient (sign + 16-bit magnitude), built from 2-bit binary
// common sub-expressions with controlled additions:
//   coef_sign_conv  -> sign and 16-bit magnitude
//   ppg             -> 0, X, 2X, 3X (one adder)
//   pp_mux_unit     -> one partial product per 2-bit digit (layer 1)
//   ctrl_logic_gen  -> C1..C7 from nibble/byte equality of the magnitude
//   ctrl_add_l2     -> four nibble sums, equal nibbles share one adder
//   ctrl_add_l3     -> two byte sums, equal bytes share one adder (C7)
//   final_add_l4    -> |H| * X
//   result_sign_conv-> p = (H * X) >>> 16, 16 bits
// The chain follows the layered data flow of the reference architecture.
// Partial products are kept at full precision (the truncated variant drops
// low bits of each shifted partial product); this makes the reuse of equal
// nibble and byte sums exact, so p is exactly floor(H * X / 2^16).
// Purely combinational: the caller registers as needed.
module vhbcse_mult
  import rrc_pkg::*;
(
  input  sample_t x,
  input  coef_t   h,
  output prod_t   p
);
  logic                 sign;
  logic [MW-1:0]        mag;
  pp_t                  pp     [4];
  pp_t                  sel_pp [8];
  logic [6:0]           c;
  nsum_t                as_    [4];
  bsum_t                as5, as6;
  logic signed [SW-1:0] s;

  coef_sign_conv   u_scb (.h(h), .sign(sign), .mag(mag));
  ppg              u_ppg (.x(x), .pp(pp));
  pp_mux_unit      u_mux (.pp(pp), .mag(mag), .sel_pp(sel_pp));
  ctrl_logic_gen   u_clg (.mag(mag), .c(c));
  ctrl_add_l2      u_l2  (.sel_pp(sel_pp), .c(c[5:0]), .as_(as_));
  ctrl_add_l3      u_l3  (.as_(as_), .c7(c[6]), .as5(as5), .as6(as6));
  final_add_l4     u_l4  (.as5(as5), .as6(as6), .s(s));
  result_sign_conv u_rsc (.s(s), .sign(sign), .p(p));
endmodule

// pp_mux_unit: layer-1 multiplexer unit. Eight 4:1 multiplexers, one per
// 2-bit digit of the 16-bit coefficient magnitude; digit k (bits 2k+1:2k)
// selects 0, X, 2X or 3X from the partial product generator. Output k is the
// digit's product before its positional shift of 2k bits, which is applied in
// the addition layers. All eight are 18 bits wide here (the truncated
// variant of the reference architecture narrows them to 17, 15, ..., 3
// bits; here they stay full width so later sums are exact). Combinational.
module pp_mux_unit
  import rrc_pkg::*;
(
  input  pp_t           pp     [4],
  input  logic [MW-1:0] mag,
  output pp_t           sel_pp [8]
);
  always_comb
    for (int k = 0; k < 8; k++)
      sel_pp[k] = pp[mag[2*k +: 2]];
endmodule

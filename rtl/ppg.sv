// ppg: partial product generator for 2-bit binary common sub-expressions.
// The four patterns "00".."11" of a 2-bit digit need the products 0, X, 2X
// and 3X. Only "11" needs an adder (3X = X + 2X); X and 2X are hardwired
// shifts, as in the reference architecture. Outputs are signed, 18 bits wide
// (3X of a 16-bit signed input; the reference quotes 17 bits).
// Purely combinational.
module ppg
  import rrc_pkg::*;
(
  input  sample_t x,
  output pp_t     pp [4]
);
  pp_t x1, x2;
  always_comb begin
    x1    = pp_t'(x);
    x2    = x1 <<< 1;
    pp[0] = '0;
    pp[1] = x1;
    pp[2] = x2;
    pp[3] = x1 + x2;   // the single adder of the PPG
  end
endmodule

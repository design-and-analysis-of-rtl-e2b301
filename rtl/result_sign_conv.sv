// result_sign_conv: sign conversion of the final result. Negates |H| * X when
// the coefficient is negative and keeps the 16 most significant bits:
// p = (sign ? -s : s) >>> 16, i.e. the input read as Q1.15 times the
// magnitude read as Q0.16 gives a Q1.15 product, truncated toward minus
// infinity. The result always fits in 16 bits. Combinational.
module result_sign_conv
  import rrc_pkg::*;
(
  input  logic signed [SW-1:0] s,
  input  logic                 sign,
  output prod_t                p
);
  logic signed [SW:0] r;
  always_comb begin
    r = sign ? -(SW+1)'(s) : (SW+1)'(s);
    p = prod_t'(r >>> MW);
  end
endmodule

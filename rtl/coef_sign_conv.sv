// coef_sign_conv: sign conversion block for the coefficient.
// The MSB of the 17-bit coefficient is its sign. A complement circuit inverts
// the lower 16 bits and a 16-bit 2:1 multiplexer, steered by the MSB, passes
// either the bits as they are (positive) or their inverse (negative), so the
// output is the magnitude when negative coefficients are coded as the bitwise
// inverse of their magnitude. That coding is this design's reading of the
// inverter-plus-multiplexer structure. Purely combinational.
module coef_sign_conv
  import rrc_pkg::*;
(
  input  coef_t          h,
  output logic           sign,
  output logic [MW-1:0]  mag
);
  logic [MW-1:0] inv;
  always_comb begin
    inv  = ~h[MW-1:0];
    sign = h[HW-1];
    mag  = sign ? inv : h[MW-1:0];
  end
endmodule

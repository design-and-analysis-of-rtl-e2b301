// coef_generator: the seven sub-filter multipliers. Multiplier k forms the
// product of the held input sample with the coefficient h[k] presented for
// sub-filter k in the current polyphase branch. Combinational; the products
// are registered in the accumulator. Seven sub-filters follow the reference
// architecture; the parameter N only exists for reuse.
module coef_generator
  import rrc_pkg::*;
#(
  parameter int N = NSUB
) (
  input  sample_t x,
  input  coef_t   h    [N],
  output prod_t   prod [N]
);
  for (genvar k = 0; k < N; k++) begin : g_mult
    vhbcse_mult u_mult (.x(x), .h(h[k]), .p(prod[k]));
  end
endmodule

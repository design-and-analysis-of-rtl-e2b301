// accumulator: final data accumulation in transposed direct form.
// Seven sub-filter products P0..P6 of the current input sample enter a chain
// of six delay registers D1..D6 and six adders:
//   y      = P0 + D1            (registered output)
//   D1..D5 <= Pk + D(k+1)
//   D6     <= P6
// In a polyphase interpolator each branch p has its own partial sums, so
// every delay register holds one word per branch (LMAX words) and is read
// and written at index `phase`: a value is used again exactly one input
// period (L cycles) later, giving y(branch p) = sum_k P_k(n-k). With
// `fresh` the delay registers read as zero (start after reset or a mode
// change), so they need no reset of their own. Output y is registered: it
// appears one clock after the products. en advances the filter.
// The six-register, six-adder transposed chain follows the reference
// architecture; the per-branch slots and the `fresh` restart are this
// design's choices.
module accumulator
  import rrc_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           en,
  input  logic           fresh,
  input  logic [PHW-1:0] phase,
  input  prod_t          prod [NSUB],
  output acc_t           y
);
  acc_t d  [NSUB-1][LMAX];   // d[0] is D1 ... d[5] is D6
  acc_t rd [NSUB-1];
  acc_t nd [NSUB-1];
  acc_t yc;

  always_comb begin
    for (int k = 0; k < NSUB - 1; k++) rd[k] = fresh ? '0 : d[k][phase];
    yc = acc_t'(prod[0]) + rd[0];
    for (int k = 0; k < NSUB - 2; k++) nd[k] = acc_t'(prod[k+1]) + rd[k+1];
    nd[NSUB-2] = acc_t'(prod[NSUB-1]);
  end

  always_ff @(posedge clk)
    if (en)
      for (int k = 0; k < NSUB - 1; k++) d[k][phase] <= nd[k];

  always_ff @(posedge clk)
    if (rst)     y <= '0;
    else if (en) y <= yc;
endmodule

// ctrl_add_l3: controlled addition at layer 3.
// A5 forms the upper byte sum AS5 = (AS4 << 4) + AS3 = byte1 * X. A6 forms
// the lower byte sum AS6 = (AS2 << 4) + AS1 = byte0 * X, except when C7
// reports byte1 == byte0: then A6 is idled (zero operands) and AS6 = AS5.
// Outputs are signed, 24 bits. Purely combinational. The control of A6 by
// C7 follows the reference architecture; the idling by zero operands is
// this design's choice.
module ctrl_add_l3
  import rrc_pkg::*;
(
  input  nsum_t as_ [4],
  input  logic  c7,
  output bsum_t as5,
  output bsum_t as6
);
  bsum_t a6;
  always_comb begin
    as5 = (bsum_t'(as_[3]) <<< 4) + bsum_t'(as_[2]);
    a6  = c7 ? '0 : (bsum_t'(as_[1]) <<< 4) + bsum_t'(as_[0]);
    as6 = c7 ? as5 : a6;
  end
endmodule

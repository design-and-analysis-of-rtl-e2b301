// final_add_l4: final addition at layer 4. Adds the two byte sums of layer 3,
// s = (AS5 << 8) + AS6 = |H| * X, a signed 32-bit value, as in the reference
// architecture; the full 32-bit width is this design's choice. Combinational.
module final_add_l4
  import rrc_pkg::*;
(
  input  bsum_t                 as5,
  input  bsum_t                 as6,
  output logic signed [SW-1:0]  s
);
  always_comb s = (SW'(as5) <<< 8) + SW'(as6);
endmodule

// ctrl_logic_gen: control logic generator. Compares the four 4-bit groups
// (nibbles n3..n0) of the coefficient magnitude and raises
//   c[0] = C1: n3 == n2      c[3] = C4: n2 == n1
//   c[1] = C2: n3 == n1      c[4] = C5: n2 == n0
//   c[2] = C3: n3 == n0      c[5] = C6: n1 == n0
//   c[6] = C7: byte1 == byte0, formed as C2 & C5 from the 4-bit checks.
// C1-C6 steer the layer-2 adders and C7 the layer-3 adder A6. The pairing
// of C1..C6 to nibble pairs is this design's choice. Purely combinational.
module ctrl_logic_gen
  import rrc_pkg::*;
(
  input  logic [MW-1:0] mag,
  output logic [6:0]    c
);
  logic [3:0] n [4];
  always_comb begin
    for (int j = 0; j < 4; j++) n[j] = mag[4*j +: 4];
    c[0] = (n[3] == n[2]);
    c[1] = (n[3] == n[1]);
    c[2] = (n[3] == n[0]);
    c[3] = (n[2] == n[1]);
    c[4] = (n[2] == n[0]);
    c[5] = (n[1] == n[0]);
    c[6] = c[1] & c[4];
  end
endmodule

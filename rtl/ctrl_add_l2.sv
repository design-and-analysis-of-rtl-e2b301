// ctrl_add_l2: controlled addition at layer 2.
// Adder A(j+1) forms the nibble sum AS(j+1) = (sel_pp[2j+1] << 2) + sel_pp[2j]
// = nibble_j * X for nibble j = 0..3. When the control logic reports that
// nibble j equals a more significant nibble, A(j+1) is idled (its operands
// are forced to zero, so it does not toggle) and AS(j+1) is taken from the
// equal nibble's sum through a multiplexer. Nibble 3 is always added. With
// the controls of ctrl_logic_gen: nibble 2 reuses nibble 3 (C1); nibble 1
// reuses nibble 3 (C2) or else 2 (C4); nibble 0 reuses 3 (C3), else 2 (C5),
// else 1 (C6). Outputs as_[j] are signed, 20 bits. Purely combinational.
// Four controlled adders steered by C1..C6 follow the reference
// architecture; the reuse priority and the zero-operand idling are this
// design's choices.
module ctrl_add_l2
  import rrc_pkg::*;
(
  input  pp_t        sel_pp [8],
  input  logic [5:0] c,   // C1..C6
  output nsum_t      as_    [4]
);
  logic  [3:0] en;     // adder j active
  nsum_t       sum [4];

  always_comb begin
    en[3] = 1'b1;
    en[2] = ~c[0];
    en[1] = ~(c[1] | c[3]);
    en[0] = ~(c[2] | c[4] | c[5]);
    for (int j = 0; j < 4; j++)
      sum[j] = en[j] ? (nsum_t'(sel_pp[2*j+1]) <<< 2) + nsum_t'(sel_pp[2*j]) : '0;

    as_[3] = sum[3];
    as_[2] = c[0] ? sum[3] : sum[2];
    as_[1] = c[1] ? sum[3] : (c[3] ? sum[2] : sum[1]);
    as_[0] = c[2] ? sum[3] : (c[4] ? sum[2] : (c[5] ? sum[1] : sum[0]));
  end
endmodule

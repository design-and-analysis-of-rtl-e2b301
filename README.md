# Reconfigurable RRC interpolation filter with a shared-addition constant multiplier

A multi-standard digital up-converter needs a pulse-shaping root-raised-cosine
(RRC) filter that can change its interpolation factor and roll-off factor at run
time, and whose coefficients can be reprogrammed. This RTL implements such a
filter as a **polyphase interpolator** in **transposed direct form**:

* interpolation factor L = 4, 6 or 8, with filters of N = 6L+1 = 25, 37 or 49 taps;
* two coefficient sets per factor (two roll-off factors), selected at run time;
* every filter splits into L branches of at most **seven** taps, so seven
  multipliers (sub-filters) serve all six configurations;
* the multipliers are **shift-and-add multipliers built on 2-bit binary common
  sub-expressions (BCSs)**, in which additions are shared when 4-bit groups or
  8-bit groups of the coefficient repeat. This saves adder toggling, and so
  switching power.

The whole datapath is one clock domain. One input sample enters every L cycles
and one output sample leaves every cycle.

## Configurations

| `intp_sel` | L | taps N | branches | taps per branch |
|-----------|---|--------|----------|-----------------|
| 0         | 4 | 25     | 4        | 7 (branch 0), 6 (others) |
| 1         | 6 | 37     | 6        | 7 / 6 |
| 2 or 3    | 8 | 49     | 8        | 7 / 6 |

`flt_sel` picks one of the two coefficient sets stored for the active factor.
The roll-off values themselves are just whatever coefficients are loaded. The
workload testbench loads RRC filters with roll-off 0.22 and 0.35.

Branch p of input sample n produces

    y(n, p) = sum_{k=0..6, kL+p <= 6L} h[kL+p] * x(n-k)

and the branches are emitted in order p = 0 .. L-1. That is the filter h
applied to the input with L-1 zeros stuffed between samples.

## Block structure

```
 x_in ──► data_generator ──x(n)──► coef_generator ──P0..P6──► accumulator ──► rrc_out
          (clk_div inside)  phase     (7 x vhbcse_mult)         (transposed,
          modes latched       │            ▲                     6 regs, 6 adders)
                              ▼            │ h[kL+p], k=0..6
 coef_* ─────────────────► coef_selector ──┘
                            (6 sets in 7 banks)
```

| Module | Role |
|--------|------|
| `rrc_fir_top` | Wires the filter together. Registers `rrc_valid` and `rrc_phase`. |
| `data_generator` | Holds x(n) for L cycles. Latches `intp_sel`/`flt_sel` at sample boundaries. Raises `fresh` after a mode change. |
| `clk_div` | Phase counter 0..L-1. Its wrap is the CLK/4, CLK/6 or CLK/8 enable. |
| `coef_selector` | Programmable coefficient store. Outputs h[kL+p] for the seven sub-filters each cycle. |
| `coef_generator` | Seven `vhbcse_mult` instances. |
| `vhbcse_mult` | One shift-and-add multiplier (see below). |
| `accumulator` | Transposed-form chain with one delay slot per branch. |
| `rrc_pkg` | Widths, types, and the `intp_sel` → L mapping. |

## The multiplier

`vhbcse_mult` multiplies a 16-bit signed sample X by a 17-bit coefficient H. It
is the hardest part of the design to follow. The data flow is a fixed sequence
of small blocks, each in its own module:

1. **Coefficient sign conversion** (`coef_sign_conv`). The coefficient's MSB is
   its sign. An inverter and a 16-bit 2:1 multiplexer give the 16-bit magnitude
   M: the low bits as they are for a positive coefficient, inverted for a
   negative one. Negative coefficients are therefore coded as the bitwise
   inverse of their magnitude (sign-and-ones'-complement):
   value = H[16] ? −(65535 − H[15:0]) : H[15:0].
2. **Partial product generator** (`ppg`). A 2-bit digit takes one of four
   patterns, so only 0, X, 2X and 3X are ever needed. 3X = X + 2X is the only
   adder. The rest is wiring.
3. **Layer 1, multiplexer unit** (`pp_mux_unit`). Eight 4:1 multiplexers, one
   per digit d_k = M[2k+1:2k], select d_k·X.
4. **Control logic generator** (`ctrl_logic_gen`). Compares the four nibbles
   n3..n0 of M:

   | control | condition | used by |
   |---------|-----------|---------|
   | C1 | n3 = n2 | layer 2, nibble 2 |
   | C2 | n3 = n1 | layer 2, nibble 1 |
   | C3 | n3 = n0 | layer 2, nibble 0 |
   | C4 | n2 = n1 | layer 2, nibble 1 |
   | C5 | n2 = n0 | layer 2, nibble 0 |
   | C6 | n1 = n0 | layer 2, nibble 0 |
   | C7 | C2 and C5, i.e. byte 1 = byte 0 | layer 3, adder A6 |

5. **Layer 2, controlled addition** (`ctrl_add_l2`). Adders A1..A4 form the
   nibble sums AS(j+1) = (d_{2j+1}·X << 2) + d_{2j}·X = n_j·X. Nibble 3 is
   always added. A lower nibble that equals a higher one does not use its
   adder: the adder's operands are forced to zero so it does not toggle, and a
   multiplexer passes the equal nibble's sum instead. Priority goes to the most
   significant equal nibble.
6. **Layer 3, controlled addition** (`ctrl_add_l3`). A5 forms
   AS5 = (AS4 << 4) + AS3 = byte1·X. A6 forms AS6 = byte0·X, unless C7 says
   the bytes are equal. In that case A6 is idled and AS6 = AS5.
7. **Layer 4, final addition** (`final_add_l4`).
   S = (AS5 << 8) + AS6 = M·X, which is 32 bits.
8. **Result sign conversion** (`result_sign_conv`). Computes
   p = (sign ? −S : S) >>> 16.

Reading X as Q1.15 and M as Q0.16, the product p is Q1.15. It is exactly
floor(H·X / 2^16) and always fits in 16 bits. For example, with H = 0x0_ABAB
the bytes are equal (C7), so A6 does no work. With H = 0x0_5555 every nibble
equals nibble 3, so only A1 and A5 add.

The multiplier is purely combinational. Its critical path is PPG adder →
multiplexer → three adder layers → negation.

## Coefficient store and selection

`coef_selector` keeps 2 (roll-off) × 3 (factor) sets. Tap n of a set belongs to
sub-filter k = n / L and branch p = n mod L. The store is therefore seven banks
(one per sub-filter) of 2 × 3 × 8 words. Each cycle all seven banks are read at
(flt, intp, phase) to give the seven coefficients of the current branch. Only
sub-filter 6 of branch 0 holds a tap (tap 6L). Sub-filter 6 reads as zero in
every other branch.

Programming is one tap per clock:

| port | meaning |
|------|---------|
| `coef_we` | write strobe |
| `coef_flt` | set: roll-off index |
| `coef_intp` | set: factor select (same coding as `intp_sel`) |
| `coef_tap` | tap index 0..6L; larger indices are ignored |
| `coef_data` | 17-bit coefficient, coded as in step 1 above |

The store has no reset, so every tap of a set must be written before the set
is selected. Writing a set that is not in use while the filter runs is safe,
and the end-to-end testbench does this. Writing the active set changes outputs
from the next cycle on.

## Transposed accumulation across branches

The accumulator is the usual transposed chain for seven taps:

    y  = P0 + D1,    Dk <= Pk + D(k+1)  (k = 1..5),    D6 <= P6

It has six registers and six adders. In a polyphase interpolator, the partial
sums of branch p must meet the products of branch p of the *next* input
sample, L cycles later. Each register Dk is therefore a small memory of eight
words indexed by the branch number. It is read and written at `phase`, so a
value returns after exactly one input period, whatever L is. The output y is
registered.

`fresh` (from the data generator) makes every Dk read as zero during the first
input period after reset or after a mode change. This way the filter restarts
from an empty state without clearing the memories.

## Timing and mode changes

* `x_take` is high in the last cycle of each input period (and in the first
  cycle after reset). `x_in` is captured at the end of that cycle. It stands for
  the divided clocks CLK4/CLK6/CLK8. There is only one clock; the division is
  done with an enable.
* The L outputs of that sample are registered on `rrc_out` at the L clock
  edges that follow the capture edge, branch 0 first, with `rrc_valid` = 1
  and `rrc_phase` = 0..L-1. Latency is one clock from capture to branch 0.
  Output rate = clock rate; input rate = clock / L.
* `intp_sel` and `flt_sel` may change at any time. They are sampled together
  with a sample, so a new mode begins on a sample boundary. A change of factor
  or of set clears the filter history: the first six samples of the new mode
  see zeros in place of older samples. Select codes 2 and 3 both mean L = 8 and
  are not a change.
* Reset (`rst`) is synchronous and active high.
* `rrc_out` is 19 bits: a 16-bit product plus 3 bits of growth for seven terms,
  so it cannot overflow.

## Design choices and departures

The architecture (sub-blocks, their order, the seven control signals, the
seven sub-filters, the six-register transposed chain, the filter lengths and
factors) follows the published reconfigurable filter. The points below are
choices made here, where that description is silent or was not followed.

* **Full-precision partial products.** The reference multiplier narrows the
  eight partial products to 17, 15, …, 3 bits by right-shifting and dropping
  low bits (a truncated multiplier). Here the partial products are kept whole
  and shifted left, and only the final result is cut to 16 bits. This makes the
  reuse of an equal nibble or byte sum exact, so the product is exactly
  floor(H·X/2^16) whichever additions were shared. The cost is wider adders.
  Partial products are 18 bits, not 17, because X is signed.
* **Coefficient coding.** The sign conversion is an inverter plus a
  multiplexer, as described. This implies sign-and-ones'-complement
  coefficients. A two's-complement coefficient c < 0 must be loaded as
  c − 1 in two's complement (i.e. bitwise inverse of |c| with the sign bit set).
* **Selection before multiplication.** The coefficient selector is described
  as sitting after the coefficient generator and choosing data by
  interpolation factor. Here it chooses the coefficients of the active
  configuration in front of the seven multipliers. This gives the same
  products with seven multipliers instead of one group per configuration.
* **Programmable coefficients** are written through a port into LUT memory.
  The reference architecture prepares its coefficient sets with two coding
  passes: matching bits between the two roll-off sets, then across the three
  factors. Those passes, and the "programmable domain" variant of the final
  addition, are not built here: their rules and coded formats are not
  specified.
* Divided clocks are clock enables. Modes switch on sample boundaries with a
  history restart. The output is 19 bits wide. `intp_sel = 3` behaves as 8.
  All of these are choices made here.

## Simulation

All files are SystemVerilog-2017. The package `rtl/rrc_pkg.sv` must be read
first. With Verilator 5:

```
verilator --binary --timing --assert -Irtl -Itb rtl/rrc_pkg.sv \
          tb/tb_rrc_fir_top.sv --top-module tb_rrc_fir_top -Mdir obj -o sim
./obj/sim
```

Swap `tb_rrc_fir_top` for any other testbench. Every testbench prints
`TB_RESULT checks=N failures=M` and stops itself through a watchdog.

| Testbench | What it checks |
|-----------|----------------|
| `tb_rrc_fir_top` | Full design at default sizes, against a polyphase reference model. Covers random coefficients (a third with repeated nibbles or bytes), all factors, both sets, select code 3, six mode switches, and a set rewritten while another runs. Every output value, branch index and output cycle is checked, as is the input rate (one capture per L cycles). Counts each mechanism and fails if one never occurred. |
| `tb_rrc_workloads` | The 25/37/49-tap RRC filters, each with roll-off 0.22 and 0.35, with coefficients computed from the RRC formula. Each impulse response must equal the taps. Random input is checked against a direct convolution of the zero-stuffed input. |
| `tb_vhbcse_mult` | 20,000 products, exact, including extremes and shared nibble/byte cases. |
| `tb_coef_selector`, `tb_accumulator`, `tb_data_generator`, `tb_clk_div` | Store mapping and masking; per-branch transposed sums with a hold period; sampling, mode latching and restart; divider periods and restart. |
| `tb_coef_sign_conv` … `tb_result_sign_conv`, `tb_coef_generator` | Each multiplier sub-block on its own. The sign conversion is tested exhaustively. |

## Size

A generic (technology-independent) synthesis of `rrc_fir_top` gives about 980
word-level cells, 47 flip-flop bits, and 7,744 memory bits:

* the coefficient store, 7 × 48 × 17 bits;
* the accumulator's delay slots, 6 × 8 × 19 bits.

Each multiplier has nine adders: one in the PPG, four in layer 2, two in
layer 3, one in layer 4, and the final negation. Most of the design's area is
in the seven multipliers.

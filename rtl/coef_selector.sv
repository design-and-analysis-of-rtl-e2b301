// coef_selector: programmable coefficient store and selector.
// Holds six coefficient sets: two roll-off factors (flt) for each of the
// interpolation factors L = 4, 6, 8, whose filters have N = 6L+1 = 25, 37
// and 49 taps. Tap n of a set belongs to sub-filter k = n / L and branch
// p = n % L, so the store is organised as NSUB banks, one per sub-filter,
// of 2 x 3 x LMAX words. Each cycle it presents, for the active set and
// branch `phase`, h[k] = tap k*L + phase of that set, or zero where that tap
// lies beyond 6L (only sub-filter 6, branch 0 uses tap 6L).
// Write port: one tap per cycle, addressed by set and tap index; writes to
// taps beyond 6L are ignored. Reads are combinational (LUT memory). The
// store is not reset: every tap of a set must be written before it is used.
// The selection by interpolation factor and the LUT storage follow the
// reference architecture; placing the selection in front of the
// multipliers, the bank layout and the write port are this design's choices.
module coef_selector
  import rrc_pkg::*;
(
  input  logic            clk,
  input  logic            we,
  input  logic            wflt,
  input  logic [1:0]      wintp,
  input  logic [TAPW-1:0] wtap,
  input  coef_t           wdata,
  input  logic            flt,
  input  logic [1:0]      intp,
  input  logic [PHW-1:0]  phase,
  output coef_t           h [NSUB]
);
  localparam int DEPTH = 2 * 3 * LMAX;
  typedef logic [$clog2(DEPTH)-1:0] addr_t;

  coef_t mem [NSUB][DEPTH];

  function automatic addr_t set_addr(input logic f, input logic [1:0] i,
                                     input logic [PHW-1:0] p);
    logic [1:0] ii;
    ii = (i == 2'd3) ? 2'd2 : i;
    return addr_t'((32'(f) * 3 + 32'(ii)) * LMAX + 32'(p));
  endfunction

  // write side: split the tap index into sub-filter and branch
  logic [3:0]      wl;
  logic [PHW-1:0]  wk, wp;
  logic            wok;
  always_comb begin
    wl  = intp_factor(wintp);
    wk  = PHW'(wtap / TAPW'(wl));
    wp  = PHW'(wtap % TAPW'(wl));
    wok = we && (wtap <= TAPW'(6 * wl));
  end

  always_ff @(posedge clk)
    if (wok) mem[wk][set_addr(wflt, wintp, wp)] <= wdata;

  // read side
  addr_t ra;
  always_comb begin
    ra = set_addr(flt, intp, phase);
    for (int k = 0; k < NSUB; k++)
      h[k] = (k < NSUB - 1 || phase == '0) ? mem[k][ra] : '0;
  end
endmodule

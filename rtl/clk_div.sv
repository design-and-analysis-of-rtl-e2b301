// clk_div: divides the master clock CLK by the interpolation factor L (4, 6
// or 8, from lsel) as a phase counter, instead of generating new clocks.
// phase counts 0..L-1 and wrap is high in the last cycle of each period: it
// is the enable standing for the divided clock CLK4/CLK6/CLK8. restart
// forces wrap so that the next cycle starts a new period at phase 0.
// lsel may change only on the clock edge that ends a wrap cycle (checked by
// an assertion). Synchronous active-high reset. The three divided rates are
// those of the reference architecture; realising them as one counter and an
// enable is this design's choice.
module clk_div
  import rrc_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic           restart,
  input  logic [1:0]     lsel,
  output logic [PHW-1:0] phase,
  output logic           wrap
);
  logic [3:0] last;
  always_comb begin
    last = intp_factor(lsel) - 4'd1;
    wrap = restart || ({1'b0, phase} >= last);
  end

  always_ff @(posedge clk)
    if (rst)       phase <= '0;
    else if (wrap) phase <= '0;
    else           phase <= phase + 1'b1;

  a_lsel_at_wrap: assert property (@(posedge clk) disable iff (rst) !wrap |=> $stable(lsel))
    else $error("lsel changed in the middle of a period");
endmodule

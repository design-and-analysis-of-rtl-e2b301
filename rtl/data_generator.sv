// data_generator: input side of the filter. Holds one input sample for the L
// master-clock cycles of an input period and gives the polyphase branch
// index of each cycle (from clk_div). In the last cycle of a period (x_take)
// it captures x_in and the requested INTP_SEL/FLT_SEL; the first capture
// after reset happens in the first cycle out of reset. Modes therefore change
// only on a sample boundary. fresh is high for the whole period that follows
// reset or a mode change and tells the accumulator to start from empty
// delay registers (select codes 2 and 3 both mean L = 8 and do not count
// as a change). run is high once a sample has been captured.
// The sample-boundary mode switch and the restart are this design's choices.
module data_generator
  import rrc_pkg::*;
(
  input  logic           clk,
  input  logic           rst,
  input  logic [1:0]     intp_sel_in,
  input  logic           flt_sel_in,
  input  sample_t        x_in,
  output sample_t        x,
  output logic [PHW-1:0] phase,
  output logic [1:0]     intp,
  output logic           flt,
  output logic           x_take,
  output logic           fresh,
  output logic           run
);
  clk_div u_div (.clk(clk), .rst(rst), .restart(~run), .lsel(intp),
                 .phase(phase), .wrap(x_take));

  always_ff @(posedge clk)
    if (rst) begin
      run   <= 1'b0;
      x     <= '0;
      intp  <= '0;
      flt   <= 1'b0;
      fresh <= 1'b1;
    end else if (x_take) begin
      run   <= 1'b1;
      x     <= x_in;
      intp  <= intp_sel_in;
      flt   <= flt_sel_in;
      fresh <= ~run || (intp_factor(intp_sel_in) != intp_factor(intp)) ||
               (flt_sel_in != flt);
    end
endmodule

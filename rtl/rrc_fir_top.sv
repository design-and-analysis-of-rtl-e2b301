// rrc_fir_top: reconfigurable root-raised-cosine (RRC) interpolation filter.
// One input sample is taken every L master-clock cycles (L = 4, 6 or 8 from
// intp_sel) and one output sample is produced every cycle, so the filter
// interpolates by L. Each interpolation factor has two coefficient sets
// (flt_sel, two roll-off factors) of N = 6L+1 = 25, 37 or 49 taps, split
// into L polyphase branches of at most seven taps. Per cycle:
//   data_generator : holds x(n), gives branch p, latches modes at sample edges
//   coef_selector  : programmable store, gives h[kL+p] for k = 0..6
//   coef_generator : seven shift-and-add multipliers x(n) * h[kL+p]
//   accumulator    : transposed-form chain -> y = sum_k h[kL+p] x(n-k)
// Timing: x_in is captured at the end of a cycle with x_take high (the
// CLK/L enable); the outputs of its L branches are registered on rrc_out at
// the L clock edges that follow the capture edge, with rrc_valid high and
// rrc_phase = p. Input rate CLK/L, output rate CLK.
// Coefficients are written through coef_* (one tap per cycle) before use.
// The block partition, the factors, filter lengths and seven sub-filters
// follow the reference architecture; the write port, the clock-enable
// division, the mode-switch restart and the 19-bit output are this
// design's choices.
module rrc_fir_top
  import rrc_pkg::*;
(
  input  logic            clk,
  input  logic            rst,
  input  logic [1:0]      intp_sel,
  input  logic            flt_sel,
  input  sample_t         x_in,
  output logic            x_take,
  input  logic            coef_we,
  input  logic            coef_flt,
  input  logic [1:0]      coef_intp,
  input  logic [TAPW-1:0] coef_tap,
  input  coef_t           coef_data,
  output acc_t            rrc_out,
  output logic            rrc_valid,
  output logic [PHW-1:0]  rrc_phase
);
  sample_t        x;
  logic [PHW-1:0] phase;
  logic [1:0]     intp;
  logic           flt, fresh, run;
  coef_t          h    [NSUB];
  prod_t          prod [NSUB];

  data_generator u_dg (.clk(clk), .rst(rst), .intp_sel_in(intp_sel),
                       .flt_sel_in(flt_sel), .x_in(x_in), .x(x), .phase(phase),
                       .intp(intp), .flt(flt), .x_take(x_take), .fresh(fresh),
                       .run(run));

  coef_selector u_cs (.clk(clk), .we(coef_we), .wflt(coef_flt),
                      .wintp(coef_intp), .wtap(coef_tap), .wdata(coef_data),
                      .flt(flt), .intp(intp), .phase(phase), .h(h));

  coef_generator #(.N(NSUB)) u_cg (.x(x), .h(h), .prod(prod));

  accumulator u_acc (.clk(clk), .rst(rst), .en(run), .fresh(fresh),
                     .phase(phase), .prod(prod), .y(rrc_out));

  always_ff @(posedge clk)
    if (rst) begin
      rrc_valid <= 1'b0;
      rrc_phase <= '0;
    end else begin
      rrc_valid <= run;
      rrc_phase <= phase;
    end
endmodule

// tb_rrc_workloads: runs the three filter configurations of the design,
// 25 taps / L=4, 37 taps / L=6 and 49 taps / L=8, each with two roll-off
// factors (0.22 and 0.35 are used here), on true root-raised-cosine
// coefficients computed in the testbench:
//   t = (n - 3L) / L (in symbol periods), beta = roll-off
//   h(0)            = 1 - beta + 4 beta / pi
//   h(+-1/(4 beta)) = beta/sqrt(2) [(1+2/pi) sin(pi/(4 beta)) + (1-2/pi) cos(pi/(4 beta))]
//   h(t)            = [sin(pi t (1-beta)) + 4 beta t cos(pi t (1+beta))]
//                     / [pi t (1 - (4 beta t)^2)]
// scaled so that the largest tap is 0.9 in Q0.16, sign + magnitude coded.
// Each configuration gets a unit impulse (the output must reproduce the
// taps in order), then random samples. The reference here is the direct
// convolution of the zero-stuffed input u(m) = x(m/L) with all N taps, one
// truncated product per tap, which is a different formulation from the
// polyphase structure in the design.
module tb_rrc_workloads;
  import rrc_pkg::*;
  int checks = 0, failures = 0;

  logic clk = 0, rst = 1;
  logic [1:0] intp_sel = 0;
  logic flt_sel = 0;
  sample_t x_in = 0;
  logic x_take;
  logic coef_we = 0, coef_flt = 0;
  logic [1:0] coef_intp = 0;
  logic [TAPW-1:0] coef_tap = 0;
  coef_t coef_data = 0;
  acc_t rrc_out;
  logic rrc_valid;
  logic [PHW-1:0] rrc_phase;

  rrc_fir_top dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam real PI = 3.14159265358979;
  real beta_tab [2] = '{0.22, 0.35};
  longint hv [2][3][49];       // coefficient values (Q0.16 integers)
  sample_t xs [$];             // samples of the running configuration
  int cur = -1;
  typedef struct { int value; int phase; bit imp_valid; int imp; } exp_t;
  exp_t q [$];
  int impulse_taps = 0;
  bit stim_done = 0;

  function automatic real fabs(input real a);
    return (a < 0.0) ? -a : a;
  endfunction

  function automatic real rrc(input real t, input real b);
    if (t == 0.0) return 1.0 - b + 4.0 * b / PI;
    if (fabs(fabs(t) - 1.0 / (4.0 * b)) < 1e-9)
      return b / $sqrt(2.0) * ((1.0 + 2.0 / PI) * $sin(PI / (4.0 * b)) +
                              (1.0 - 2.0 / PI) * $cos(PI / (4.0 * b)));
    return ($sin(PI * t * (1.0 - b)) + 4.0 * b * t * $cos(PI * t * (1.0 + b))) /
           (PI * t * (1.0 - (4.0 * b * t) * (4.0 * b * t)));
  endfunction

  function automatic coef_t encode(input longint v);
    logic [15:0] m;
    m = 16'((v < 0) ? -v : v);
    return (v < 0) ? {1'b1, ~m} : {1'b0, m};
  endfunction

  task automatic program_set(input int f, input int i);
    int l;
    real r [49];
    real mx;
    l = 4 + 2 * i;
    mx = 0.0;
    for (int n = 0; n <= 6 * l; n++) begin
      r[n] = rrc((real'(n) - 3.0 * l) / real'(l), beta_tab[f]);
      if (fabs(r[n]) > mx) mx = fabs(r[n]);
    end
    for (int n = 0; n <= 6 * l; n++) begin
      hv[f][i][n] = longint'($rtoi(r[n] / mx * 0.9 * 65536.0));
      @(negedge clk);
      coef_we = 1; coef_flt = 1'(f); coef_intp = 2'(i); coef_tap = TAPW'(n);
      coef_data = encode(hv[f][i][n]);
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  // reference: direct convolution of the zero-stuffed input
  task automatic on_take(input int f, input int i);
    int l, j;
    l = 4 + 2 * i;
    if (cur != f * 3 + i) xs.delete();
    cur = f * 3 + i;
    xs.push_back(x_in);
    j = xs.size() - 1;
    for (int p = 0; p < l; p++) begin
      exp_t e;
      longint acc;
      int m;
      m = j * l + p;
      acc = 0;
      for (int n = 0; n <= 6 * l; n++)
        if (m - n >= 0 && (m - n) % l == 0)
          acc += (hv[f][i][n] * longint'(xs[(m - n) / l])) >>> 16;
      e.value = int'(acc); e.phase = p;
      // first 6L+1 outputs of a configuration: impulse response = taps
      e.imp_valid = (m <= 6 * l);
      e.imp = e.imp_valid ? int'((hv[f][i][m] * 32767) >>> 16) : 0;
      q.push_back(e);
    end
  endtask

  always @(negedge clk)
    if (!rst && rrc_valid && !(stim_done && q.size() == 0)) begin
      exp_t e;
      checks++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output");
      end else begin
        e = q.pop_front();
        if (int'(rrc_out) != e.value || int'(rrc_phase) != e.phase) begin
          failures++;
          if (failures < 10) $display("FAIL out=%0d exp=%0d phase=%0d/%0d", rrc_out, e.value, rrc_phase, e.phase);
        end
        if (e.imp_valid) begin
          checks++;
          impulse_taps++;
          if (int'(rrc_out) != e.imp) begin
            failures++;
            if (failures < 10) $display("FAIL impulse out=%0d exp=%0d", rrc_out, e.imp);
          end
        end
      end
    end

  initial begin
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 3; i++) program_set(f, i);
    @(negedge clk);
    rst = 0;
    for (int i = 0; i < 3; i++)
      for (int f = 0; f < 2; f++) begin
        int takes;
        takes = 0;
        while (takes < 40) begin
          #1;
          intp_sel = 2'(i);
          flt_sel  = 1'(f);
          // impulse at the first sample of the configuration, zeros up to
          // the end of the impulse response, then random samples
          x_in = (takes == 0) ? 16'sh7fff : (takes < 8) ? 16'sh0 : sample_t'($urandom);
          #1;
          if (x_take) begin
            on_take(f, i);
            takes++;
          end
          @(negedge clk);
        end
      end
    stim_done = 1;
    while (q.size() > 0) @(negedge clk);
    repeat (2) @(negedge clk);
    // every tap of the six sets seen in an impulse response: 2 * (25 + 37 + 49)
    $display("impulse-response taps checked: %0d", impulse_taps);
    checks++;
    if (impulse_taps != 2 * (25 + 37 + 49)) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

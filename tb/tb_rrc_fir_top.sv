// tb_rrc_fir_top: end-to-end test of the reconfigurable RRC interpolator at
// its default sizes. All six coefficient sets (25, 37 and 49 taps, two
// roll-off sets each) are programmed with random coefficients, a third of
// them built from repeated nibbles or bytes so that the multipliers' shared
// additions occur. The filter then runs through a schedule of mode
// segments covering every interpolation factor, both roll-off sets, the
// select code 3, and a set reprogrammed while another one is running.
// A reference model takes each captured sample and computes the L outputs
//   y(n, p) = sum_{k: kL+p <= 6L} floor(h[kL+p] * x(n-k) / 2^16)
// with the sample history cleared at each mode change; every output value,
// its branch index and its cycle (from the second clock after capture, one
// per clock)
// are checked. The rate is checked too: one capture every L cycles.
// Counted mechanisms: captures per factor, mode switches, both roll-off
// sets, nibble and byte sharing, a coefficient rewrite while running.
module tb_rrc_fir_top;
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
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference model
  coef_t ref_c [2][3][49];
  sample_t hist [$];
  int cur_intp = -1, cur_flt = -1;
  typedef struct { int value; int phase; int cycle; } exp_t;
  exp_t q [$];
  int cycle = 0;
  int n_take [3] = '{0, 0, 0};
  int n_flt [2] = '{0, 0};
  int n_switch = 0, n_nib = 0, n_byte = 0, n_rewrite = 0, n_sel3 = 0, n_out = 0;
  int last_take = -1;
  bit stim_done = 0;

  function automatic longint hval(input coef_t c);
    return c[HW-1] ? -(longint'(65535) - longint'(c[MW-1:0])) : longint'(c[MW-1:0]);
  endfunction

  function automatic coef_t gen_coef(input int kind);
    logic [7:0] b;
    b = 8'($urandom);
    case (kind % 3)
      0: return coef_t'($urandom);
      1: return {1'($urandom), b, b};
      default: return {1'($urandom), 4'($urandom % 2), 4'($urandom % 2), 4'($urandom), 4'($urandom % 2)};
    endcase
  endfunction

  task automatic write_set(input int f, input int i);
    int l;
    l = 4 + 2 * i;
    for (int n = 0; n <= 6 * l; n++) begin
      ref_c[f][i][n] = gen_coef($urandom);
      @(negedge clk);
      coef_we = 1; coef_flt = 1'(f); coef_intp = 2'(i); coef_tap = TAPW'(n);
      coef_data = ref_c[f][i][n];
    end
    @(negedge clk);
    coef_we = 0;
  endtask

  // capture: called at a negedge where x_take is high
  task automatic on_take();
    int ii, l, f;
    ii = (intp_sel == 3) ? 2 : int'(intp_sel);
    f  = int'(flt_sel);
    l  = 4 + 2 * ii;
    if (intp_sel == 3) n_sel3++;
    // rate: one capture every L cycles
    if (last_take >= 0 && cur_intp >= 0) begin
      checks++;
      if (cycle - last_take != 4 + 2 * cur_intp) begin
        failures++;
        $display("FAIL capture interval %0d", cycle - last_take);
      end
    end
    last_take = cycle;
    if (ii != cur_intp || f != cur_flt) begin
      if (cur_intp >= 0) n_switch++;
      hist.delete();
    end
    cur_intp = ii; cur_flt = f;
    n_take[ii]++; n_flt[f]++;
    hist.push_front(x_in);
    if (hist.size() > NSUB) void'(hist.pop_back());
    for (int p = 0; p < l; p++) begin
      exp_t e;
      longint acc;
      acc = 0;
      for (int k = 0; k < NSUB; k++)
        if (k * l + p <= 6 * l && k < hist.size()) begin
          coef_t c;
          logic [15:0] m;
          c = ref_c[f][ii][k * l + p];
          m = c[HW-1] ? ~c[MW-1:0] : c[MW-1:0];
          if (m[15:8] == m[7:0]) n_byte++;
          else if (m[15:12] == m[11:8] || m[15:12] == m[7:4] || m[15:12] == m[3:0] ||
                   m[11:8] == m[7:4] || m[11:8] == m[3:0] || m[7:4] == m[3:0]) n_nib++;
          acc += (hval(c) * longint'(hist[k])) >>> 16;
        end
      e.value = int'(acc); e.phase = p; e.cycle = cycle + 1 + p;
      q.push_back(e);
    end
  endtask

  // output checker, every negedge
  always @(negedge clk) begin
    cycle <= cycle + 1;
    if (!rst && rrc_valid && !(stim_done && q.size() == 0)) begin
      exp_t e;
      checks++;
      n_out++;
      if (q.size() == 0) begin
        failures++;
        $display("FAIL unexpected output %0d", rrc_out);
      end else begin
        e = q.pop_front();
        if (int'(rrc_out) != e.value || int'(rrc_phase) != e.phase || cycle != e.cycle) begin
          failures++;
          if (failures < 10)
            $display("FAIL out=%0d exp=%0d phase=%0d exp=%0d cycle=%0d exp=%0d",
                     rrc_out, e.value, rrc_phase, e.phase, cycle, e.cycle);
        end
      end
    end
  end

  // stimulus
  int seg_intp [8] = '{0, 0, 1, 2, 1, 3, 2, 0};
  int seg_flt  [8] = '{0, 1, 0, 1, 1, 0, 0, 0};

  initial begin
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 3; i++) write_set(f, i);
    @(negedge clk);
    rst = 0;
    for (int s = 0; s < 8; s++) begin
      int takes;
      takes = 0;
      while (takes < 25) begin
        #1;
        x_in = sample_t'($urandom);
        if (takes % 9 == 4) x_in = (takes % 2) ? 16'sh7fff : -16'sh8000;
        // mode inputs may change at any time; they take effect at a capture
        intp_sel = 2'(seg_intp[s]);
        flt_sel  = 1'(seg_flt[s]);
        #1;
        if (x_take) begin
          on_take();
          takes++;
        end
        // reprogram the (flt 0, L 4) set while L = 6 is running
        if (s == 2 && takes == 10 && x_take) begin
          n_rewrite++;
          fork write_set(0, 0); join_none
        end
        @(negedge clk);
      end
    end
    // drain; captures after this point are not modelled
    stim_done = 1;
    while (q.size() > 0) @(negedge clk);
    repeat (2) @(negedge clk);
    $display("captures L4=%0d L6=%0d L8=%0d flt0=%0d flt1=%0d sel3=%0d switches=%0d",
             n_take[0], n_take[1], n_take[2], n_flt[0], n_flt[1], n_sel3, n_switch);
    $display("nibble sharing=%0d byte sharing=%0d rewrites=%0d outputs=%0d",
             n_nib, n_byte, n_rewrite, n_out);
    checks++;
    if (n_take[0] == 0 || n_take[1] == 0 || n_take[2] == 0 || n_flt[0] == 0 || n_flt[1] == 0 ||
        n_sel3 == 0 || n_switch == 0 || n_nib == 0 || n_byte == 0 || n_rewrite == 0 || n_out == 0) begin
      failures++;
      $display("FAIL a mechanism was never exercised");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_data_generator: feeds a new random sample every cycle and checks that
// the held sample changes only every L cycles (L from the mode latched at
// the previous capture), that x_take marks the captured value, that modes
// take effect only at a capture and that fresh covers exactly the period
// after reset and after each mode change.
module tb_data_generator;
  import rrc_pkg::*;
  int checks = 0, failures = 0, switches = 0;
  logic clk = 0, rst = 1;
  logic [1:0] intp_sel_in = 0;
  logic flt_sel_in = 0;
  sample_t x_in = 0, x;
  logic [PHW-1:0] phase;
  logic [1:0] intp;
  logic flt, x_take, fresh, run;

  data_generator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      if (failures < 20) $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  // reference state
  sample_t m_x;
  int m_l, m_cnt, m_intp, m_flt, m_fresh, m_run;

  initial begin
    m_run = 0; m_cnt = 0; m_intp = 0; m_flt = 0; m_fresh = 1; m_l = 4; m_x = 0;
    repeat (2) @(posedge clk);
    #1 rst = 0;
    for (int c = 0; c < 3000; c++) begin
      // drive at negedge
      @(negedge clk);
      x_in = sample_t'($urandom);
      if (c % 150 == 149) begin
        intp_sel_in = 2'($urandom);
        flt_sel_in  = 1'($urandom);
      end
      #1;
      // x_take expected in the last cycle of a period, or first cycle
      expect_eq(int'(x_take), int'(!m_run || m_cnt == m_l - 1), "x_take");
      if (m_run) begin
        expect_eq(int'(phase), m_cnt, "phase");
        expect_eq(int'(x), int'(m_x), "x");
        expect_eq(int'(fresh), m_fresh, "fresh");
        expect_eq(int'(intp), m_intp, "intp");
        expect_eq(int'(flt), m_flt, "flt");
      end
      @(posedge clk);
      if (!m_run || m_cnt == m_l - 1) begin
        m_fresh = (!m_run || ((int'(intp_sel_in) == 3) ? 2 : int'(intp_sel_in)) != ((m_intp == 3) ? 2 : m_intp) ||
                   int'(flt_sel_in) != m_flt) ? 1 : 0;
        if (m_run && m_fresh) switches++;
        m_run = 1; m_x = x_in; m_intp = int'(intp_sel_in); m_flt = int'(flt_sel_in);
        m_l = (m_intp == 0) ? 4 : (m_intp == 1) ? 6 : 8;
        m_cnt = 0;
      end else m_cnt++;
    end
    $display("mode switches: %0d", switches);
    checks++;
    if (switches == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

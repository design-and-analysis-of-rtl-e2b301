// tb_clk_div: for each interpolation select the phase must count 0..L-1 and
// wrap must rise exactly every L cycles (the divided-clock rate); restart
// must end a period early and start the next at phase 0.
module tb_clk_div;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, restart = 0;
  logic [1:0] lsel = 0;
  logic [PHW-1:0] phase;
  logic wrap;

  clk_div dut (.clk(clk), .rst(rst), .restart(restart), .lsel(lsel), .phase(phase), .wrap(wrap));

  always #5 clk = ~clk;

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic expect_eq(input int got, input int exp, input string what);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0d exp %0d at %0t", what, got, exp, $time);
    end
  endtask

  initial begin
    int lv [4] = '{4, 6, 8, 8};
    repeat (2) @(posedge clk);
    rst <= 0;
    for (int s = 0; s < 4; s++) begin
      // change lsel only in a wrap cycle
      while (!wrap) @(negedge clk);
      @(posedge clk); lsel <= 2'(s);
      @(negedge clk);
      for (int c = 0; c < 3 * lv[s]; c++) begin
        expect_eq(int'(phase), c % lv[s], "phase");
        expect_eq(int'(wrap), int'(c % lv[s] == lv[s] - 1), "wrap");
        @(negedge clk);
      end
    end
    // restart in the middle of a period
    while (phase != 2) @(negedge clk);
    restart = 1;
    #1;
    expect_eq(int'(wrap), 1, "restart wrap");
    @(negedge clk);
    restart = 0;
    expect_eq(int'(phase), 0, "phase after restart");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

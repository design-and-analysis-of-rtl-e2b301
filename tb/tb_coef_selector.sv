// tb_coef_selector: writes all six coefficient sets with random values (and
// some writes beyond the filter length, which must be ignored), then reads
// every (set, branch) and checks h[k] = tap k*L+p of the set, zero beyond 6L.
module tb_coef_selector;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, we = 0, wflt = 0, flt = 0;
  logic [1:0] wintp = 0, intp = 0;
  logic [TAPW-1:0] wtap = 0;
  coef_t wdata = 0;
  logic [PHW-1:0] phase = 0;
  coef_t h [NSUB];
  coef_t ref_c [2][3][49];

  coef_selector dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 3; i++)
        for (int n = 0; n < 49; n++) begin
          ref_c[f][i][n] = coef_t'($urandom);
          if (n <= 6 * (4 + 2 * i)) begin
            @(negedge clk);
            we = 1; wflt = 1'(f); wintp = 2'(i); wtap = TAPW'(n); wdata = ref_c[f][i][n];
          end
        end
    // writes beyond the end of the set: ignored
    for (int n = 25; n < 30; n++) begin
      @(negedge clk);
      we = 1; wflt = 0; wintp = 0; wtap = TAPW'(n); wdata = '1;
    end
    @(negedge clk);
    we = 0;
    for (int f = 0; f < 2; f++)
      for (int i = 0; i < 4; i++) begin
        int l, ii;
        ii = (i == 3) ? 2 : i;
        l = 4 + 2 * ii;
        for (int p = 0; p < l; p++) begin
          flt = 1'(f); intp = 2'(i); phase = PHW'(p);
          #1;
          for (int k = 0; k < NSUB; k++) begin
            coef_t e;
            e = (k * l + p <= 6 * l) ? ref_c[f][ii][k * l + p] : '0;
            checks++;
            if (h[k] != e) begin
              failures++;
              if (failures < 10) $display("FAIL f=%0d i=%0d p=%0d k=%0d h=%h exp=%h", f, i, p, k, h[k], e);
            end
          end
        end
      end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

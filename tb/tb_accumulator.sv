// tb_accumulator: drives random products for each interpolation factor with
// the branch index cycling 0..L-1 and fresh high for the first period, and
// checks each registered output one cycle later against the direct sum
// y(n, p) = sum_k P_k(n-k, p), with products before the first period zero.
// One period with en low checks that the state holds.
module tb_accumulator;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  logic clk = 0, rst = 1, en = 0, fresh = 0;
  logic [PHW-1:0] phase = 0;
  prod_t prod [NSUB];
  acc_t y;
  int hist [64][LMAX][NSUB];   // hist[n][p][k]

  accumulator dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int k = 0; k < NSUB; k++) prod[k] = '0;
    repeat (2) @(negedge clk);
    rst = 0;
    for (int l = 4; l <= 8; l += 2) begin
      for (int n = 0; n < 40; n++) begin
        for (int p = 0; p < l; p++) begin
          @(negedge clk);
          if (n == 20 && p == 0) begin
            // hold for one period: en low
            en = 0;
            repeat (l) @(negedge clk);
          end
          en = 1; fresh = (n == 0); phase = PHW'(p);
          for (int k = 0; k < NSUB; k++) begin
            prod[k] = prod_t'($urandom);
            if (n % 7 == 3) prod[k] = (k % 2) ? 16'sh7fff : -16'sh8000;
            hist[n][p][k] = int'(prod[k]);
          end
          @(negedge clk);
          begin
            int e;
            e = 0;
            for (int k = 0; k < NSUB; k++) if (n - k >= 0) e += hist[n - k][p][k];
            checks++;
            if (int'(y) != e) begin
              failures++;
              if (failures < 10) $display("FAIL L=%0d n=%0d p=%0d y=%0d exp=%0d", l, n, p, y, e);
            end
          end
          // the extra negedge consumed above is a gap cycle with en low
          en = 0;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

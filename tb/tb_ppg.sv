// tb_ppg: checks the partial products 0, X, 2X, 3X against integer products
// for corner and random inputs.
module tb_ppg;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  sample_t x;
  pp_t pp [4];

  ppg dut (.x(x), .pp(pp));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check_one(input int xv);
    x = sample_t'(xv);
    #1;
    for (int i = 0; i < 4; i++) begin
      checks++;
      if (int'(pp[i]) != i * xv) begin
        failures++;
        $display("FAIL x=%0d i=%0d pp=%0d", xv, i, pp[i]);
      end
    end
  endtask

  initial begin
    check_one(0); check_one(1); check_one(-1); check_one(32767); check_one(-32768);
    for (int n = 0; n < 2000; n++) check_one(int'($signed(16'($urandom))));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

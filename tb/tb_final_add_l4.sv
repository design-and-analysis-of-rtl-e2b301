// tb_final_add_l4: random byte sums byte1*X and byte0*X; the result must be
// the full 16-bit magnitude times X.
module tb_final_add_l4;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  bsum_t as5, as6;
  logic signed [SW-1:0] s;

  final_add_l4 dut (.as5(as5), .as6(as6), .s(s));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      longint xv, b1, b0;
      xv = longint'($signed(16'($urandom)));
      b1 = longint'($urandom % 256);
      b0 = longint'($urandom % 256);
      if (n == 0) begin xv = -32768; b1 = 255; b0 = 255; end
      as5 = bsum_t'(xv * b1);
      as6 = bsum_t'(xv * b0);
      #1;
      checks++;
      if (longint'(s) != xv * (b1 * 256 + b0)) begin
        failures++;
        if (failures < 10) $display("FAIL x=%0d b1=%0d b0=%0d s=%0d", xv, b1, b0, s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

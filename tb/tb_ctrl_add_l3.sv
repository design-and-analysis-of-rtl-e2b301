// tb_ctrl_add_l3: nibble sums nibble*X are formed in the testbench; the
// byte sums must equal byte*X, both when the bytes differ and when they are
// equal and A6 is idled (C7).
module tb_ctrl_add_l3;
  import rrc_pkg::*;
  int checks = 0, failures = 0, c7_hits = 0;
  nsum_t as_ [4];
  logic c7;
  bsum_t as5, as6;

  ctrl_add_l3 dut (.as_(as_), .c7(c7), .as5(as5), .as6(as6));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int xv, b1, b0;
      xv = int'($signed(16'($urandom)));
      b1 = int'($urandom % 256);
      b0 = (n % 3 == 0) ? b1 : int'($urandom % 256);
      as_[3] = nsum_t'(xv * (b1 / 16)); as_[2] = nsum_t'(xv * (b1 % 16));
      as_[1] = nsum_t'(xv * (b0 / 16)); as_[0] = nsum_t'(xv * (b0 % 16));
      c7 = (b1 == b0);
      if (c7) c7_hits++;
      #1;
      checks += 2;
      if (int'(as5) != xv * b1) begin
        failures++;
        if (failures < 10) $display("FAIL as5 x=%0d b1=%0d got %0d", xv, b1, as5);
      end
      if (int'(as6) != xv * b0) begin
        failures++;
        if (failures < 10) $display("FAIL as6 x=%0d b0=%0d got %0d", xv, b0, as6);
      end
    end
    checks++;
    if (c7_hits == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

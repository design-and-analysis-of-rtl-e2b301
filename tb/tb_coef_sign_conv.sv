// tb_coef_sign_conv: exhaustive check of the coefficient sign conversion.
// For every 17-bit code the expected magnitude is the lower 16 bits when the
// MSB is 0 and their bitwise inverse when it is 1, computed arithmetically
// as 65535 - field so that it does not reuse the block's inverter form.
module tb_coef_sign_conv;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  coef_t h;
  logic sign;
  logic [MW-1:0] mag;

  coef_sign_conv dut (.h(h), .sign(sign), .mag(mag));

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < (1 << HW); i++) begin
      int field, exp_mag;
      h = coef_t'(i);
      #1;
      field   = i % 65536;
      exp_mag = (i >= 65536) ? 65535 - field : field;
      checks++;
      if (mag != MW'(exp_mag) || sign != (i >= 65536)) begin
        failures++;
        if (failures < 10) $display("FAIL h=%h mag=%h exp=%h", h, mag, exp_mag);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_coef_generator: seven independent random coefficients per input sample;
// each of the seven products must be floor(H * X / 65536).
module tb_coef_generator;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  sample_t x;
  coef_t h [NSUB];
  prod_t prod [NSUB];

  coef_generator dut (.x(x), .h(h), .prod(prod));

  function automatic longint hval(input coef_t c);
    return c[HW-1] ? -(longint'(65535) - longint'(c[MW-1:0])) : longint'(c[MW-1:0]);
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 3000; n++) begin
      x = sample_t'($urandom);
      for (int k = 0; k < NSUB; k++) h[k] = coef_t'($urandom);
      #1;
      for (int k = 0; k < NSUB; k++) begin
        longint e;
        e = (hval(h[k]) * longint'(x)) >>> 16;
        checks++;
        if (longint'(prod[k]) != e) begin
          failures++;
          if (failures < 10) $display("FAIL k=%0d x=%0d h=%h p=%0d exp=%0d", k, x, h[k], prod[k], e);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

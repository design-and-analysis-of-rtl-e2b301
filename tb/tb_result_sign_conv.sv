// tb_result_sign_conv: |H|*X values over the whole reachable range with both
// signs; the output must be floor(+-s / 65536), computed with integer
// division and an explicit correction for negative remainders.
module tb_result_sign_conv;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  logic signed [SW-1:0] s;
  logic sign;
  prod_t p;

  result_sign_conv dut (.s(s), .sign(sign), .p(p));

  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      longint xv, m, v;
      xv = longint'($signed(16'($urandom)));
      m  = longint'($urandom % 65536);
      if (n < 4) begin xv = (n % 2) ? -32768 : 32767; m = 65535; end
      if (n % 5 == 4) m = 65536 * longint'($urandom % 2) / 2;  // exact multiples of 2^16 and zero
      s    = SW'(xv * m);
      sign = 1'($urandom);
      if (n < 4) sign = 1'(n / 2);
      #1;
      v = sign ? -(xv * m) : xv * m;
      checks++;
      if (longint'(p) != floor_div(v, 65536)) begin
        failures++;
        if (failures < 10) $display("FAIL s=%0d sign=%b p=%0d", s, sign, p);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

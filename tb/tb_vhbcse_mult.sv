// tb_vhbcse_mult: end-to-end check of the shift-and-add multiplier.
// Expected product: floor(H * X / 65536), where H is the coefficient value
// (sign bit set: minus (65535 - low 16 bits)). Coefficients are random, at
// the extremes, and built from repeated nibbles/bytes so that the shared
// additions of layers 2 and 3 are exercised (counted).
module tb_vhbcse_mult;
  import rrc_pkg::*;
  int checks = 0, failures = 0, nib_share = 0, byte_share = 0;
  sample_t x;
  coef_t h;
  prod_t p;

  vhbcse_mult dut (.x(x), .h(h), .p(p));

  function automatic longint hval(input coef_t c);
    return c[HW-1] ? -(longint'(65535) - longint'(c[MW-1:0])) : longint'(c[MW-1:0]);
  endfunction
  function automatic longint floor_div(input longint a, input longint b);
    longint q;
    q = a / b;
    if ((a % b != 0) && (a < 0)) q = q - 1;
    return q;
  endfunction

  task automatic check_one(input sample_t xv, input coef_t hv);
    longint e;
    logic [3:0] nb [4];
    x = xv; h = hv;
    #1;
    for (int j = 0; j < 4; j++) nb[j] = 4'(dut.mag >> (4 * j));
    if (nb[0] == nb[1] || nb[0] == nb[2] || nb[0] == nb[3] || nb[1] == nb[2] ||
        nb[1] == nb[3] || nb[2] == nb[3]) nib_share++;
    if (nb[3] == nb[1] && nb[2] == nb[0]) byte_share++;
    e = floor_div(hval(hv) * longint'(xv), 65536);
    checks++;
    if (longint'(p) != e) begin
      failures++;
      if (failures < 10) $display("FAIL x=%0d h=%h p=%0d exp=%0d", xv, hv, p, e);
    end
  endtask

  initial begin
    #10_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    check_one(16'sh7fff, 17'h0ffff); check_one(-16'sh8000, 17'h0ffff);
    check_one(16'sh7fff, 17'h10000); check_one(-16'sh8000, 17'h10000);
    check_one(16'sh1234, 17'h00000); check_one(16'sh1234, 17'h1ffff);
    for (int n = 0; n < 20000; n++) begin
      coef_t hv;
      logic [7:0] b;
      case (n % 4)
        0: hv = coef_t'($urandom);
        1: begin b = 8'($urandom); hv = {1'($urandom), b, b}; end
        2: hv = {1'($urandom), 4'($urandom % 3), 4'($urandom % 3), 4'($urandom % 3), 4'($urandom % 3)};
        default: hv = {1'($urandom), 4'hf, 4'($urandom), 4'hf, 4'($urandom)};
      endcase
      check_one(sample_t'($urandom), hv);
    end
    $display("nibble sharing: %0d, byte sharing: %0d", nib_share, byte_share);
    checks++;
    if (nib_share == 0 || byte_share == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

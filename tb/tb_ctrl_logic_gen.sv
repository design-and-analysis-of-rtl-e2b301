// tb_ctrl_logic_gen: magnitudes are built from nibbles drawn from a small set
// so that every equality case occurs; the seven controls are compared with
// equalities computed on the nibbles and, for C7, directly on the bytes.
module tb_ctrl_logic_gen;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  int hits [7] = '{default: 0};
  logic [MW-1:0] mag;
  logic [6:0] c;

  ctrl_logic_gen dut (.mag(mag), .c(c));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      logic [3:0] nb [4];
      logic [6:0] e;
      for (int j = 0; j < 4; j++) nb[j] = (n % 2) ? 4'($urandom % 3) + 4'd5 : 4'($urandom);
      mag = {nb[3], nb[2], nb[1], nb[0]};
      #1;
      e[0] = nb[3] == nb[2]; e[1] = nb[3] == nb[1]; e[2] = nb[3] == nb[0];
      e[3] = nb[2] == nb[1]; e[4] = nb[2] == nb[0]; e[5] = nb[1] == nb[0];
      e[6] = mag[15:8] == mag[7:0];
      for (int i = 0; i < 7; i++) begin
        checks++;
        if (e[i]) hits[i]++;
        if (c[i] != e[i]) begin
          failures++;
          if (failures < 10) $display("FAIL mag=%h C%0d=%b exp %b", mag, i + 1, c[i], e[i]);
        end
      end
    end
    for (int i = 0; i < 7; i++) begin
      checks++;
      if (hits[i] == 0) begin
        failures++;
        $display("FAIL C%0d never raised", i + 1);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pp_mux_unit: drives four distinct random partial products and random
// magnitudes; each of the eight outputs must equal the partial product named
// by its 2-bit digit of the magnitude.
module tb_pp_mux_unit;
  import rrc_pkg::*;
  int checks = 0, failures = 0;
  pp_t pp [4];
  logic [MW-1:0] mag;
  pp_t sel_pp [8];

  pp_mux_unit dut (.pp(pp), .mag(mag), .sel_pp(sel_pp));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 2000; n++) begin
      for (int i = 0; i < 4; i++) pp[i] = pp_t'({$urandom} + 32'(i) * 32'h1_0000);
      mag = MW'($urandom);
      #1;
      for (int k = 0; k < 8; k++) begin
        int d;
        d = int'((mag / (16'd1 << (2 * k))) % 4);
        checks++;
        if (sel_pp[k] != pp[d]) begin
          failures++;
          if (failures < 10) $display("FAIL mag=%h k=%0d", mag, k);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

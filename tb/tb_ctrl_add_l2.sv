// tb_ctrl_add_l2: layer-1 partial products digit*X and the nibble-equality
// controls are computed in the testbench for random X and magnitudes with
// many repeated nibbles; each nibble sum must equal nibble*X, whether it was
// added or reused. Counts how often each reuse path is taken.
module tb_ctrl_add_l2;
  import rrc_pkg::*;
  int checks = 0, failures = 0, reused = 0;
  pp_t sel_pp [8];
  logic [5:0] c;
  nsum_t as_ [4];

  ctrl_add_l2 dut (.sel_pp(sel_pp), .c(c), .as_(as_));

  initial begin
    #1_000_000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int n = 0; n < 4000; n++) begin
      int xv;
      logic [3:0] nb [4];
      xv = int'($signed(16'($urandom)));
      if (n == 0) xv = -32768;
      for (int j = 0; j < 4; j++) nb[j] = (n % 2) ? 4'($urandom % 2) + 4'd14 : 4'($urandom);
      for (int k = 0; k < 8; k++) sel_pp[k] = pp_t'(xv * int'((nb[k / 2] >> (2 * (k % 2))) & 4'd3));
      c = '0;
      c[0] = nb[3] == nb[2]; c[1] = nb[3] == nb[1]; c[2] = nb[3] == nb[0];
      c[3] = nb[2] == nb[1]; c[4] = nb[2] == nb[0]; c[5] = nb[1] == nb[0];
      if (|c[5:0]) reused++;
      #1;
      for (int j = 0; j < 4; j++) begin
        checks++;
        if (int'(as_[j]) != xv * int'(nb[j])) begin
          failures++;
          if (failures < 10) $display("FAIL x=%0d nib%0d=%0d as=%0d", xv, j, nb[j], as_[j]);
        end
      end
    end
    checks++;
    if (reused == 0) failures++;
    $display("reuse cases: %0d", reused);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

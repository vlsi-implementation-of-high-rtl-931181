// tb_zw_gen: checks the W and Z generators against equations (23) and (26)
// (unscaled) in real arithmetic for random inputs.
module tb_zw_gen;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  iword_t w, z, wn, zn;
  logic   r_neg;
  idx_t   idx;
  int     checks = 0, failures = 0;

  zw_gen #(.SUB(1'b0)) dut_w (.own(w), .oth(z), .r_neg, .idx, .nxt(wn));
  zw_gen #(.SUB(1'b1)) dut_z (.own(z), .oth(w), .r_neg, .idx, .nxt(zn));

  task automatic chk(input string what, input iword_t got, input real exp);
    checks++;
    if (fabs(iw2r(got) - exp) > 2.0 / ONE) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f", what, iw2r(got), exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real W, Z, r, s;
    for (int n = 0; n < 2000; n++) begin
      w = r2iw(urand_range(-1.9, 1.9));  z = r2iw(urand_range(-1.9, 1.9));
      r_neg = 1'($urandom);
      idx = idx_t'($urandom_range(0, 30));
      #1;
      W = iw2r(w); Z = iw2r(z); r = r_neg ? -1.0 : 1.0; s = 2.0 ** (-real'(idx));
      chk("W", wn, W + Z*r*s);
      chk("Z", zn, Z - W*r*s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

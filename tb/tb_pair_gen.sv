// tb_pair_gen: checks both generator flavours against equations (21), (22),
// (24) and (25) evaluated in real arithmetic (unscaled, i.e. without the
// 1/k_i^2 factor), for random coordinates, directions and indices. The
// hardware truncates at each shift, so a few LSBs of difference are allowed.
module tb_pair_gen;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  iword_t u, v, x, y, un, vn, xn, yn;
  logic   d_neg, r_neg;
  idx_t   idx;
  int     checks = 0, failures = 0;

  pair_gen #(.SUB(1'b1)) dut_uv (.own_a(u), .own_b(v), .oth_a(x), .oth_b(y),
    .d_neg, .r_neg, .idx, .nxt_a(un), .nxt_b(vn));
  pair_gen #(.SUB(1'b0)) dut_xy (.own_a(x), .own_b(y), .oth_a(u), .oth_b(v),
    .d_neg, .r_neg, .idx, .nxt_a(xn), .nxt_b(yn));

  task automatic chk(input string what, input iword_t got, input real exp);
    checks++;
    if (fabs(iw2r(got) - exp) > 5.0 / ONE) begin
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
    real U, V, X, Y, d, r, s;
    for (int n = 0; n < 2000; n++) begin
      u = r2iw(urand_range(-1.9, 1.9));  v = r2iw(urand_range(-1.9, 1.9));
      x = r2iw(urand_range(-1.9, 1.9));  y = r2iw(urand_range(-1.9, 1.9));
      d_neg = 1'($urandom);  r_neg = 1'($urandom);
      idx = idx_t'($urandom_range(0, 30));
      #1;
      U = iw2r(u); V = iw2r(v); X = iw2r(x); Y = iw2r(y);
      d = d_neg ? -1.0 : 1.0;  r = r_neg ? -1.0 : 1.0;
      s = 2.0 ** (-real'(idx));
      chk("U", un, U - X*r*s - V*d*s + Y*d*r*s*s);
      chk("V", vn, V - Y*r*s + U*d*s - X*d*r*s*s);
      chk("X", xn, X + U*r*s - Y*d*s - V*d*r*s*s);
      chk("Y", yn, Y + V*r*s + X*d*s + U*d*r*s*s);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

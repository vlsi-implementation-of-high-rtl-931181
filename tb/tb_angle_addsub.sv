// tb_angle_addsub: checks the angle add/subtract step against
// alpha - sign(alpha) * atan(2^-i) computed with real arithmetic and rounded
// to 30 fraction bits, for random residual angles and every index up to 30.
module tb_angle_addsub;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  iword_t ang, ang_next;
  idx_t   idx;
  logic   dir_neg, dir_next_neg;
  int     checks = 0, failures = 0;

  angle_addsub dut (.ang, .idx, .dir_neg, .ang_next, .dir_next_neg);

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    longint exp_step, exp_next;
    for (int n = 0; n < 2000; n++) begin
      ang = r2iw(urand_range(-1.7, 1.7));
      if (n < 32) ang = (n % 2 == 0) ? '0 : ang;
      idx = idx_t'(n % 31);   // the rotator uses at most i = 30
      #1;
      exp_step = longint'($atan(2.0 ** (-real'(idx))) * ONE);
      exp_next = (ang < 0) ? longint'(ang) + exp_step : longint'(ang) - exp_step;
      checks++;
      if (dir_neg !== (ang < 0) || longint'(ang_next) != exp_next ||
          dir_next_neg !== (exp_next < 0)) begin
        failures++;
        if (failures < 10)
          $display("FAIL ang=%0d idx=%0d next=%0d exp=%0d", ang, idx, ang_next, exp_next);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

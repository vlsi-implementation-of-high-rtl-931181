// tb_polar_interp: checks alpha = t*(theta2-theta1) and beta = t*(phi2-phi1)
// against real arithmetic, including t = 0 and t = 1.
module tb_polar_interp;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  word_t       theta1, theta2, phi1, phi2, alpha, beta;
  logic [16:0] t_pos;
  int          checks = 0, failures = 0;

  polar_interp #(.T_FRAC(16)) dut (.theta1, .theta2, .phi1, .phi2, .t_pos, .alpha, .beta);

  task automatic chk(input string what, input word_t got, input real exp);
    checks++;
    if (fabs(w2r(got) - exp) > 2.0 / ONE) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f", what, w2r(got), exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real t;
    for (int n = 0; n < 1000; n++) begin
      theta1 = r2w(urand_range(-0.9, 0.9)); theta2 = r2w(urand_range(-0.9, 0.9));
      phi1   = r2w(urand_range(-0.9, 0.9)); phi2   = r2w(urand_range(-0.9, 0.9));
      t_pos  = (n == 0) ? 17'd0 : (n == 1) ? 17'h10000 : 17'($urandom_range(0, 65536));
      #1;
      t = real'(t_pos) / 65536.0;
      chk("alpha", alpha, t * (w2r(theta2) - w2r(theta1)));
      chk("beta",  beta,  t * (w2r(phi2) - w2r(phi1)));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

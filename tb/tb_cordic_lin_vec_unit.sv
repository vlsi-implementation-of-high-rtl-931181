// tb_cordic_lin_vec_unit: divides random y0 by random x0 of either sign with
// |y0/x0| < 0.98 in 30 iterations and compares z with y0/x0.
module tb_cordic_lin_vec_unit;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  logic   clk = 0, rst_n = 0, load = 0, step = 0;
  idx_t   idx = '0;
  iword_t x0, y0, y, z;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_lin_vec_unit dut (.clk, .rst_n, .load, .x0, .y0, .step, .idx, .y, .z);

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real xr, q;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 500; n++) begin
      xr = urand_range(0.05, 2.5);
      if (n % 2 == 1) xr = -xr;
      q  = urand_range(-0.98, 0.98);
      x0 <= r2iw(xr); y0 <= r2iw(q * xr);
      load <= 1;
      @(posedge clk);
      load <= 0; step <= 1;
      for (int i = 0; i < 30; i++) begin
        idx <= idx_t'(i);
        @(posedge clk);
      end
      step <= 0;
      @(negedge clk);
      checks++;
      // each step truncates x*2^-s, so the error grows as the divisor shrinks
      if (fabs(iw2r(z) - iw2r(y0) / iw2r(x0)) > (40.0 / ONE) / fabs(iw2r(x0))) begin
        failures++;
        if (failures < 10) $display("FAIL x=%f y=%f z=%f", iw2r(x0), iw2r(y0), iw2r(z));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

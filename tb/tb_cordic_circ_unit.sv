// tb_cordic_circ_unit: a vectoring unit and a rotation unit that follows its
// directions. After 30 iterations the vectoring unit must hold
// K*sqrt(x0^2+y0^2) and atan(y0/x0), and the rotation unit must have turned
// its own input by +atan(y0/x0) with gain K. Reference values use real
// trigonometry.
module tb_cordic_circ_unit;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  localparam real KG = 1.6467602581210654;

  logic   clk = 0, rst_n = 0, load = 0, step = 0;
  idx_t   idx = '0;
  iword_t vx0, vy0, rx0, ry0, vx, vy, vz, rx, ry, rz;
  logic   vd, rd_unused;
  int     checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic_circ_unit #(.VECT(1'b1)) dut_v (.clk, .rst_n, .load, .x0(vx0), .y0(vy0),
    .step, .idx, .d_in_neg(1'b0), .d_out_neg(vd), .x(vx), .y(vy), .z(vz));
  cordic_circ_unit #(.VECT(1'b0)) dut_r (.clk, .rst_n, .load, .x0(rx0), .y0(ry0),
    .step, .idx, .d_in_neg(vd), .d_out_neg(rd_unused), .x(rx), .y(ry), .z(rz));

  task automatic chk(input string what, input iword_t got, input real exp, input real tol);
    checks++;
    if (fabs(iw2r(got) - exp) > tol) begin
      failures++;
      if (failures < 10) $display("FAIL %s got=%f exp=%f", what, iw2r(got), exp);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real x0, y0, a0, b0, ang;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 300; n++) begin
      x0 = urand_range(0.05, 1.2);  y0 = urand_range(-1.2, 1.2);
      a0 = urand_range(-1.0, 1.0);  b0 = urand_range(-1.0, 1.0);
      vx0 <= r2iw(x0); vy0 <= r2iw(y0); rx0 <= r2iw(a0); ry0 <= r2iw(b0);
      load <= 1;
      @(posedge clk);
      load <= 0; step <= 1;
      for (int i = 0; i < 30; i++) begin
        idx <= idx_t'(i);
        @(posedge clk);
      end
      step <= 0;
      @(negedge clk);
      ang = $atan2(y0, x0);
      chk("mag",   vx, KG * $sqrt(x0*x0 + y0*y0), 1e-7);
      chk("yres",  vy, 0.0, 1e-7);
      chk("angle", vz, ang, 1e-7);
      chk("rot_x", rx, KG * (a0 * $cos(ang) - b0 * $sin(ang)), 1e-7);
      chk("rot_y", ry, KG * (b0 * $cos(ang) + a0 * $sin(ang)), 1e-7);
      chk("rot_z", rz, ang, 1e-7);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

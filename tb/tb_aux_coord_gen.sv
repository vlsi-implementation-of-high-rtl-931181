// tb_aux_coord_gen: feeds random vectors given in polar form (R, theta, phi)
// (polar angle 0.15 to pi-0.15 rad) and compares U0 = R cos(theta) cos(phi), V0 = R sin(theta) cos(phi),
// W0 = R sin(phi), the reported angles and R with real trigonometry. It
// also checks that ready rises exactly 3*N+2 clock edges after the edge that
// samples the input, and that ready falls when en falls.
module tb_aux_coord_gen;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  localparam int N = N_ITER;   // the default iteration count

  logic  clk = 0, rst_n = 0, en = 0, ready;
  vec3_t xyz_in, uvw_out;
  word_t theta0, phi0, r0;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  aux_coord_gen dut (.clk, .rst_n, .en, .xyz_in, .ready, .uvw_out, .theta0, .phi0, .r0);

  task automatic chk(input string what, input word_t got, input real exp, input real tol);
    checks++;
    if (fabs(w2r(got) - exp) > tol) begin
      failures++;
      if (failures < 20) $display("FAIL %s got=%f exp=%f", what, w2r(got), exp);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    real r, th, ph, x, y, z;
    int  edges;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 200; n++) begin
      r  = urand_range(0.2, 0.95);
      th = urand_range(-PI, PI);
      ph = urand_range(0.15, PI - 0.15);
      if (fabs(ph - PI/2.0) < 0.02) ph = PI/2.0 + 0.05;
      x = r * $cos(th) * $sin(ph);  y = r * $sin(th) * $sin(ph);  z = r * $cos(ph);
      xyz_in <= '{a: r2w(x), b: r2w(y), c: r2w(z)};
      en <= 1;
      @(posedge clk);                  // sampling edge
      xyz_in <= '0;                    // the unit must have captured its input
      edges = 0;
      do begin
        @(posedge clk);
        edges++;
        #1;
      end while (!ready && edges < 1000);
      checks++;
      if (edges != 3*N + 2) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", edges, 3*N + 2);
      end
      chk("U0", uvw_out.a, r * $cos(th) * $cos(ph), 2e-6);
      chk("V0", uvw_out.b, r * $sin(th) * $cos(ph), 2e-6);
      chk("W0", uvw_out.c, r * $sin(ph), 2e-6);
      chk("theta0", theta0, $atan(y / x), 1e-6);
      chk("phi0", phi0, $atan($sqrt(x*x + y*y) / z), 1e-6);
      chk("R", r0, r, 1e-6);
      repeat ($urandom_range(0, 3)) @(posedge clk);
      en <= 0;
      @(posedge clk);
      #1;
      checks++;
      if (ready) begin failures++; $display("FAIL ready stays high after en falls"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_cordic3d_rotator: rotates random vectors, given in polar form, by random
// azimuth and polar increments and compares all six outputs with
// X = R cos(t+a) sin(p+b), Y = R sin(t+a) sin(p+b), Z = R cos(p+b),
// U = R cos(t+a) cos(p+b), V = R sin(t+a) cos(p+b), W = R sin(p+b)
// from real trigonometry. It checks that ready rises exactly N clock edges
// after the sampling edge, that the results hold after en falls, and covers
// both signs of each rotation direction.
module tb_cordic3d_rotator;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  localparam int N = N_ITER;   // the default iteration count

  logic  clk = 0, rst_n = 0, en = 0, ready;
  vec3_t xyz_in, uvw_in, xyz_out, uvw_out;
  word_t alpha, beta;
  int    checks = 0, failures = 0;

  always #5 clk = ~clk;

  cordic3d_rotator dut (.clk, .rst_n, .en, .xyz_in, .uvw_in, .alpha, .beta,
    .ready, .xyz_out, .uvw_out);

  task automatic chk(input string what, input word_t got, input real exp);
    checks++;
    if (fabs(w2r(got) - exp) > 1e-6) begin
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
    real r, th, ph, a, b, t2, p2;
    int  edges;
    repeat (2) @(posedge clk);
    rst_n <= 1;
    for (int n = 0; n < 400; n++) begin
      r  = urand_range(0.1, 0.95);
      th = urand_range(-PI, PI);
      ph = urand_range(0.0, PI);
      a  = urand_range(-1.7, 1.7);
      b  = urand_range(-1.7, 1.7);
      xyz_in <= '{a: r2w(r*$cos(th)*$sin(ph)), b: r2w(r*$sin(th)*$sin(ph)), c: r2w(r*$cos(ph))};
      uvw_in <= '{a: r2w(r*$cos(th)*$cos(ph)), b: r2w(r*$sin(th)*$cos(ph)), c: r2w(r*$sin(ph))};
      alpha  <= r2w(a);
      beta   <= r2w(b);
      en <= 1;
      @(posedge clk);                   // sampling edge
      xyz_in <= '0; uvw_in <= '0; alpha <= '0; beta <= '0;
      edges = 0;
      do begin
        @(posedge clk);
        edges++;
        #1;
      end while (!ready && edges < 1000);
      checks++;
      if (edges != N) begin
        failures++;
        $display("FAIL latency %0d, expected %0d", edges, N);
      end
      en <= 0;
      @(posedge clk);
      #1;
      t2 = th + a;  p2 = ph + b;
      chk("X", xyz_out.a, r*$cos(t2)*$sin(p2));
      chk("Y", xyz_out.b, r*$sin(t2)*$sin(p2));
      chk("Z", xyz_out.c, r*$cos(p2));
      chk("U", uvw_out.a, r*$cos(t2)*$cos(p2));
      chk("V", uvw_out.b, r*$sin(t2)*$cos(p2));
      chk("W", uvw_out.c, r*$sin(p2));
      checks++;
      if (ready) begin failures++; $display("FAIL ready stays high after en falls"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

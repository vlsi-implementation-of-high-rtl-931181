// tb_fig7_interp: vector interpolation between two vectors V1 and V2, four
// intermediate vectors at t = 1/5 .. 4/5, done entirely by the system:
//   1. a pass with t = 0 leaves the memory unchanged, and the polar
//      components of V1 and V2 (stored at entries 0 and 1) are taken from the
//      auxiliary generator's angle outputs while it processes them;
//   2. for each k = 1..4, V1 is reloaded into entry 0 and a pass with those
//      polar components and t = k/5 rotates it into the k-th intermediate
//      vector.
// Each intermediate vector is compared with R1 * (cos th sin ph, sin th sin
// ph, cos ph), th and ph interpolated linearly in real arithmetic, and its
// length with that of V1 (the rotation needs no normalisation).
module tb_fig7_interp;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  localparam int DEPTH = 256;
  localparam int AW    = 8;

  logic          clk = 0, rst_n = 0;
  word_t         theta1 = '0, theta2 = '0, phi1 = '0, phi2 = '0;
  logic [16:0]   t_pos = '0;
  logic [AW-1:0] host_addr = '0;
  logic          host_we = 0;
  vec3_t         host_wdata = '0, host_xyz, host_uvw;
  logic          done;
  word_t         aux_theta, aux_phi, aux_r;
  int            checks = 0, failures = 0;

  // V1 and V2 in polar form
  localparam real R1 = 0.8,  TH1 = 0.35, PH1 = 1.25;
  localparam real R2 = 0.6,  TH2 = 1.30, PH2 = 0.45;

  always #5 clk = ~clk;

  vi3d_top dut (.clk, .rst_n, .theta1, .theta2, .phi1, .phi2, .t_pos,
    .host_addr, .host_we, .host_wdata, .host_xyz, .host_uvw,
    .done, .aux_theta, .aux_phi, .aux_r);

  // Polar components of entries 0 and 1, valid when the controller moves on.
  word_t cap_th [2], cap_ph [2];
  logic [AW-1:0] prev_addr = '0;
  always @(posedge clk) begin
    if (rst_n && dut.ctrl_addr != prev_addr && int'(dut.ctrl_addr) <= 2) begin
      cap_th[int'(dut.ctrl_addr) - 1] <= aux_theta;
      cap_ph[int'(dut.ctrl_addr) - 1] <= aux_phi;
    end
    prev_addr <= dut.ctrl_addr;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(input string what, input real got, input real exp);
    checks++;
    if (fabs(got - exp) > 1e-5) begin
      failures++;
      $display("FAIL %s got=%f exp=%f", what, got, exp);
    end
  endtask

  task automatic host_write(input int a, input real r, th, ph);
    @(negedge clk);
    host_addr = AW'(a);
    host_we = 1;
    host_wdata = '{a: r2w(r*$cos(th)*$sin(ph)), b: r2w(r*$sin(th)*$sin(ph)), c: r2w(r*$cos(ph))};
    @(negedge clk);
    host_we = 0;
  endtask

  task automatic run_pass(input int t);
    t_pos <= 17'(t);
    @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    wait (done);
    @(negedge clk);
    rst_n <= 0;
    repeat (2) @(posedge clk);
  endtask

  initial begin
    real x, y, z, th, ph, tk;
    int  t;
    repeat (2) @(posedge clk);
    for (int k = 0; k < DEPTH; k++)
      if (k == 1) host_write(k, R2, TH2, PH2);
      else        host_write(k, R1, TH1, PH1);

    // 1. polar components from the auxiliary generator
    run_pass(0);
    chk("theta(V1)", w2r(cap_th[0]), TH1);
    chk("phi(V1)",   w2r(cap_ph[0]), PH1);
    chk("theta(V2)", w2r(cap_th[1]), TH2);
    chk("phi(V2)",   w2r(cap_ph[1]), PH2);
    theta1 <= cap_th[0]; phi1 <= cap_ph[0];
    theta2 <= cap_th[1]; phi2 <= cap_ph[1];

    // 2. four intermediate vectors
    for (int k = 1; k <= 4; k++) begin
      host_write(0, R1, TH1, PH1);
      t  = (k * 65536 + 2) / 5;
      run_pass(t);
      tk = real'(t) / 65536.0;
      th = TH1 + tk * (TH2 - TH1);
      ph = PH1 + tk * (PH2 - PH1);
      host_addr = '0;
      #1;
      x = w2r(host_xyz.a); y = w2r(host_xyz.b); z = w2r(host_xyz.c);
      $display("Vi%0d = (%f, %f, %f)", k, x, y, z);
      chk($sformatf("Vi%0d.x", k), x, R1 * $cos(th) * $sin(ph));
      chk($sformatf("Vi%0d.y", k), y, R1 * $sin(th) * $sin(ph));
      chk($sformatf("Vi%0d.z", k), z, R1 * $cos(ph));
      chk($sformatf("|Vi%0d|", k), $sqrt(x*x + y*y + z*z), R1);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

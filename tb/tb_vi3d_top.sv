// tb_vi3d_top: end-to-end test of the whole system at its default size
// (256 entries, 30 CORDIC iterations). The host loads 256 random unit-ball
// vectors, releases reset and waits for done; every rotated (X,Y,Z) in the
// graphic memory and every (U,V,W) in the auxiliary memory is then compared
// with real trigonometry. A second pass, started by another reset, rotates
// the results again with other angles, so the auxiliary coordinates are
// regenerated from rotated vectors. The first pass interpolates at t = 0.6,
// the second at t = 1.
//
// It counts each mechanism of the control flow and fails if one never
// happened: waiting for the auxiliary generator (A), the auxiliary-memory
// write handshake (C), waiting for the rotator (D), the graphic-memory write
// handshake (F), stepping the address (G to A) and finishing (H). It checks
// the cycle counts: the rotator phase of each entry lasts N+2 cycles and
// consecutive visits to G are 4N+11 cycles apart.
module tb_vi3d_top;
  import cordic_pkg::*;
  import tb_fix_pkg::*;

  localparam int DEPTH = 256;
  localparam int N     = 30;
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

  real ex [DEPTH], ey [DEPTH], ez [DEPTH];     // expected (X,Y,Z)
  real eu [DEPTH], ev [DEPTH], ew [DEPTH];     // expected (U,V,W)

  // mechanism counters
  int n_wait_aux = 0, n_uvw_wr = 0, n_wait_rot = 0, n_xyz_wr = 0, n_step = 0, n_done = 0;
  int rot_cycles = 0, entry_cycles = 0, bad_rot_len = 0, bad_entry_len = 0;

  always #5 clk = ~clk;

  vi3d_top dut (.clk, .rst_n, .theta1, .theta2, .phi1, .phi2, .t_pos,
    .host_addr, .host_we, .host_wdata, .host_xyz, .host_uvw,
    .done, .aux_theta, .aux_phi, .aux_r);

  // Observe the control flow through the unit handshakes.
  logic [AW-1:0] last_addr;
  logic          last_done;
  logic          seen_g = 1'b0;
  always @(posedge clk) begin
    if (rst_n) begin
      if (dut.uvw_en && !dut.uvw_mem_we && !dut.uvw_ready) n_wait_aux++;
      if (dut.uvw_mem_we && !dut.xyz_mem_we && dut.uvw_wr_ready) n_uvw_wr++;
      if (dut.c3d_en && !dut.c3d_ready) n_wait_rot++;
      if (dut.xyz_mem_we && dut.xyz_wr_ready) n_xyz_wr++;
      if (dut.c3d_en) rot_cycles++;
      else if (rot_cycles != 0) begin
        if (rot_cycles != N + 2) bad_rot_len++;
        rot_cycles = 0;
      end
      // state G is the only state with no enable and no done
      entry_cycles++;
      if (!dut.uvw_en && !dut.c3d_en && !dut.uvw_mem_we && !dut.xyz_mem_we && !done) begin
        if (seen_g && entry_cycles != 4*N + 11) bad_entry_len++;
        seen_g = 1'b1;
        entry_cycles = 0;
      end
      if (dut.ctrl_addr != last_addr) n_step++;
      if (done && !last_done) n_done++;
    end else begin
      entry_cycles = 0;
      rot_cycles = 0;
      seen_g = 1'b0;
    end
    last_addr <= dut.ctrl_addr;
    last_done <= done;
  end

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // Rotate (x,y,z) by (a,b) in azimuth and polar angle.
  task automatic rotate(input real x, y, z, a, b, output real xo, yo, zo, uo, vo, wo);
    real r, th, ph;
    r  = $sqrt(x*x + y*y + z*z);
    th = $atan2(y, x);
    ph = $acos(z / r);
    xo = r * $cos(th + a) * $sin(ph + b);
    yo = r * $sin(th + a) * $sin(ph + b);
    zo = r * $cos(ph + b);
    uo = r * $cos(th + a) * $cos(ph + b);
    vo = r * $sin(th + a) * $cos(ph + b);
    wo = r * $sin(ph + b);
  endtask

  // Keep polar angles away from the axis and from the x-y plane.
  function automatic bit polar_ok(input real x, y, z);
    real ph;
    ph = $acos(z / $sqrt(x*x + y*y + z*z));
    return (ph > 0.15) && (ph < PI - 0.15) && (fabs(ph - PI/2.0) > 0.05);
  endfunction

  task automatic chk(input string what, input int k, input word_t got, input real exp);
    checks++;
    if (fabs(w2r(got) - exp) > 1e-5) begin
      failures++;
      if (failures < 20) $display("FAIL %s[%0d] got=%f exp=%f", what, k, w2r(got), exp);
    end
  endtask

  task automatic run_pass(input real th1, th2, ph1, ph2, input int t);
    theta1 <= r2w(th1); theta2 <= r2w(th2); phi1 <= r2w(ph1); phi2 <= r2w(ph2);
    t_pos  <= 17'(t);
    @(posedge clk);
    rst_n <= 1;
    @(posedge clk);
    wait (done);
    @(negedge clk);
  endtask

  task automatic read_back(input string pass);
    for (int k = 0; k < DEPTH; k++) begin
      host_addr = AW'(k);
      #1;
      chk({pass, " X"}, k, host_xyz.a, ex[k]);
      chk({pass, " Y"}, k, host_xyz.b, ey[k]);
      chk({pass, " Z"}, k, host_xyz.c, ez[k]);
      chk({pass, " U"}, k, host_uvw.a, eu[k]);
      chk({pass, " V"}, k, host_uvw.b, ev[k]);
      chk({pass, " W"}, k, host_uvw.c, ew[k]);
    end
  endtask

  initial begin
    real x, y, z, r, th, ph, a1, b1, a2, b2, xo, yo, zo, uo, vo, wo;
    // Pass 1 position: t = 39322 / 65536 = 0.6000 (the nearest code).
    a1 = (1.75 - 0.25) * 39322.0 / 65536.0;  b1 = (-0.9 - 0.1) * 39322.0 / 65536.0;
    a2 = -1.2;                 b2 = 0.5;
    // Load the graphic memory while the controller is held in reset.
    repeat (2) @(posedge clk);
    for (int k = 0; k < DEPTH; k++) begin
      do begin
        r  = urand_range(0.2, 0.9);
        th = urand_range(-PI, PI);
        ph = urand_range(0.0, PI);
        x = r * $cos(th) * $sin(ph);  y = r * $sin(th) * $sin(ph);  z = r * $cos(ph);
        rotate(x, y, z, a1, b1, xo, yo, zo, uo, vo, wo);
      end while (!polar_ok(x, y, z) || !polar_ok(xo, yo, zo));
      ex[k] = xo; ey[k] = yo; ez[k] = zo; eu[k] = uo; ev[k] = vo; ew[k] = wo;
      @(negedge clk);
      host_addr = AW'(k);
      host_we = 1;
      host_wdata = '{a: r2w(x), b: r2w(y), c: r2w(z)};
    end
    @(negedge clk);
    host_we = 0;

    // Pass 1: interpolation at t = 0.6 between (0.25, 0.1) and (1.75, -0.9).
    run_pass(0.25, 1.75, 0.1, -0.9, 39322);
    read_back("pass1");

    // Pass 2: rotate the rotated vectors again, at t = 1.
    for (int k = 0; k < DEPTH; k++) begin
      rotate(ex[k], ey[k], ez[k], a2, b2, xo, yo, zo, uo, vo, wo);
      ex[k] = xo; ey[k] = yo; ez[k] = zo; eu[k] = uo; ev[k] = vo; ew[k] = wo;
    end
    @(negedge clk);
    rst_n <= 0;
    repeat (2) @(posedge clk);
    run_pass(0.0, -1.2, 0.0, 0.5, 65536);
    read_back("pass2");

    $display("mechanisms: aux-wait=%0d uvw-write=%0d rot-wait=%0d xyz-write=%0d step=%0d done=%0d",
             n_wait_aux, n_uvw_wr, n_wait_rot, n_xyz_wr, n_step, n_done);
    checks++;
    if (n_wait_aux == 0 || n_uvw_wr != 2*DEPTH || n_wait_rot == 0 || n_xyz_wr != 2*DEPTH ||
        n_step != 2*(DEPTH-1) || n_done != 2) begin
      failures++; $display("FAIL a mechanism did not happen as often as expected");
    end
    checks++;
    if (bad_rot_len != 0 || bad_entry_len != 0) begin
      failures++;
      $display("FAIL cycle counts: %0d rotator phases not %0d cycles, %0d entries not %0d cycles",
               bad_rot_len, N + 2, bad_entry_len, 4*N + 11);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

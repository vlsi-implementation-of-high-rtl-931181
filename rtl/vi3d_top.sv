// vi3d_top: CORDIC-based 3-D vector interpolator system.
//
// The system rotates every vector stored in its graphic memory so that the
// vector's azimuth grows by alpha and its polar angle by beta, where
// (alpha, beta) = t * (theta2 - theta1, phi2 - phi1) comes from linear
// interpolation of two polar positions. For each address the control unit
// runs the auxiliary coordinate generator on (X,Y,Z), stores the resulting
// (U,V,W) in the auxiliary memory, runs the 3-D CORDIC rotator on both
// triples read from the two banks, and writes both rotated triples back in
// place. Because the rotator works on (X,Y,Z) and (U,V,W) at once, a whole
// 3-D rotation costs one CORDIC computation time.
//
// The five blocks and their connections follow the system diagram of the
// document. The host port is this design's own: while rst_n is low, or
// after the pass has finished (done high), the host owns both banks through
// host_addr/host_we/host_wdata (writes go to the graphic memory) and reads
// them on host_xyz/host_uvw. Releasing rst_n starts one pass over all DEPTH
// entries. aux_theta/aux_phi/aux_r show the polar form of the last vector
// seen by the auxiliary generator.
//
// Timing: each entry takes 4*N_IT+11 cycles: 3*N_IT+4 in state A (the
// auxiliary generator), N_IT+2 in state D (the rotator) and one cycle in
// each of B, C, E, F and G. With the defaults a pass over 256 entries takes
// 256*131 = 33536 cycles.
module vi3d_top
  import cordic_pkg::*;
#(
  parameter int DEPTH  = 256,
  parameter int N_IT   = N_ITER,
  parameter int T_FRAC = 16,
  parameter int AW     = $clog2(DEPTH)
) (
  input  logic          clk,
  input  logic          rst_n,
  // rotation request
  input  word_t         theta1,
  input  word_t         theta2,
  input  word_t         phi1,
  input  word_t         phi2,
  input  logic [T_FRAC:0] t_pos,
  // host port
  input  logic [AW-1:0] host_addr,
  input  logic          host_we,
  input  vec3_t         host_wdata,
  output vec3_t         host_xyz,
  output vec3_t         host_uvw,
  // status
  output logic          done,
  output word_t         aux_theta,
  output word_t         aux_phi,
  output word_t         aux_r
);
  logic          uvw_en, c3d_en, uvw_mem_re, uvw_mem_we, xyz_mem_re, xyz_mem_we;
  logic          uvw_ready, c3d_ready, uvw_wr_ready, xyz_wr_ready;
  logic [AW-1:0] ctrl_addr, mem_addr;
  logic          host_owns;
  vec3_t         xyz_rd, uvw_rd, aux_uvw, rot_xyz, rot_uvw;
  vec3_t         xyz_wd, uvw_wd;
  logic          xyz_we, uvw_we, xyz_re, uvw_re;
  word_t         alpha, beta;

  assign host_owns = !rst_n || done;

  // Host / controller sharing of the two banks.
  always_comb begin
    mem_addr = host_owns ? host_addr : ctrl_addr;
    xyz_re   = host_owns ? 1'b1 : xyz_mem_re;
    uvw_re   = host_owns ? 1'b1 : uvw_mem_re;
    xyz_we   = host_owns ? host_we : xyz_mem_we;
    uvw_we   = host_owns ? 1'b0 : uvw_mem_we;
    xyz_wd   = host_owns ? host_wdata : rot_xyz;
    // Auxiliary memory: B/C store the generator's result, E/F the rotated one.
    uvw_wd   = c3d_en || xyz_mem_we ? rot_uvw : aux_uvw;
  end

  assign host_xyz = xyz_rd;
  assign host_uvw = uvw_rd;

  ctrl_fsm #(.DEPTH(DEPTH), .AW(AW)) u_ctrl (
    .clk, .rst_n,
    .uvw_ready, .uvw_wr_ready, .c3d_ready, .xyz_wr_ready,
    .uvw_en, .c3d_en, .uvw_mem_re, .uvw_mem_we, .xyz_mem_re, .xyz_mem_we,
    .addr(ctrl_addr), .done);

  vec_mem #(.DEPTH(DEPTH), .AW(AW)) u_graphic_mem (
    .clk, .rst_n, .addr(mem_addr), .re(xyz_re), .we(xyz_we),
    .wdata(xyz_wd), .rdata(xyz_rd), .wr_ready(xyz_wr_ready));

  vec_mem #(.DEPTH(DEPTH), .AW(AW)) u_aux_mem (
    .clk, .rst_n, .addr(mem_addr), .re(uvw_re), .we(uvw_we),
    .wdata(uvw_wd), .rdata(uvw_rd), .wr_ready(uvw_wr_ready));

  aux_coord_gen #(.N_IT(N_IT)) u_aux_gen (
    .clk, .rst_n, .en(uvw_en), .xyz_in(xyz_rd), .ready(uvw_ready),
    .uvw_out(aux_uvw), .theta0(aux_theta), .phi0(aux_phi), .r0(aux_r));

  polar_interp #(.T_FRAC(T_FRAC)) u_interp (
    .theta1, .theta2, .phi1, .phi2, .t_pos, .alpha, .beta);

  cordic3d_rotator #(.N_IT(N_IT)) u_rot (
    .clk, .rst_n, .en(c3d_en), .xyz_in(xyz_rd), .uvw_in(uvw_rd),
    .alpha, .beta, .ready(c3d_ready), .xyz_out(rot_xyz), .uvw_out(rot_uvw));
endmodule

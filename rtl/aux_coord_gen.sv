// aux_coord_gen: auxiliary coordinate generator. From a vector (X0,Y0,Z0) it
// computes the auxiliary coordinates the 3-D rotator needs,
//   U0 = X0 cot(phi0),  V0 = Y0 cot(phi0),  W0 = Z0 tan(phi0) = R sin(phi0),
// where phi0 is the polar angle of the vector measured from the z axis, and
// it also reports theta0 = atan(Y0/X0), atan(sqrt(X0^2+Y0^2)/Z0) and
// R = |(X0,Y0,Z0)|. The two angles are principal values in (-90, 90)
// degrees: for Z0 < 0 the second one is phi0 - 180 degrees.
//
// It is built only from CORDIC units, in three phases of N_IT iterations,
// one iteration per clock:
//   1. a circular vectoring unit turns (|X0|, Y0) onto the x axis, giving
//      K*sqrt(X0^2+Y0^2) and theta0;
//   2. after removing the gain K, a second circular vectoring unit turns
//      (Z0, sqrt(X0^2+Y0^2)) onto the x axis, giving phi0 and K*R (onto the
//      negative x axis when Z0 < 0, giving phi0 - 180 degrees and -K*R). Four
//      rotation-mode units follow its directions d_i in lockstep and turn
//      (X0,0), (Y0,0), (Z0,0) and (1,0) by +phi0, giving K*X0*(cos,sin)phi0,
//      and so on;
//   3. three linear vectoring units divide: U0 = (K X0 cos)/(K sin),
//      V0 = (K Y0 cos)/(K sin), W0 = (K Z0 sin)/(K cos). The gain K cancels,
//      and so does the sign flip of phase 2 for Z0 < 0, so U0, V0 and W0 are
//      right for every polar angle.
// The arrangement of the nine CORDIC units follows the document. This
// design's own choices: the word-serial schedule, the 1/K scaling between
// phases 1 and 2, feeding Z0 as the x input of the second vectoring unit so
// that its angle is the polar angle from the z axis (as the definitions of
// U, V and W require), and using |X0| in phase 1 so that the magnitude is
// right for vectors with negative X0.
//
// Valid inputs: R < 1 (so that the quotients stay inside (-1,1)) and the
// vector neither on the z axis nor in the x-y plane (the divisors sin(phi0)
// and cos(phi0) must not vanish; the error of a quotient grows as about
// 2^-25 divided by its divisor).
//
// Not needed, and left unused: the residual y outputs of the vectoring and
// linear units, the y outputs of the X and Y rotation units, the x output
// of the Z rotation unit and the angle outputs of the rotation units.
//
// Interface and timing: while en is high and the unit is idle, xyz_in is
// sampled on the next clock edge; ready rises 3*N_IT+2 edges later and stays
// high, with the results, while en stays high. When en falls the unit goes
// back to idle; the outputs hold until the next start.
module aux_coord_gen
  import cordic_pkg::*;
#(
  parameter int N_IT = N_ITER
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  vec3_t xyz_in,
  output logic  ready,
  output vec3_t uvw_out,
  output word_t theta0,
  output word_t phi0,
  output word_t r0
);
  typedef enum logic [2:0] {S_IDLE, S_P1, S_LOAD2, S_P2, S_LOAD3, S_P3, S_DONE} state_t;
  state_t state;
  idx_t   idx;
  vec3_t  xyz_q;

  logic load1, load2, load3, step1, step2, step3;
  logic last;

  iword_t v1_x, v1_y, v1_z;        // phase 1 vectoring
  iword_t v2_x, v2_y, v2_z;        // phase 2 vectoring
  logic   v1_d, v2_d;
  iword_t rx_x, rx_y, ry_x, ry_y, rz_x, rz_y, r1_x, r1_y, unused_z[4];
  logic   unused_d[4];
  iword_t lu_y, lu_z, lv_y, lv_z, lw_y, lw_z;
  iword_t abs_x0;

  assign last  = (int'(idx) == N_IT - 1);
  assign load1 = (state == S_IDLE) && en;
  assign load2 = (state == S_LOAD2);
  assign load3 = (state == S_LOAD3);
  assign step1 = (state == S_P1);
  assign step2 = (state == S_P2);
  assign step3 = (state == S_P3);

  assign abs_x0 = xyz_in.a[DATA_W-1] ? -widen(xyz_in.a) : widen(xyz_in.a);

  // Phase 1: m=1 vectoring of (|X0|, Y0).
  cordic_circ_unit #(.VECT(1'b1)) u_vec1 (
    .clk, .rst_n, .load(load1), .x0(abs_x0), .y0(widen(xyz_in.b)),
    .step(step1), .idx, .d_in_neg(1'b0), .d_out_neg(v1_d),
    .x(v1_x), .y(v1_y), .z(v1_z));

  // Phase 2: m=1 vectoring of (Z0, sqrt(X0^2+Y0^2)) and four rotation units.
  cordic_circ_unit #(.VECT(1'b1)) u_vec2 (
    .clk, .rst_n, .load(load2), .x0(widen(xyz_q.c)), .y0(widen(scale(v1_x, INV_K))),
    .step(step2), .idx, .d_in_neg(1'b0), .d_out_neg(v2_d),
    .x(v2_x), .y(v2_y), .z(v2_z));

  cordic_circ_unit #(.VECT(1'b0)) u_rot_x (
    .clk, .rst_n, .load(load2), .x0(widen(xyz_q.a)), .y0('0),
    .step(step2), .idx, .d_in_neg(v2_d), .d_out_neg(unused_d[0]),
    .x(rx_x), .y(rx_y), .z(unused_z[0]));
  cordic_circ_unit #(.VECT(1'b0)) u_rot_y (
    .clk, .rst_n, .load(load2), .x0(widen(xyz_q.b)), .y0('0),
    .step(step2), .idx, .d_in_neg(v2_d), .d_out_neg(unused_d[1]),
    .x(ry_x), .y(ry_y), .z(unused_z[1]));
  cordic_circ_unit #(.VECT(1'b0)) u_rot_z (
    .clk, .rst_n, .load(load2), .x0(widen(xyz_q.c)), .y0('0),
    .step(step2), .idx, .d_in_neg(v2_d), .d_out_neg(unused_d[2]),
    .x(rz_x), .y(rz_y), .z(unused_z[2]));
  cordic_circ_unit #(.VECT(1'b0)) u_rot_1 (
    .clk, .rst_n, .load(load2), .x0(iword_t'(1) <<< DATA_FRAC), .y0('0),
    .step(step2), .idx, .d_in_neg(v2_d), .d_out_neg(unused_d[3]),
    .x(r1_x), .y(r1_y), .z(unused_z[3]));

  // Phase 3: m=0 vectoring (division).
  cordic_lin_vec_unit u_div_u (
    .clk, .rst_n, .load(load3), .x0(r1_y), .y0(rx_x), .step(step3), .idx, .y(lu_y), .z(lu_z));
  cordic_lin_vec_unit u_div_v (
    .clk, .rst_n, .load(load3), .x0(r1_y), .y0(ry_x), .step(step3), .idx, .y(lv_y), .z(lv_z));
  cordic_lin_vec_unit u_div_w (
    .clk, .rst_n, .load(load3), .x0(r1_x), .y0(rz_y), .step(step3), .idx, .y(lw_y), .z(lw_z));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      xyz_q <= '0;
    end else begin
      unique case (state)
        S_IDLE:  if (en) begin
          xyz_q <= xyz_in;
          idx   <= '0;
          state <= S_P1;
        end
        S_P1:    if (last) state <= S_LOAD2; else idx <= idx + 1'b1;
        S_LOAD2: begin idx <= '0; state <= S_P2; end
        S_P2:    if (last) state <= S_LOAD3; else idx <= idx + 1'b1;
        S_LOAD3: begin idx <= '0; state <= S_P3; end
        S_P3:    if (last) state <= S_DONE;  else idx <= idx + 1'b1;
        S_DONE:  if (!en) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  assign ready     = (state == S_DONE);
  assign uvw_out.a = narrow(lu_z);
  assign uvw_out.b = narrow(lv_z);
  assign uvw_out.c = narrow(lw_z);
  // Phase 1 worked on |X0|: mirror its angle back for X0 < 0.
  assign theta0    = xyz_q.a[DATA_W-1] ? narrow(-v1_z) : narrow(v1_z);
  assign phi0      = narrow(v2_z);
  assign r0        = v2_x[INT_W-1] ? scale(-v2_x, INV_K) : scale(v2_x, INV_K);
endmodule

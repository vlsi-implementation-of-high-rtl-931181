// cordic3d_rotator: the 3-D vector interpolator (CORDIC_3D).
//
// Rotates a vector given in Cartesian form (X,Y,Z) together with its
// auxiliary coordinates (U,V,W) = (R cos(theta) cos(phi), R sin(theta)
// cos(phi), R sin(phi)) so that its azimuth grows by alpha and its polar angle
// by beta. Each CORDIC iteration i turns both angles at once by
// +/-atan(2^-i): the directions delta_i and rho_i are the signs of the
// residual angles. All six coordinates are updated in the same clock cycle by
// two pair generators ((U,V) and (X,Y), four 2-D CORDIC micro-rotations) and
// two half generators (W and Z), so a full 3-D rotation takes the time of one
// ordinary 2-D CORDIC computation. After the last iteration the outputs are
// post-scaled: X,Y,U,V by 1/K^2 and Z,W by 1/K.
//
// The equations, the generator structure and the post-scaling follow the
// document. The word-serial schedule (one iteration per clock), the enable /
// ready handshake and the use of ordinary two's complement adders rather
// than redundant (carry-free) adders are this design's choices.
//
// Interface and timing: while en is high and the unit is idle it samples
// xyz_in, uvw_in, alpha and beta on the next clock edge, then runs N_IT
// iterations, one per clock, and raises ready N_IT clock edges after the
// sampling edge. ready and the results stay valid while en stays high; when
// en falls the unit returns to idle and the results remain on the outputs
// until the next start. |alpha| and |beta| must not exceed 1.743 rad, the
// convergence range of the circular CORDIC.
module cordic3d_rotator
  import cordic_pkg::*;
#(
  parameter int N_IT = N_ITER
) (
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  vec3_t xyz_in,
  input  vec3_t uvw_in,
  input  word_t alpha,
  input  word_t beta,
  output logic  ready,
  output vec3_t xyz_out,
  output vec3_t uvw_out
);
  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_t;
  state_t state;
  idx_t   idx;

  iword_t x_q, y_q, z_q, u_q, v_q, w_q, a_q, b_q;
  iword_t x_n, y_n, z_n, u_n, v_n, w_n, a_n, b_n;
  logic   d_neg, r_neg;

  // Angle datapaths: delta_i from alpha_i, rho_i from beta_i. The next
  // direction outputs are left open: the register holding alpha_{i+1} gives
  // delta_{i+1} directly in the following cycle.
  angle_addsub u_alpha (.ang(a_q), .idx(idx), .dir_neg(d_neg), .ang_next(a_n), .dir_next_neg());
  angle_addsub u_beta  (.ang(b_q), .idx(idx), .dir_neg(r_neg), .ang_next(b_n), .dir_next_neg());

  // (U,V) generator: R(UV) - rho 2^-i R(XY); (X,Y) generator: R(XY) + rho 2^-i R(UV).
  pair_gen #(.SUB(1'b1)) u_uv_gen (
    .own_a(u_q), .own_b(v_q), .oth_a(x_q), .oth_b(y_q),
    .d_neg(d_neg), .r_neg(r_neg), .idx(idx), .nxt_a(u_n), .nxt_b(v_n));
  pair_gen #(.SUB(1'b0)) u_xy_gen (
    .own_a(x_q), .own_b(y_q), .oth_a(u_q), .oth_b(v_q),
    .d_neg(d_neg), .r_neg(r_neg), .idx(idx), .nxt_a(x_n), .nxt_b(y_n));

  // W and Z generators (half 2-D CORDIC each).
  zw_gen #(.SUB(1'b0)) u_w_gen (.own(w_q), .oth(z_q), .r_neg(r_neg), .idx(idx), .nxt(w_n));
  zw_gen #(.SUB(1'b1)) u_z_gen (.own(z_q), .oth(w_q), .r_neg(r_neg), .idx(idx), .nxt(z_n));

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_IDLE;
      idx   <= '0;
      {x_q, y_q, z_q, u_q, v_q, w_q, a_q, b_q} <= '0;
    end else begin
      unique case (state)
        S_IDLE: if (en) begin
          x_q   <= widen(xyz_in.a);
          y_q   <= widen(xyz_in.b);
          z_q   <= widen(xyz_in.c);
          u_q   <= widen(uvw_in.a);
          v_q   <= widen(uvw_in.b);
          w_q   <= widen(uvw_in.c);
          a_q   <= widen(alpha);
          b_q   <= widen(beta);
          idx   <= '0;
          state <= S_RUN;
        end
        S_RUN: begin
          {x_q, y_q, z_q, u_q, v_q, w_q, a_q, b_q} <= {x_n, y_n, z_n, u_n, v_n, w_n, a_n, b_n};
          if (int'(idx) == N_IT - 1) state <= S_DONE;
          else                       idx   <= idx + 1'b1;
        end
        S_DONE: if (!en) state <= S_IDLE;
        default: state <= S_IDLE;
      endcase
    end
  end

  // Post-scaling: 1/K^2 for the pairs, 1/K for Z and W.
  always_comb begin
    xyz_out.a = scale(x_q, INV_K2);
    xyz_out.b = scale(y_q, INV_K2);
    xyz_out.c = scale(z_q, INV_K);
    uvw_out.a = scale(u_q, INV_K2);
    uvw_out.b = scale(v_q, INV_K2);
    uvw_out.c = scale(w_q, INV_K);
  end

  assign ready = (state == S_DONE);

endmodule

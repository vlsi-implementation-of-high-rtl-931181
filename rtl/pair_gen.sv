// pair_gen: the (U,V) or (X,Y) generator of the 3-D CORDIC rotator, one
// iteration.
//
// A 3-D rotation step turns the azimuth by alpha_i = delta_i*atan(2^-i) and
// the polar angle by beta_i = rho_i*atan(2^-i). For the pairs (U,V) and (X,Y)
// this is (eq. 32/33 in matrix form)
//   own_{i+1} = R_delta * own_i  -/+  rho_i 2^-i * R_delta * other_i
// where R_delta is the unscaled 2-D CORDIC micro-rotation
//   [a; b] -> [a - delta 2^-i b; b + delta 2^-i a].
// The generator therefore holds two 2-D CORDIC micro-rotations (own pair and
// other pair), a hard-wired shifter 2^-i on the rotated other pair, and two
// adders/subtractors steered by rho_i. SUB = 1 builds the (U,V) generator
// (subtract when rho = +1), SUB = 0 the (X,Y) generator (add when rho = +1).
// The 1/k_i^2 gain is not applied here; the rotator removes the total K^2
// after the last iteration.
//
// Purely combinational. Interface: own_a/own_b = pair being generated,
// oth_a/oth_b = the other pair, d_neg/r_neg = delta_i/rho_i (1 means -1),
// idx = i; nxt_a/nxt_b = the generated pair for iteration i+1.
module pair_gen
  import cordic_pkg::*;
#(
  parameter bit SUB = 1'b1
) (
  input  iword_t own_a,
  input  iword_t own_b,
  input  iword_t oth_a,
  input  iword_t oth_b,
  input  logic   d_neg,
  input  logic   r_neg,
  input  idx_t   idx,
  output iword_t nxt_a,
  output iword_t nxt_b
);
  iword_t own_ra, own_rb;   // 2-D CORDIC on the own pair
  iword_t oth_ra, oth_rb;   // 2-D CORDIC on the other pair
  iword_t sh_a, sh_b;       // shifter 2^-i
  logic   sub_op;

  always_comb begin
    own_ra = d_neg ? own_a + (own_b >>> idx) : own_a - (own_b >>> idx);
    own_rb = d_neg ? own_b - (own_a >>> idx) : own_b + (own_a >>> idx);
    oth_ra = d_neg ? oth_a + (oth_b >>> idx) : oth_a - (oth_b >>> idx);
    oth_rb = d_neg ? oth_b - (oth_a >>> idx) : oth_b + (oth_a >>> idx);
    sh_a   = oth_ra >>> idx;
    sh_b   = oth_rb >>> idx;
    sub_op = SUB ^ r_neg;
    nxt_a  = sub_op ? own_ra - sh_a : own_ra + sh_a;
    nxt_b  = sub_op ? own_rb - sh_b : own_rb + sh_b;
  end
endmodule

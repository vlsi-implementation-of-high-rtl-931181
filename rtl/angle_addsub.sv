// angle_addsub: one step of the angle datapath of the 3-D CORDIC rotator.
//
// The residual rotation angle (alpha_i for the azimuth, beta_i for the polar
// angle) decides the direction of micro-rotation i: +1 when it is zero or
// positive, -1 when negative. The adder/subtractor then removes the angle just
// rotated, atan(2^-i), and the sign of the result is the direction of the
// next iteration. This is the ADD/SUB box fed with tan^-1 2^-i in the
// architecture of the interpolator; the two's complement encoding of the
// directions (dir_neg = 1 means -1) is this design's choice.
//
// Purely combinational. Interface: ang = residual angle (Q4.30), idx = i;
// dir_neg = direction of step i, ang_next = residual after step i,
// dir_next_neg = direction of step i+1.
module angle_addsub
  import cordic_pkg::*;
(
  input  iword_t ang,
  input  idx_t   idx,
  output logic   dir_neg,
  output iword_t ang_next,
  output logic   dir_next_neg
);
  iword_t step_ang;

  always_comb begin
    step_ang     = atan_tab(idx);
    dir_neg      = ang[INT_W-1];
    ang_next     = dir_neg ? ang + step_ang : ang - step_ang;
    dir_next_neg = ang_next[INT_W-1];
  end
endmodule

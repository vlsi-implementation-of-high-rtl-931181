// polar_interp: first step of CORDIC vector interpolation. To place an
// intermediate vector at position t between two vectors V1 and V2, their
// polar components are interpolated linearly; the rotation that carries V1
// to the intermediate vector is then
//   alpha = t * (theta2 - theta1),   beta = t * (phi2 - phi1),
// which the 3-D rotator applies (second step) without any normalisation,
// because a CORDIC rotation keeps the length. The document describes the two
// steps in words; the unsigned position format (T_FRAC fraction bits, so
// t = 1.0 is 2^T_FRAC) and saturation of the results are this design's
// choices.
//
// Purely combinational. Angles are Q2.30 radians.
module polar_interp
  import cordic_pkg::*;
#(
  parameter int T_FRAC = 16
) (
  input  word_t             theta1,
  input  word_t             theta2,
  input  word_t             phi1,
  input  word_t             phi2,
  input  logic [T_FRAC:0]   t_pos,
  output word_t             alpha,
  output word_t             beta
);
  localparam int PW = DATA_W + T_FRAC + 3;

  function automatic word_t interp(input word_t a1, input word_t a2, input logic [T_FRAC:0] t);
    logic signed [PW-1:0] d, p;
    d = PW'(a2) - PW'(a1);
    p = (d * signed'(PW'(t))) >>> T_FRAC;
    if (p > PW'(signed'({1'b0, {(DATA_W-1){1'b1}}})))      return {1'b0, {(DATA_W-1){1'b1}}};
    else if (p < PW'(signed'({1'b1, {(DATA_W-1){1'b0}}}))) return {1'b1, {(DATA_W-1){1'b0}}};
    else                                                   return word_t'(p);
  endfunction

  assign alpha = interp(theta1, theta2, t_pos);
  assign beta  = interp(phi1, phi2, t_pos);
endmodule

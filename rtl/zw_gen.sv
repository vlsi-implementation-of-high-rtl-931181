// zw_gen: the W or Z generator of the 3-D CORDIC rotator, one iteration.
//
// Z and W change only with the polar angle, so each needs half of a 2-D
// CORDIC: a hard-wired shifter 2^-i on the other coordinate and one
// adder/subtractor steered by rho_i:
//   W_{i+1} = W_i + rho_i 2^-i Z_i   (SUB = 0)
//   Z_{i+1} = Z_i - rho_i 2^-i W_i   (SUB = 1)
// These follow equations (23) and (26). The 1/k_i gain is removed after the
// last iteration by the rotator.
//
// Purely combinational. Interface: own = coordinate generated, oth = the
// other one, r_neg = rho_i (1 means -1), idx = i; nxt = value for i+1.
module zw_gen
  import cordic_pkg::*;
#(
  parameter bit SUB = 1'b1
) (
  input  iword_t own,
  input  iword_t oth,
  input  logic   r_neg,
  input  idx_t   idx,
  output iword_t nxt
);
  iword_t sh;
  logic   sub_op;

  always_comb begin
    sh     = oth >>> idx;
    sub_op = SUB ^ r_neg;
    nxt    = sub_op ? own - sh : own + sh;
  end
endmodule

// cordic_circ_unit: word-serial circular (m = 1) CORDIC.
//
// One micro-rotation per clock, following equations (1)-(3) with m = 1 and
// s(1,i) = i:
//   x_{i+1} = x_i - d_i 2^-i y_i,  y_{i+1} = y_i + d_i 2^-i x_i,
//   z_{i+1} = z_i + d_i atan(2^-i)  (rotation),  z_i - d_i atan(2^-i)  (vectoring)
// where d_i = +1 turns the vector counter-clockwise. In vectoring mode
// (VECT = 1) the unit picks d_i = -sign(x_i)*sign(y_i) to drive y to zero, so
// z ends at atan(y0/x0) (for x0 > 0) and x at K*sqrt(x0^2+y0^2); it also
// publishes the opposite direction on d_out_neg, which is the direction that
// turns another vector by +atan(y0/x0). In rotation mode (VECT = 0) the unit
// follows d_in_neg, so several units can rotate in lockstep with one
// vectoring unit, as the auxiliary coordinate generator does. z then holds
// the angle turned so far. Results carry the CORDIC gain K.
//
// Interface and timing: load (priority) copies x0,y0 and clears z; step
// performs iteration idx on the next edge. The caller sequences idx.
// d_out_neg is combinational from the current x,y (1 means -1); d_in_neg is
// used in the same cycle.
module cordic_circ_unit
  import cordic_pkg::*;
#(
  parameter bit VECT = 1'b1
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  iword_t x0,
  input  iword_t y0,
  input  logic   step,
  input  idx_t   idx,
  input  logic   d_in_neg,
  output logic   d_out_neg,
  output iword_t x,
  output iword_t y,
  output iword_t z
);
  logic   d_neg;      // direction used in this iteration (1 = clockwise)
  iword_t x_n, y_n, z_n;

  always_comb begin
    // Turning by +atan(y0/x0) needs sign(x)*sign(y); vectoring turns the other way.
    d_out_neg = x[INT_W-1] ^ y[INT_W-1];
    d_neg     = VECT ? ~d_out_neg : d_in_neg;
    x_n = d_neg ? x + (y >>> idx) : x - (y >>> idx);
    y_n = d_neg ? y - (x >>> idx) : y + (x >>> idx);
    // z counts the angle turned, or in vectoring mode the angle removed.
    z_n = (d_neg ^ VECT) ? z - atan_tab(idx) : z + atan_tab(idx);
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0;
    end else if (load) begin
      x <= x0; y <= y0; z <= '0;
    end else if (step) begin
      x <= x_n; y <= y_n; z <= z_n;
    end
  end
endmodule

// cordic_lin_vec_unit: word-serial linear (m = 0) CORDIC in vectoring mode,
// used as a divider.
//
// Following equations (1)-(3) with m = 0 and s(0,i) = i+1, x stays constant
// and each clock performs
//   y_{i+1} = y_i - d_i 2^-(i+1) x,   z_{i+1} = z_i + d_i 2^-(i+1)
// with d_i = sign(x)*sign(y_i), which drives y to zero so that z converges to
// y0/x0. Because the first step is 2^-1, the quotient must satisfy
// |y0/x0| < 1; the result is then accurate to about 2^-(n) for n steps.
// Either sign of x0 is accepted.
//
// Interface and timing: load (priority) copies x0,y0 and clears z; step
// performs iteration idx on the next edge. z is the quotient, Q4.30.
module cordic_lin_vec_unit
  import cordic_pkg::*;
(
  input  logic   clk,
  input  logic   rst_n,
  input  logic   load,
  input  iword_t x0,
  input  iword_t y0,
  input  logic   step,
  input  idx_t   idx,
  output iword_t y,
  output iword_t z
);
  iword_t x;
  iword_t y_n, z_n, inc;
  logic   d_neg;
  logic [IDX_W:0] s;

  always_comb begin
    s     = {1'b0, idx} + 1'b1;
    d_neg = x[INT_W-1] ^ y[INT_W-1];
    inc   = (s > (IDX_W+1)'(DATA_FRAC)) ? '0 : (iword_t'(1) <<< (DATA_FRAC - int'(s)));
    y_n   = d_neg ? y + (x >>> s) : y - (x >>> s);
    z_n   = d_neg ? z - inc : z + inc;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      x <= '0; y <= '0; z <= '0;
    end else if (load) begin
      x <= x0; y <= y0; z <= '0;
    end else if (step) begin
      y <= y_n; z <= z_n;
    end
  end
endmodule

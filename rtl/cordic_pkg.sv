// cordic_pkg: word formats and constants shared by the CORDIC vector
// interpolator.
//
// Data words (coordinates X,Y,Z,U,V,W and angles) are signed fixed point with
// DATA_FRAC fraction bits in a DATA_W-bit word: with the defaults, Q2.30 in 32
// bits, so a value lies in [-2, 2). The 32-bit word follows the 32-bit chip
// of the design; the Q2.30 split is this design's choice. Inside the CORDIC
// units the words are widened by two integer bits (INT_W) so that the
// unscaled CORDIC gain (up to K^2 = 2.71) cannot overflow.
//
// The arctangent table holds round(atan(2^-i) * 2^30) for i = 0..31. The
// gain constants are 1/K and 1/K^2 with K = prod_{i=0}^{n-1} sqrt(1+2^-2i),
// rounded to 2^-30; for n >= 16 the value of K no longer changes at this
// precision, so they serve every iteration count from 16 to 32.
package cordic_pkg;

  localparam int DATA_W    = 32;            // external word
  localparam int DATA_FRAC = 30;            // fraction bits
  localparam int INT_W     = DATA_W + 2;    // internal CORDIC word
  localparam int N_ITER    = 30;            // CORDIC iterations per computation
  localparam int IDX_W     = 5;             // width of the iteration index

  typedef logic signed [DATA_W-1:0] word_t;
  typedef logic signed [INT_W-1:0]  iword_t;
  typedef logic        [IDX_W-1:0]  idx_t;

  // One stored vector: three coordinates.
  typedef struct packed {
    word_t a;   // X or U
    word_t b;   // Y or V
    word_t c;   // Z or W
  } vec3_t;

  // 1/K and 1/K^2 in Q2.30.
  localparam word_t INV_K  = 32'sh26dd3b6a;   // 0.6072529350
  localparam word_t INV_K2 = 32'sh1799b34c;   // 0.3687561272

  // atan(2^-i) in Q2.30, i = 0..31.
  function automatic iword_t atan_tab(input idx_t i);
    logic [31:0] v;
    case (i)
      5'd0:  v = 32'h3243f6a9;  5'd1:  v = 32'h1dac6705;
      5'd2:  v = 32'h0fadbafd;  5'd3:  v = 32'h07f56ea7;
      5'd4:  v = 32'h03feab77;  5'd5:  v = 32'h01ffd55c;
      5'd6:  v = 32'h00fffaab;  5'd7:  v = 32'h007fff55;
      5'd8:  v = 32'h003fffeb;  5'd9:  v = 32'h001ffffd;
      // below here atan(2^-i) rounds to 2^-i at 30 fraction bits
      default: v = (i > 5'd30) ? 32'h0 : (32'h4000_0000 >> i);
    endcase
    return iword_t'(signed'(v));
  endfunction

  // Sign extension of a data word into the internal width.
  function automatic iword_t widen(input word_t w);
    return iword_t'(w);
  endfunction

  // Multiply an internal word by a Q2.30 constant and return the data word
  // (saturating to the data range).
  function automatic word_t scale(input iword_t v, input word_t k);
    logic signed [INT_W+DATA_W-1:0] p;
    logic signed [INT_W+DATA_W-1:0] q;
    p = (INT_W+DATA_W)'(v) * (INT_W+DATA_W)'(k);
    q = p >>> DATA_FRAC;
    if (q > (INT_W+DATA_W)'(signed'({1'b0, {(DATA_W-1){1'b1}}})))
      return {1'b0, {(DATA_W-1){1'b1}}};
    else if (q < (INT_W+DATA_W)'(signed'({1'b1, {(DATA_W-1){1'b0}}})))
      return {1'b1, {(DATA_W-1){1'b0}}};
    else
      return word_t'(q);
  endfunction

  // Saturate an internal word to the data range.
  function automatic word_t narrow(input iword_t v);
    if (v > iword_t'(signed'({1'b0, {(DATA_W-1){1'b1}}})))
      return {1'b0, {(DATA_W-1){1'b1}}};
    else if (v < iword_t'(signed'({1'b1, {(DATA_W-1){1'b0}}})))
      return {1'b1, {(DATA_W-1){1'b0}}};
    else
      return word_t'(v);
  endfunction

endpackage

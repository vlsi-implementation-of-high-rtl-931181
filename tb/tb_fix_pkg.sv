// tb_fix_pkg: conversions between the Q2.30 / Q4.30 words of the design and
// real numbers, for the self-checking testbenches.
package tb_fix_pkg;
  localparam real ONE = 1073741824.0;   // 2^30
  localparam real PI  = 3.14159265358979323846;

  function automatic real w2r(input logic signed [31:0] w);
    return real'(w) / ONE;
  endfunction

  function automatic real iw2r(input logic signed [33:0] w);
    return real'(w) / ONE;
  endfunction

  function automatic logic signed [31:0] r2w(input real r);
    return 32'(longint'(r * ONE));
  endfunction

  function automatic logic signed [33:0] r2iw(input real r);
    return 34'(longint'(r * ONE));
  endfunction

  function automatic real urand_range(input real lo, input real hi);
    return lo + (hi - lo) * (real'($urandom) / 4294967296.0);
  endfunction

  function automatic real fabs(input real r);
    return (r < 0.0) ? -r : r;
  endfunction
endpackage

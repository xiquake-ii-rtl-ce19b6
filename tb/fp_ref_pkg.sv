// fp_ref_pkg: reference arithmetic for the floating-point testbenches.
//
// Converts between IEEE-754 single-precision bit patterns and the
// simulator's double-precision real, truncating toward zero when going to
// single precision (the rounding the hardware implements), and compares
// two single-precision results within a tolerance in units in the last
// place. The double is built by re-biasing the exponent field, so the
// reference shares no code with the design.
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    d = '0;
    if (f[30:23] != 8'd0)
      d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    else
      d = {f[31], 63'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == 63'd0) return {d[63], 31'd0};
    e = int'(d[62:52]) - 1023 + 127;
    if (e <= 0)   return {d[63], 31'd0};
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    return {d[63], 8'(e), d[51:29]};
  endfunction

  // True when a and b are equal or adjacent values of the same sign,
  // within tol units in the last place.
  function automatic bit close(input logic [31:0] a, input logic [31:0] b, input int tol);
    int diff;
    if (a == b) return 1'b1;
    if (a[30:0] == 31'd0 && b[30:0] == 31'd0) return 1'b1;
    if (a[31] != b[31]) return 1'b0;
    diff = int'(a[30:0]) - int'(b[30:0]);
    return (diff <= tol) && (diff >= -tol);
  endfunction

  // A random normal number with an unbiased exponent in [-lim, lim].
  function automatic logic [31:0] rnd_fp(input int lim);
    int e;
    e = int'($urandom_range(2 * lim)) - lim + 127;
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

endpackage

// fp_ref_pkg: reference arithmetic for the testbenches.
//
// Converts single-precision words to and from the simulator's double
// precision reals with the same conventions as the cores: subnormal inputs
// read as zero, results rounded to nearest even, subnormal results flushed
// to a signed zero, overflow to a signed infinity, any NaN returned as the
// quiet NaN 7FC00000. Sums, differences and products of two single-precision
// values computed in double precision and then rounded here give the
// correctly rounded single-precision result (double rounding is harmless
// because 53 >= 2*24 + 2).
package fp_ref_pkg;

  function automatic real f2r(input logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) begin
      d = {f[31], 63'd0};
    end else if (f[30:23] == 8'hFF) begin
      d = {f[31], 11'h7FF, (f[22:0] != 0), 51'd0};
    end else begin
      d = {f[31], 11'(f[30:23]) - 11'd127 + 11'd1023, f[22:0], 29'd0};
    end
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(input real r);
    logic [63:0] d;
    logic        s, g, st;
    int          e;
    logic [24:0] m;
    d = $realtobits(r);
    s = d[63];
    if (d[62:52] == 11'h7FF) return (d[51:0] != 0) ? 32'h7FC00000 : {s, 8'hFF, 23'd0};
    if (d[62:0] == 0) return {s, 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {s, 8'hFF, 23'd0};
    if (e <= 0) return {s, 31'd0};
    return {s, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_op(input int op, input logic [31:0] a, input logic [31:0] b);
    case (op)
      0:       return r2f(f2r(a) + f2r(b));
      1:       return r2f(f2r(a) - f2r(b));
      default: return r2f(f2r(a) * f2r(b));
    endcase
  endfunction

  function automatic logic is_nan(input logic [31:0] f);
    return (f[30:23] == 8'hFF) && (f[22:0] != 0);
  endfunction

  // Same value, or both NaN.
  function automatic logic fp_match(input logic [31:0] got, input logic [31:0] exp);
    return (got == exp) || (is_nan(got) && is_nan(exp));
  endfunction

  // A random normal number with exponent in [ebase, ebase+espan).
  function automatic logic [31:0] rand_fp(input int ebase, input int espan);
    logic [7:0] e;
    e = 8'(ebase + int'($urandom_range(espan - 1)));
    return {1'($urandom), e, 23'($urandom)};
  endfunction

  // A small integer as a single-precision word (exact).
  function automatic logic [31:0] int2f(input int v);
    return r2f(real'(v));
  endfunction

endpackage

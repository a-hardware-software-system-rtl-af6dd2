// tb_fp_pkg: independent reference arithmetic for the testbenches.
//
// Single precision values are widened to the simulator's double precision
// `real`, combined there, and rounded back to single precision with round
// to nearest, ties to even. A product of two singles is exact in double,
// and a double-rounded sum of two singles equals the correctly rounded sum
// (53 >= 2*24 + 2), so the results are the IEEE-754 single precision ones.
// Subnormals are flushed to zero on both sides, matching the kernel's units.
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 8'h00) return $bitstoreal({f[31], 63'd0});
    if (f[30:23] == 8'hFF) return $bitstoreal({f[31], 11'h7FF, f[22:0], 29'd0});
    d = {f[31], 11'(int'(f[30:23]) - 127 + 1023), f[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, st;
    d = $realtobits(r);
    if (d[62:52] == 11'h7FF) return d[51:0] != 0 ? 32'h7FC0_0000 : {d[63], 8'hFF, 23'd0};
    if (d[62:52] == 11'h000) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {2'b01, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    m  = m + 25'(g & (st | m[0]));
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic is_nan(logic [31:0] f);
    return f[30:23] == 8'hFF && f[22:0] != 0;
  endfunction

  // Random normal single with exponent in [emin, emax]
  function automatic logic [31:0] rand_f(int emin, int emax);
    int e;
    e = emin + int'($urandom % (emax - emin + 1));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  // Two results agree if bit-identical, or both NaN
  function automatic logic same(logic [31:0] x, logic [31:0] y);
    if (is_nan(x) || is_nan(y)) return is_nan(x) && is_nan(y);
    return x == y;
  endfunction

  // Complex values as {re, im}
  function automatic logic [63:0] ref_cmul(logic [63:0] x, logic [63:0] w);
    logic [31:0] rr, ii, ri, ir;
    rr = ref_mul(x[63:32], w[63:32]);
    ii = ref_mul(x[31:0],  w[31:0]);
    ri = ref_mul(x[63:32], w[31:0]);
    ir = ref_mul(x[31:0],  w[63:32]);
    return {ref_add(rr, {~ii[31], ii[30:0]}), ref_add(ri, ir)};
  endfunction

  function automatic logic [63:0] ref_cadd(logic [63:0] x, logic [63:0] y);
    return {ref_add(x[63:32], y[63:32]), ref_add(x[31:0], y[31:0])};
  endfunction

  function automatic logic [63:0] rand_c(int emin, int emax);
    return {rand_f(emin, emax), rand_f(emin, emax)};
  endfunction

  function automatic logic csame(logic [63:0] x, logic [63:0] y);
    return same(x[63:32], y[63:32]) && same(x[31:0], y[31:0]);
  endfunction

endpackage

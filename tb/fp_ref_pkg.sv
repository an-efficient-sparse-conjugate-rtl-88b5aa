// fp_ref_pkg: reference single-precision arithmetic for the testbenches,
// computed independently of the RTL through double-precision reals.
// to_f32 rounds a real to single precision (nearest-even, subnormals flushed
// to zero, like the RTL); to_real widens a single to a real.  A sum or
// product of two singles is exact in double precision except for sums of
// operands far apart in magnitude, so checks allow one unit in the last place.
package fp_ref_pkg;
  function automatic real to_real(logic [31:0] f);
    logic [63:0] d;
    if (f[30:23] == 0) return 0.0;
    d = {f[31], 11'(int'(f[30:23]) + 896), f[22:0], 29'd0};
    if (f[30:23] == 8'hff) d[62:52] = 11'h7ff;
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] to_f32(real r);
    logic [63:0] d;
    int          e;
    logic [24:0] m;
    logic        g, s;
    d = $realtobits(r);
    e = int'(d[62:52]) - 1023 + 127;
    if (d[62:52] == 0) return {d[63], 31'd0};
    m = {2'b01, d[51:29]};
    g = d[28];
    s = |d[27:0];
    if (g && (s || m[0])) m = m + 1;
    if (m[24]) begin m = m >> 1; e = e + 1; end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // |a - b| in units of the last place (finite operands)
  function automatic longint ulp_diff(logic [31:0] a, logic [31:0] b);
    longint ia, ib;
    ia = a[31] ? -longint'(a[30:0]) : longint'(a[30:0]);
    ib = b[31] ? -longint'(b[30:0]) : longint'(b[30:0]);
    return (ia > ib) ? ia - ib : ib - ia;
  endfunction

  // random finite single with exponent in [127-er, 127+er]
  function automatic logic [31:0] rand_f32(int er);
    int e;
    e = 127 - er + int'($urandom_range(2 * er, 0));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction
endpackage

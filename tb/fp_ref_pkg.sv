// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Values are widened to double precision, computed with the simulator's
// real arithmetic and rounded back to single precision (nearest, ties to
// even). For +, - and * the double-precision result rounds to the same
// single-precision value as an exact computation, because 53 >= 2*24+2.
// Results below the normal range are flushed to zero, as in the RTL.
package fp_ref_pkg;

  function automatic real fp2real(logic [31:0] v);
    logic [63:0] d;
    if (v[30:23] == 8'd0) return 0.0;
    d = {v[31], 11'(v[30:23]) - 11'd127 + 11'd1023, v[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real2fp(real r);
    logic [63:0] d;
    logic [23:0] m;
    logic        g, st;
    int          e;
    d = $realtobits(r);
    if (d[62:0] == '0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    g  = d[28];
    st = |d[27:0];
    m  = {1'b0, d[51:29]} + 24'(g && (st || d[29]));
    if (m[23]) e = e + 1;
    if (e >= 255) return {d[63], 8'hFF, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), m[22:0]};
  endfunction

  // Random normal number with exponent field in [elo, ehi].
  function automatic logic [31:0] rand_fp(int elo, int ehi);
    int e;
    e = elo + int'($urandom_range(ehi - elo));
    return {1'($urandom), 8'(e), 23'($urandom)};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return real2fp(fp2real(a) + fp2real(b));
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return real2fp(fp2real(a) * fp2real(b));
  endfunction

  // Piecewise-linear logistic function (PLAN segments), each step rounded.
  function automatic logic [31:0] fsig(logic [31:0] v);
    real z;
    logic [31:0] f;
    z = fp2real({1'b0, v[30:0]});
    if (z >= 5.0) return v[31] ? 32'h0 : 32'h3F80_0000;
    if (z >= 2.375)    f = fadd(real2fp(z / 32.0), 32'h3F58_0000);
    else if (z >= 1.0) f = fadd(real2fp(z / 8.0),  32'h3F20_0000);
    else               f = fadd(real2fp(z / 4.0),  32'h3F00_0000);
    if (v[31]) return fadd(32'h3F80_0000, {1'b1, f[30:0]});
    return f;
  endfunction

  // err * (y * (1 - y)), each step rounded.
  function automatic logic [31:0] fdelta(logic [31:0] y, logic [31:0] err);
    return fmul(err, fmul(y, fadd(32'h3F80_0000, {~y[31], y[30:0]})));
  endfunction

endpackage

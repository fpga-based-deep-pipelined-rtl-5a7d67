// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Works independently of the RTL floating-point units: operands are widened
// to double precision bit by bit, the operation is done by the simulator in
// double precision, and the result is rounded back to single precision
// (nearest, ties to even) by bit manipulation of the double. Rounding a
// double-precision sum or product of two singles to single gives the
// correctly rounded single result. Like the RTL, subnormals read as zero
// and results below the smallest normal are flushed to a signed zero.
package fp_ref_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [63:0] dbits;
    if (f[30:23] == 8'd0) dbits = {f[31], 63'd0};
    else if (f[30:23] == 8'hff) dbits = {f[31], 11'h7ff, f[22:0], 29'd0};
    else dbits = {f[31], 11'(f[30:23]) + 11'd896, f[22:0], 29'd0};
    return $bitstoreal(dbits);
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] dbits;
    logic        sg;
    int          e;
    logic [24:0] m;
    logic        g, st;
    dbits = $realtobits(r);
    sg = dbits[63];
    if (dbits[62:52] == 11'd0) return {sg, 31'd0};
    if (dbits[62:52] == 11'h7ff) return (dbits[51:0] != 0) ? 32'h7fc0_0000 : {sg, 8'hff, 23'd0};
    e  = int'(dbits[62:52]) - 1023 + 127;
    m  = {2'b01, dbits[51:29]};
    g  = dbits[28];
    st = |dbits[27:0];
    if (g && (st || m[0])) m = m + 25'd1;
    if (m[24]) begin
      m = m >> 1;
      e = e + 1;
    end
    if (e >= 255) return {sg, 8'hff, 23'd0};
    if (e <= 0) return {sg, 31'd0};
    return {sg, 8'(e), m[22:0]};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) + f2r(b));
  endfunction

  function automatic logic [31:0] fsub(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) - f2r(b));
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // A random normal single with exponent in [127-span, 127+span].
  function automatic logic [31:0] rand_f(int span);
    logic [31:0] v;
    v = $urandom;
    v[30:23] = 8'(127 - span + int'($urandom_range(0, 2 * span)));
    return v;
  endfunction

endpackage

// fp_ref_pkg: reference single-precision arithmetic for the testbenches.
//
// Works through the simulator's double-precision real type: a single is
// widened exactly to a double, the operation is done in double, and the
// result is rounded back to single, to nearest with ties to even. Subnormal
// inputs count as zero and subnormal results are flushed to signed zero, as in
// the RTL. Products of two singles are exact in double; sums that are not
// exact differ from their single result by far less than half an ulp, so the
// double rounding never changes a result. Infinities and NaN are not handled
// here; testbenches check those cases against literal values.
package fp_ref_pkg;

  function automatic real sp2real(logic [31:0] x);
    logic [63:0] d;
    if (x[30:23] == 8'h00) return 0.0;
    d = {x[31], 11'(x[30:23]) - 11'd127 + 11'd1023, x[22:0], 29'd0};
    return $bitstoreal(d);
  endfunction

  function automatic logic [31:0] real2sp(real r);
    logic [63:0] d;
    logic [23:0] m;
    logic [24:0] mr;
    logic        g, st, up;
    int          e;
    d = $realtobits(r);
    if (d[62:52] == 11'd0) return {d[63], 31'd0};
    e  = int'(d[62:52]) - 1023 + 127;
    m  = {1'b1, d[51:29]};
    g  = d[28];
    st = |d[27:0];
    up = g & (st | m[0]);
    mr = {1'b0, m} + 25'(up);
    if (mr[24]) begin
      mr = mr >> 1;
      e  = e + 1;
    end
    if (e >= 255) return {d[63], 8'hff, 23'd0};
    if (e <= 0)   return {d[63], 31'd0};
    return {d[63], 8'(e), mr[22:0]};
  endfunction

  function automatic logic [31:0] ref_add(logic [31:0] a, logic [31:0] b);
    return real2sp(sp2real(a) + sp2real(b));
  endfunction

  function automatic logic [31:0] ref_mul(logic [31:0] a, logic [31:0] b);
    return real2sp(sp2real(a) * sp2real(b));
  endfunction

  // Random normal single with biased exponent in [elo, ehi].
  function automatic logic [31:0] rand_sp(int elo, int ehi);
    logic [31:0] r;
    r = $urandom;
    r[30:23] = 8'(elo + ($urandom % (ehi - elo + 1)));
    return r;
  endfunction

endpackage

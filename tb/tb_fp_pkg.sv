// tb_fp_pkg: reference arithmetic for the testbenches.
//
// Single-precision results are computed in double precision and then rounded
// to single precision, to nearest with ties to even; for one addition or
// multiplication of two singles this gives the correctly rounded single
// result. Subnormals are flushed to zero, as in the design. The package also
// generates the pseudo-random feature values that the memory model serves,
// and the reference distance of one point in the same order of operations
// the datapath uses (a zero-padded balanced adder tree over the features of
// one port word, then accumulation word by word).
package tb_fp_pkg;

  function automatic real f2r(logic [31:0] f);
    logic [10:0] e;
    if (f[30:23] == 0) return 0.0;
    e = 11'(f[30:23]) - 11'd127 + 11'd1023;
    return $bitstoreal({f[31], e, f[22:0], 29'd0});
  endfunction

  function automatic logic [31:0] r2f(real r);
    logic [63:0] b;
    int          fe;
    logic [24:0] mant;
    logic [28:0] rem;
    b = $realtobits(r);
    if (b[62:52] == 0) return {b[63], 31'd0};
    fe   = int'(b[62:52]) - 1023 + 127;
    mant = {2'b01, b[51:29]};
    rem  = b[28:0];
    if (rem > 29'h1000_0000 || (rem == 29'h1000_0000 && mant[0])) mant = mant + 1;
    if (mant[24]) begin
      mant = mant >> 1;
      fe   = fe + 1;
    end
    if (fe <= 0)   return {b[63], 31'd0};
    if (fe >= 255) return {b[63], 8'hFF, 23'd0};
    return {b[63], 8'(fe), mant[22:0]};
  endfunction

  function automatic logic [31:0] fadd(logic [31:0] a, logic [31:0] b);
    logic [31:0] y;
    y = r2f(f2r(a) + f2r(b));
    if (y[30:0] == 0) y = 32'd0;     // exact zero is +0 in the design
    return y;
  endfunction

  function automatic logic [31:0] fmul(logic [31:0] a, logic [31:0] b);
    return r2f(f2r(a) * f2r(b));
  endfunction

  // Feature value number n of memory bank `bank`: a float in about [-16, 16).
  function automatic logic [31:0] gen_float(int unsigned bank, int unsigned n);
    logic [31:0] h;
    h = n * 32'h9E37_79B1 ^ (bank + 1) * 32'h85EB_CA77;
    h = h ^ (h >> 15);
    h = h * 32'hC2B2_AE3D;
    h = h ^ (h >> 13);
    return {h[31], 8'(124 + h[26:24]), h[22:0]};
  endfunction

  // Partial distance of m features, balanced tree padded to a power of two.
  function automatic logic [31:0] ref_partial(logic [31:0] x[$], logic [31:0] q[$],
                                              bit euclid);
    int unsigned m, np;
    logic [31:0] t[];
    m  = x.size();
    np = 1;
    while (np < m) np = np * 2;
    t = new[2 * np - 1];
    for (int l = 0; l < np; l++) begin
      logic [31:0] d;
      if (l < m) begin
        d = fadd(x[l], {~q[l][31], q[l][30:0]});
        t[np-1+l] = euclid ? fmul(d, d) : {1'b0, d[30:0]};
      end else begin
        t[np-1+l] = 32'd0;
      end
    end
    for (int n = int'(np) - 2; n >= 0; n--) t[n] = fadd(t[2*n+1], t[2*n+2]);
    return t[0];
  endfunction

  // Full distance of a point of x.size() features with `lanes` floats per
  // port word.
  function automatic logic [31:0] ref_dist(logic [31:0] x[$], logic [31:0] q[$],
                                           bit euclid, int unsigned lanes);
    logic [31:0] acc, xs[$], qs[$];
    int unsigned d, m;
    d = x.size();
    m = (d <= lanes) ? d : lanes;
    acc = 32'd0;
    for (int w = 0; w < int'(d / m); w++) begin
      logic [31:0] p;
      xs = x[w*m : w*m+m-1];
      qs = q[w*m : w*m+m-1];
      p  = ref_partial(xs, qs, euclid);
      acc = (w == 0) ? p : fadd(acc, p);
    end
    return acc;
  endfunction

endpackage

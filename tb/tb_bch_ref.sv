// tb_bch_ref: reference model for the BCH testbenches.
//
// Independent of the RTL: GF(2^m) arithmetic through exponent and logarithm tables
// built at run time, generator polynomial as the product of (x + alpha^c) over the
// roots alpha^c, c in the cyclotomic cosets of 1, 3, ..., 2t-1, syndromes by direct
// evaluation, and error locators built from their roots. Codewords are bit arrays,
// cw[d] being the coefficient of x^d.
package tb_bch_ref;

  int unsigned m, nf;
  int unsigned expt[];
  int unsigned logt[];

  function automatic void init(int unsigned mm, int unsigned poly);
    int unsigned x;
    m  = mm;
    nf = (1 << mm) - 1;
    expt = new[nf + 1];
    logt = new[nf + 1];
    x = 1;
    for (int unsigned i = 0; i < nf; i++) begin
      expt[i] = x;
      logt[x] = i;
      x = x << 1;
      if (x[mm]) x = x ^ poly;
    end
    expt[nf] = 1;
  endfunction

  function automatic int unsigned mul(int unsigned a, int unsigned b);
    if (a == 0 || b == 0) return 0;
    return expt[(logt[a] + logt[b]) % nf];
  endfunction

  function automatic int unsigned apow(longint e);
    longint r;
    r = e % longint'(nf);
    if (r < 0) r += nf;
    return expt[r];
  endfunction

  // generator polynomial of the t-error-correcting code, bit d = coefficient of x^d
  function automatic void gen_poly(input int unsigned t, ref bit g[]);
    int unsigned coef[];
    bit seen[];
    int deg;
    int unsigned c, root;
    seen = new[nf];
    coef = new[m * t + 1];
    coef[0] = 1;
    deg = 0;
    for (int unsigned i = 1; i < 2 * t; i += 2) begin
      c = i;
      while (!seen[c]) begin
        seen[c] = 1'b1;
        root = expt[c];
        coef[deg + 1] = 0;
        for (int d = deg + 1; d >= 1; d--) coef[d] = coef[d-1] ^ mul(coef[d], root);
        coef[0] = mul(coef[0], root);
        deg++;
        c = (c * 2) % nf;
      end
    end
    g = new[deg + 1];
    for (int d = 0; d <= deg; d++) g[d] = coef[d][0];
  endfunction

  // a random codeword of length n: c(x) = u(x) g(x), deg u < n - deg g
  function automatic void rand_codeword(input int unsigned n, const ref bit g[], ref bit cw[]);
    int unsigned r;
    r  = g.size() - 1;
    cw = new[n];
    for (int unsigned d = 0; d < n - r; d++)
      if ($urandom_range(1, 0) == 1)
        for (int unsigned e = 0; e <= r; e++) cw[d + e] ^= g[e];
  endfunction

  // S_i = sum_d cw[d] alpha^(i d)
  function automatic int unsigned syndrome(const ref bit cw[], input int unsigned i);
    int unsigned s;
    s = 0;
    foreach (cw[d]) if (cw[d]) s ^= apow(longint'(i) * d);
    return s;
  endfunction

  // evaluate a polynomial with GF coefficients at x
  function automatic int unsigned eval(const ref int unsigned p[], input int unsigned x);
    int unsigned s, xp;
    s  = 0;
    xp = 1;
    foreach (p[j]) begin
      s ^= mul(p[j], xp);
      xp = mul(xp, x);
    end
    return s;
  endfunction

  // flip nerr distinct random positions below n; positions returned in pos
  function automatic void add_errors(ref bit cw[], input int unsigned n, input int unsigned nerr,
                                     ref int unsigned pos[$]);
    int unsigned p;
    pos.delete();
    while (pos.size() < nerr) begin
      p = $urandom_range(n - 1, 0);
      if (!(p inside {pos})) begin
        pos.push_back(p);
        cw[p] ^= 1'b1;
      end
    end
  endfunction

endpackage

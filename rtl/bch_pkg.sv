// bch_pkg: Galois-field GF(2^m) arithmetic shared by the BCH encoder and decoder.
//
// Field elements are carried in the low m bits of a 16-bit word (m <= 16) in the
// polynomial basis 1, alpha, ..., alpha^(m-1). The field is defined by a primitive
// polynomial given as an integer that includes the x^m term (x^15 + x + 1 = 'h8003).
// The functions are plain loops: in modules they are used either on constants, where
// they are evaluated during elaboration (constant multipliers, generator polynomial),
// or as combinational general multipliers. The choice of primitive polynomials is this
// design's own; the code parameters (m, n, k, t, p) follow the evaluated BCH codes.
package bch_pkg;

  localparam int unsigned GF_MAXM = 16;
  typedef logic [GF_MAXM-1:0] gf_word_t;

  // Default primitive polynomials of the two fields the evaluated codes use.
  localparam int unsigned GF14_POLY = 'h4443;  // x^14 + x^10 + x^6 + x + 1
  localparam int unsigned GF15_POLY = 'h8003;  // x^15 + x + 1

  // a * b in GF(2^m), shift-and-add from the most significant bit of b.
  function automatic gf_word_t gf_mul(gf_word_t a, gf_word_t b, int unsigned m,
                                      int unsigned poly);
    logic [GF_MAXM:0] acc;
    acc = '0;
    for (int i = GF_MAXM - 1; i >= 0; i--) begin
      if (i < int'(m)) begin
        acc = acc << 1;
        if (acc[m]) acc = acc ^ (GF_MAXM + 1)'(poly);
        if (b[i]) acc = acc ^ {1'b0, a};
      end
    end
    return acc[GF_MAXM-1:0];
  endfunction

  // alpha^e in GF(2^m), e reduced modulo 2^m - 1, by square and multiply.
  function automatic gf_word_t gf_alpha_pow(longint unsigned e, int unsigned m,
                                            int unsigned poly);
    gf_word_t res, base;
    longint unsigned ee;
    ee   = e % ((64'd1 << m) - 1);
    res  = 1;
    base = 2;
    for (int i = 0; i < 32; i++) begin
      if (ee[i]) res = gf_mul(res, base, m, poly);
      base = gf_mul(base, base, m, poly);
    end
    return res;
  endfunction

  // Columns of the m x m binary matrix of "multiply by c": column b is c * alpha^b,
  // packed 16 bits per column.
  function automatic logic [GF_MAXM*GF_MAXM-1:0] gf_const_cols(gf_word_t c, int unsigned m,
                                                               int unsigned poly);
    logic [GF_MAXM*GF_MAXM-1:0] cols;
    gf_word_t col;
    cols = '0;
    col  = c;
    for (int b = 0; b < GF_MAXM; b++) begin
      if (b < int'(m)) begin
        cols[b*GF_MAXM +: GF_MAXM] = col;
        col = gf_mul(col, gf_word_t'(2), m, poly);
      end
    end
    return cols;
  endfunction

endpackage

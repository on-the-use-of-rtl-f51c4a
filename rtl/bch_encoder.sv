// bch_encoder: systematic binary BCH encoder, a P-parallel linear feedback shift register.
//
// The codeword is c(x) = u(x) x^R + (u(x) x^R mod g(x)), R = N - K = M*T, where g(x),
// the generator polynomial, is the product of the distinct minimal polynomials of
// alpha, alpha^3, ..., alpha^(2T-1). g(x) is computed during elaboration: each
// minimal polynomial is found as the first binary linear dependency among the powers
// of alpha^i, taken once per cyclotomic coset {i, 2i, 4i, ...} mod 2^M - 1. If g(x) has
// degree d < R (a coset shorter than M, as for t = 67 over GF(2^14)), g(x) x^(R-d) is
// used, so R still matches N - K and the lowest R - d parity bits are always zero.
// The LFSR (remainder register of R bits) is advanced P message bits per clock by an
// unrolled loop: feedback = u ^ rem[R-1]; rem = (rem << 1) ^ (feedback ? g : 0).
// The paper only says that BCH encoding is done with linear shift registers; the
// parallel form, the codeword layout and the interface are this design's.
// Codeword layout, the same as the decoder's: NPAD = BEATS*P bits, BEATS = ceil(N/P),
// sent highest degree first with bit P-1 of a beat the highest degree. Degrees
// >= N are padding (forced to zero), degrees R .. N-1 carry the message, and the
// lowest R degrees carry the parity. The caller sends all BEATS beats with the
// message in its positions; the encoder ignores the parity positions of its input
// and fills them in. A beat may hold message and parity bits both.
// Timing: one beat in, one beat out, one clock of latency; no back-pressure.
module bch_encoder #(
  parameter int unsigned M    = 15,
  parameter int unsigned POLY = bch_pkg::GF15_POLY,
  parameter int unsigned N    = 17914,
  parameter int unsigned K    = 16384,
  parameter int unsigned T    = 102,
  parameter int unsigned P    = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  input  logic [P-1:0] in_data,
  output logic         out_valid,
  output logic [P-1:0] out_data,
  output logic         out_last
);
  import bch_pkg::*;

  localparam int unsigned R     = N - K;
  localparam int unsigned BEATS = (N + P - 1) / P;
  localparam int unsigned NPAD  = BEATS * P;
  localparam int unsigned CW    = $clog2(BEATS + 1);
  localparam int unsigned NF    = (1 << M) - 1;

  // generator polynomial, bit d is the coefficient of x^d (degree R, monic)
  function automatic logic [R:0] gen_poly();
    logic [R:0]       g, acc;
    gf_word_t         beta, pw, v;
    gf_word_t         bvec  [GF_MAXM];  // reduced basis, indexed by pivot bit
    logic [GF_MAXM:0] bmask [GF_MAXM];  // which powers of beta make up each basis vector
    logic [GF_MAXM:0] mask, mp;
    logic [GF_MAXM-1:0] have;
    logic             placed;
    int               c, lead;
    g    = '0;
    g[0] = 1'b1;
    beta = 2;                           // alpha^1
    for (int i = 1; i < int'(2*T); i += 2) begin
      // is i the smallest member of its cyclotomic coset?
      lead = i;
      c    = i;
      for (int s = 0; s < int'(M); s++) begin
        c = (c * 2) % int'(NF);
        if (c < lead) lead = c;
      end
      if (lead == i) begin
        // minimal polynomial of beta: the first binary linear dependency among
        // beta^0, beta^1, ..., found by Gaussian elimination
        have = '0;
        mp   = '0;
        pw   = 1;
        for (int d = 0; d <= int'(M); d++) begin
          if (mp == '0) begin
            v      = pw;
            mask   = '0;
            mask[d] = 1'b1;
            placed = 1'b0;
            for (int b = int'(M) - 1; b >= 0; b--) begin
              if (!placed && v[b]) begin
                if (have[b]) begin
                  v    = v ^ bvec[b];
                  mask = mask ^ bmask[b];
                end else begin
                  have[b]  = 1'b1;
                  bvec[b]  = v;
                  bmask[b] = mask;
                  placed   = 1'b1;
                end
              end
            end
            if (!placed) mp = mask;
            pw = gf_mul(pw, beta, M, POLY);
          end
        end
        // g(x) = g(x) * mp(x) over GF(2)
        acc = '0;
        for (int d = 0; d <= int'(M); d++) if (mp[d]) acc = acc ^ (g << d);
        g = acc;
      end
      beta = gf_mul(beta, gf_word_t'(4), M, POLY);   // alpha^(i+2)
    end
    // when a coset is shorter than M the product has degree below R = N - K; the
    // polynomial is then shifted up to degree R, which leaves the lowest parity bits
    // zero and keeps every codeword a multiple of the true generator
    for (int d = int'(R); d >= 0; d--) if (g[d]) return g << (int'(R) - d);
    return g;
  endfunction

  localparam logic [R:0] G = gen_poly();

  if (G[R] != 1'b1) begin : g_bad_r
    $error("bch_encoder: N-K is below the degree of the generator polynomial");
  end

  logic [R-1:0]  rem, rem_next;
  logic [CW-1:0] beat;
  logic [P-1:0]  code;
  logic          last;

  assign last = (beat == CW'(BEATS - 1));

  always_comb begin
    int unsigned pos;
    logic        fb, u;
    rem_next = rem;
    code     = '0;
    for (int q = int'(P) - 1; q >= 0; q--) begin
      u   = 1'b0;
      fb  = 1'b0;
      pos = NPAD - 1 - int'(beat) * P - (P - 1 - q);
      if (pos >= R) begin
        u  = (pos < N) ? in_data[q] : 1'b0;
        fb = u ^ rem_next[R-1];
        rem_next = (rem_next << 1) ^ (fb ? G[R-1:0] : '0);
        code[q] = u;
      end else begin
        code[q] = rem_next[pos];
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      rem       <= '0;
      beat      <= '0;
      out_valid <= 1'b0;
      out_data  <= '0;
      out_last  <= 1'b0;
    end else begin
      out_valid <= in_valid;
      out_last  <= in_valid && last;
      if (in_valid) begin
        out_data <= code;
        beat     <= last ? '0 : beat + 1'b1;
        rem      <= last ? '0 : rem_next;
      end
    end
endmodule

// gf_square: squaring in GF(2^M) (combinational).
//
// Squaring is linear over GF(2): x^2 = sum over set bits b of alpha^(2b). The columns
// alpha^(2b) are computed during elaboration, so the circuit is an XOR matrix. The
// syndrome unit uses it to derive the even syndromes, S_2j = S_j^2.
module gf_square #(
  parameter int unsigned M    = 15,
  parameter int unsigned POLY = bch_pkg::GF15_POLY
) (
  input  logic [M-1:0] x,
  output logic [M-1:0] y
);
  import bch_pkg::*;

  function automatic logic [GF_MAXM*GF_MAXM-1:0] sq_cols();
    logic [GF_MAXM*GF_MAXM-1:0] c;
    c = '0;
    for (int b = 0; b < int'(M); b++)
      c[b*GF_MAXM +: GF_MAXM] = gf_alpha_pow(longint'(2*b), M, POLY);
    return c;
  endfunction

  localparam logic [GF_MAXM*GF_MAXM-1:0] COLS = sq_cols();

  always_comb begin
    y = '0;
    for (int b = 0; b < int'(M); b++)
      if (x[b]) y = y ^ COLS[b*GF_MAXM +: M];
  end
endmodule

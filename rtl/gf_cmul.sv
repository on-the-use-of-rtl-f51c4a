// gf_cmul: multiplication by a constant in GF(2^M).
//
// y = x * alpha^EXP, built as an M x M XOR matrix whose columns (alpha^EXP * alpha^b)
// are computed during elaboration. This is the constant multiplier drawn as a circle
// in the syndrome generator and Chien search structures. Purely combinational.
module gf_cmul #(
  parameter int unsigned     M    = 15,
  parameter int unsigned     POLY = bch_pkg::GF15_POLY,
  parameter longint unsigned EXP  = 1
) (
  input  logic [M-1:0] x,
  output logic [M-1:0] y
);
  import bch_pkg::*;

  localparam logic [GF_MAXM*GF_MAXM-1:0] COLS =
    gf_const_cols(gf_alpha_pow(EXP, M, POLY), M, POLY);

  always_comb begin
    y = '0;
    for (int b = 0; b < int'(M); b++)
      if (x[b]) y = y ^ COLS[b*GF_MAXM +: M];
  end
endmodule

// gf_mult: general two-operand multiplier in GF(2^M) (combinational).
//
// Used by the serial error locator calculation, which holds three of them. The
// product is the shift-and-add reduction of bch_pkg::gf_mul, unrolled into logic.
module gf_mult #(
  parameter int unsigned M    = 15,
  parameter int unsigned POLY = bch_pkg::GF15_POLY
) (
  input  logic [M-1:0] a,
  input  logic [M-1:0] b,
  output logic [M-1:0] y
);
  import bch_pkg::*;

  assign y = M'(gf_mul(gf_word_t'(a), gf_word_t'(b), M, POLY));
endmodule

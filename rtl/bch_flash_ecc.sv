// bch_flash_ecc: BCH error correction for a multilevel NAND Flash memory.
//
// The write path encodes user data into BCH codewords (bch_encoder); the read path
// corrects the codewords read back from the cell array (bch_decoder). The cell array
// itself, its program-and-verify circuits and its sensing circuits are outside this
// design: the encoded stream leaves on enc_out_* and the stream read from the cells
// enters on dec_in_*. Both paths use the same codeword format (see bch_decoder):
// BEATS = ceil(N/P) beats of P bits, highest degree first, zero-padded at the top.
// Default code: the (17914, 16384, 102) BCH code over GF(2^15) that protects 16384
// user bits in 12-level cells (7 bits per 2 cells), with a parallelism of 4 and the
// 2-stage decoder pipeline. For the other evaluated codes set M, POLY, N, K, T and
// PIPE (1 for the codes with t of 5 to 15).
module bch_flash_ecc #(
  parameter int unsigned M    = 15,
  parameter int unsigned POLY = bch_pkg::GF15_POLY,
  parameter int unsigned N    = 17914,
  parameter int unsigned K    = 16384,
  parameter int unsigned T    = 102,
  parameter int unsigned P    = 4,
  parameter int unsigned PIPE = 2
) (
  input  logic         clk,
  input  logic         rst_n,
  // write path: user data in, codeword out to the cell array
  input  logic         enc_in_valid,
  input  logic [P-1:0] enc_in_data,
  output logic         enc_out_valid,
  output logic [P-1:0] enc_out_data,
  output logic         enc_out_last,
  // read path: codeword from the cell array in, corrected codeword out
  input  logic         dec_in_valid,
  output logic         dec_in_ready,
  input  logic [P-1:0] dec_in_data,
  output logic         dec_out_valid,
  output logic [P-1:0] dec_out_data,
  output logic         dec_out_last
);
  bch_encoder #(.M(M), .POLY(POLY), .N(N), .K(K), .T(T), .P(P)) u_enc (
    .clk, .rst_n,
    .in_valid(enc_in_valid), .in_data(enc_in_data),
    .out_valid(enc_out_valid), .out_data(enc_out_data), .out_last(enc_out_last));

  bch_decoder #(.M(M), .POLY(POLY), .N(N), .K(K), .T(T), .P(P), .PIPE(PIPE)) u_dec (
    .clk, .rst_n,
    .in_valid(dec_in_valid), .in_ready(dec_in_ready), .in_data(dec_in_data),
    .out_valid(dec_out_valid), .out_data(dec_out_data), .out_last(dec_out_last));
endmodule

// bch_syndrome: syndrome computation block of the BCH decoder.
//
// Computes the 2T syndromes S_1 .. S_2T of a received codeword of BEATS beats of P
// bits. Following the paper, only the T odd-indexed syndromes have generators
// (bch_syndrome_gen with I = 1, 3, ..., 2T-1); the even ones come from square
// circuits, S_2j = S_j^2, because the code is binary.
// Interface: a beat is taken when in_valid && in_ready. After the last beat out_valid
// rises and the syndromes are held until out_ready; in_ready is low while a result is
// held (and, when hold_in is set by the decoder, while the next stage is busy).
// Timing: out_valid rises the cycle after the last beat; one codeword per BEATS+1
// cycles when the next stage takes the result at once.
module bch_syndrome #(
  parameter int unsigned M     = 15,
  parameter int unsigned POLY  = bch_pkg::GF15_POLY,
  parameter int unsigned P     = 4,
  parameter int unsigned T     = 102,
  parameter int unsigned BEATS = 4479
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         hold_in,   // refuse a new codeword (1-stage pipeline)
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [P-1:0] in_data,
  output logic         out_valid,
  input  logic         out_ready,
  output logic [M-1:0] syn [1:2*T]
);
  localparam int unsigned CW = $clog2(BEATS + 1);

  logic [CW-1:0] beat;
  logic          take;
  logic          last;
  logic [M-1:0]  odd_s [T];

  // a new codeword may not start while the previous result is held or the decoder
  // holds the input; a codeword already started is always finished
  assign in_ready = !out_valid && !(hold_in && beat == '0);
  assign take     = in_valid && in_ready;
  assign last     = (beat == CW'(BEATS - 1));

  for (genvar k = 0; k < int'(T); k++) begin : g_gen
    bch_syndrome_gen #(.M(M), .POLY(POLY), .P(P), .I(2*k + 1)) u_gen (
      .clk, .rst_n, .en(take), .first(beat == '0), .r(in_data), .s(odd_s[k]));
  end

  for (genvar i = 1; i <= int'(2*T); i++) begin : g_syn
    if (i % 2 == 1) begin : g_odd
      assign syn[i] = odd_s[(i-1)/2];
    end else begin : g_even
      gf_square #(.M(M), .POLY(POLY)) u_sq (.x(syn[i/2]), .y(syn[i]));
    end
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      beat      <= '0;
      out_valid <= 1'b0;
    end else begin
      if (out_valid && out_ready) out_valid <= 1'b0;
      if (take) begin
        beat <= last ? '0 : beat + 1'b1;
        if (last) out_valid <= 1'b1;
      end
    end
endmodule

// bch_syndrome_gen: one p-parallel syndrome generator, S_I = sum_j r_j * alpha^(I*j).
//
// Each clock it takes P received bits, lane q carrying the coefficient of degree
// (base + q) of the received polynomial, beats arriving highest degree first. It
// evaluates the polynomial at alpha^I in Horner form:
//     S <= S * alpha^(P*I) + sum_{q=0}^{P-1} r_q * alpha^(q*I)
// which is the structure of the paper's syndrome generator: P constant
// multipliers alpha^(q*I) on the inputs, an XOR adder, a register D, and a feedback
// multiplier alpha^(P*I). On a beat with `first` set the register contribution is
// dropped, so a new codeword starts without a separate clear cycle.
// Timing: S is valid the cycle after the last beat and holds while `en` is low.
module bch_syndrome_gen #(
  parameter int unsigned M    = 15,
  parameter int unsigned POLY = bch_pkg::GF15_POLY,
  parameter int unsigned P    = 4,
  parameter int unsigned I    = 1
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         en,     // a beat is present
  input  logic         first,  // the beat is the first of a codeword
  input  logic [P-1:0] r,      // lane q: coefficient of degree base+q
  output logic [M-1:0] s
);
  logic [M-1:0] lane_term [P];
  logic [M-1:0] fb;
  logic [M-1:0] sum;

  // lane 0 is multiplied by alpha^0 = 1
  for (genvar q = 0; q < int'(P); q++) begin : g_lane
    if (q == 0) begin : g_one
      assign lane_term[q] = M'(r[q]);
    end else begin : g_mul
      gf_cmul #(.M(M), .POLY(POLY), .EXP(longint'(q) * longint'(I))) u_mul (
        .x(M'(r[q])), .y(lane_term[q]));
    end
  end

  gf_cmul #(.M(M), .POLY(POLY), .EXP(longint'(P) * longint'(I))) u_fb (.x(s), .y(fb));

  always_comb begin
    sum = first ? '0 : fb;
    for (int q = 0; q < int'(P); q++) sum = sum ^ lane_term[q];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n)  s <= '0;
    else if (en) s <= sum;
endmodule

// bch_chien: p-parallel Chien search.
//
// Tests alpha^i for i = I0+1, I0+2, ... as roots of Lambda(x), P values per clock,
// and outputs the error bits in the order the codeword arrived (highest degree
// first). Root alpha^i marks an error at degree N - i (N = 2^M - 1). The code is a
// shortened one of padded length NPAD = BEATS*P, so the search starts at I0 = N - NPAD:
// when Lambda is loaded, register j takes Lambda_j * alpha^(j*I0) (a constant
// multiplier per register; this start offset is this design's addition for the
// shortened code).
// Structure as in the paper's Chien search figure: register j (j = 1..T) holds
// Lambda_j alpha^(j*i); lane q adds the products Lambda_j alpha^(j*(i+q)) for
// q = 1..P; the lane-P products are also the next register values. The paper's
// sum adds 1 for Lambda_0; here the held Lambda_0 is added instead, because the
// inversion-free error locator is not normalised.
// Lane q covers degree NPAD - c*P - q in output beat c, which is bit P-q of the beat.
// Interface: Lambda is loaded with in_valid when in_ready (idle); then err_valid is
// high for BEATS consecutive cycles, starting the cycle after the load.
module bch_chien #(
  parameter int unsigned M     = 15,
  parameter int unsigned POLY  = bch_pkg::GF15_POLY,
  parameter int unsigned P     = 4,
  parameter int unsigned T     = 102,
  parameter int unsigned BEATS = 4479
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] lambda [T+1],
  output logic         err_valid,
  output logic [P-1:0] err,
  output logic         err_last
);
  localparam longint unsigned N    = (64'd1 << M) - 1;
  localparam longint unsigned NPAD = longint'(BEATS) * longint'(P);
  localparam longint unsigned I0   = N - NPAD;
  localparam int unsigned     CW   = $clog2(BEATS + 1);

  logic [M-1:0]  reg_l  [1:T];     // Lambda_j alpha^(j*i)
  logic [M-1:0]  init_l [1:T];     // Lambda_j alpha^(j*I0)
  logic [M-1:0]  prod   [1:T][1:P];
  logic [M-1:0]  lam0;
  logic [CW-1:0] beat;
  logic          busy;

  for (genvar jj = 1; jj <= int'(T); jj++) begin : g_term
    gf_cmul #(.M(M), .POLY(POLY), .EXP(longint'(jj) * I0)) u_init (
      .x(lambda[jj]), .y(init_l[jj]));
    for (genvar q = 1; q <= int'(P); q++) begin : g_lane
      gf_cmul #(.M(M), .POLY(POLY), .EXP(longint'(jj) * longint'(q))) u_mul (
        .x(reg_l[jj]), .y(prod[jj][q]));
    end
  end

  always_comb begin
    logic [M-1:0] sum;
    for (int q = 1; q <= int'(P); q++) begin
      sum = lam0;
      for (int jj = 1; jj <= int'(T); jj++) sum = sum ^ prod[jj][q];
      err[P-q] = busy && (sum == '0);
    end
  end

  assign in_ready  = !busy;
  assign err_valid = busy;
  assign err_last  = busy && (beat == CW'(BEATS - 1));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      busy <= 1'b0;
      beat <= '0;
      lam0 <= '0;
      for (int jj = 1; jj <= int'(T); jj++) reg_l[jj] <= '0;
    end else if (!busy) begin
      if (in_valid) begin
        busy <= 1'b1;
        beat <= '0;
        lam0 <= lambda[0];
        for (int jj = 1; jj <= int'(T); jj++) reg_l[jj] <= init_l[jj];
      end
    end else begin
      for (int jj = 1; jj <= int'(T); jj++) reg_l[jj] <= prod[jj][P];
      beat <= beat + 1'b1;
      if (err_last) busy <= 1'b0;
    end
endmodule

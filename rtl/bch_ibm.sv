// bch_ibm: fully serial inversion-free Berlekamp-Massey error locator calculation.
//
// From the 2T syndromes it computes the error locator polynomial
// Lambda(x) = Lambda_0 + Lambda_1 x + ... + Lambda_T x^T. For a binary BCH code every
// other discrepancy is zero, so T iterations r = 0 .. T-1 suffice:
//     delta      = sum_j Lambda_j S_(2r+1-j)
//     Lambda'(x) = gamma Lambda(x) + delta x B(x)
//     if delta != 0 and k >= 0:  B(x) = x Lambda(x), gamma = delta, k = -k
//     else:                      B(x) = x^2 B(x),    k = k + 2
// No inversion is needed; Lambda comes out scaled by a nonzero constant (Lambda_0 is
// not 1), which leaves its roots unchanged.
//
// Serial schedule (paper: t(t+3)/2 cycles, three GF multipliers, two FIFOs of
// lengths t and t+1): iteration r spends r+2 cycles, one per coefficient j = 0 .. r+1.
// In cycle j multipliers 1 and 2 form Lambda'_j = gamma Lambda_j + delta B_(j-1), the
// new B_j is Lambda_(j-1) or B_(j-2), and multiplier 3 accumulates Lambda'_j S_(2r+3-j)
// into the discrepancy of the next iteration. The coefficient buffers (T+1 entries
// for Lambda, T+1 for B, of which B_0 is constant after the first iteration) are read
// and written in order, one entry per cycle, so they behave as FIFOs. The cycle
// schedule and the buffer addressing are this design's reading of that description.
// Limitation of the fixed schedule: coefficients above degree r+1 are not formed in
// iteration r. They can only be nonzero after a zero discrepancy while fewer than the
// final number of errors have been located (probability about 2^-M per iteration).
//
// Interface: start with in_valid when in_ready (idle). The syndromes are copied in
// that cycle; out_valid rises 1 + T(T+3)/2 cycles after the start (one load cycle plus
// the iterations) and Lambda is held until out_ready.
module bch_ibm #(
  parameter int unsigned M    = 15,
  parameter int unsigned POLY = bch_pkg::GF15_POLY,
  parameter int unsigned T    = 102
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [M-1:0] syn    [1:2*T],
  output logic         out_valid,
  input  logic         out_ready,
  output logic [M-1:0] lambda [T+1]
);
  localparam int unsigned RW = $clog2(T + 2);

  typedef enum logic [1:0] {IDLE, RUN, DONE} state_e;
  state_e state;

  logic [M-1:0]  s_reg [1:2*T];   // syndromes, held during the run
  logic [M-1:0]  lam   [T+1];     // Lambda coefficients
  logic [M-1:0]  bb    [T+1];     // B coefficients
  logic [RW-1:0] r, j;
  logic [M-1:0]  delta, gamma, dacc;
  logic signed [RW+1:0] k;
  logic [M-1:0]  prev_l, prev_b1, prev_b2;

  logic          upd;
  logic [M-1:0]  lj, bj, pl, pb1, pb2;
  logic [M-1:0]  m1, m2, m3, lnew, bnew, snext, dnext;
  logic          last_j;
  logic [RW+1:0] sidx;

  assign upd    = (delta != '0) && (k >= 0);
  assign last_j = (j == r + 1'b1);
  assign lj     = lam[j];
  assign bj     = bb[j];
  assign pl     = (j == '0) ? '0 : prev_l;
  assign pb1    = (j == '0) ? '0 : prev_b1;
  assign pb2    = (j < 2)   ? '0 : prev_b2;
  // syndrome index of the next discrepancy term, 2r+3-j (beyond 2T only after the
  // last iteration, where the sum is not used)
  assign sidx   = (RW+2)'(2) * (RW+2)'(r) + (RW+2)'(3) - (RW+2)'(j);
  assign snext  = (sidx <= (RW+2)'(2*T)) ? s_reg[sidx] : '0;

  gf_mult #(.M(M), .POLY(POLY)) u_m1 (.a(gamma), .b(lj),  .y(m1));
  gf_mult #(.M(M), .POLY(POLY)) u_m2 (.a(delta), .b(pb1), .y(m2));
  gf_mult #(.M(M), .POLY(POLY)) u_m3 (.a(lnew),  .b(snext), .y(m3));

  assign lnew  = m1 ^ m2;
  assign bnew  = upd ? pl : pb2;
  assign dnext = ((j == '0) ? '0 : dacc) ^ m3;

  assign in_ready  = (state == IDLE);
  assign out_valid = (state == DONE);
  for (genvar i = 0; i <= int'(T); i++) begin : g_out
    assign lambda[i] = lam[i];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      state   <= IDLE;
      r       <= '0;
      j       <= '0;
      delta   <= '0;
      gamma   <= '0;
      dacc    <= '0;
      k       <= '0;
      prev_l  <= '0;
      prev_b1 <= '0;
      prev_b2 <= '0;
      for (int i = 0; i <= int'(T); i++) begin
        lam[i] <= '0;
        bb[i]  <= '0;
      end
      for (int i = 1; i <= int'(2*T); i++) s_reg[i] <= '0;
    end else begin
      case (state)
        IDLE: if (in_valid) begin
          for (int i = 1; i <= int'(2*T); i++) s_reg[i] <= syn[i];
          for (int i = 0; i <= int'(T); i++) begin
            lam[i] <= (i == 0) ? M'(1) : '0;
            bb[i]  <= (i == 0) ? M'(1) : '0;
          end
          delta <= syn[1];   // first discrepancy: Lambda = 1, so delta = S_1
          gamma <= M'(1);
          k     <= '0;
          r     <= '0;
          j     <= '0;
          state <= RUN;
        end
        RUN: begin
          lam[j]  <= lnew;
          bb[j]   <= bnew;
          dacc    <= dnext;
          prev_l  <= lj;
          prev_b1 <= bj;
          prev_b2 <= prev_b1;
          if (last_j) begin
            j     <= '0;
            r     <= r + 1'b1;
            delta <= dnext;
            if (upd) begin
              gamma <= delta;
              k     <= -k;
            end else begin
              k     <= k + 2;
            end
            if (r == RW'(T - 1)) state <= DONE;
          end else begin
            j <= j + 1'b1;
          end
        end
        default: if (out_ready) state <= IDLE;
      endcase
    end
endmodule

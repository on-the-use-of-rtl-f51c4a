// bch_decoder: pipelined syndrome-based binary BCH decoder.
//
// The received word r streams in P bits per clock. Three blocks work on it in turn:
// syndrome computation (2T syndromes), a fully serial inversion-free Berlekamp-Massey
// error locator calculation, and a P-parallel Chien search that produces the error
// vector e, P bits per clock. Meanwhile r waits in a FIFO buffer; the output is
// r + e, so the decoder is a pure corrector and returns the whole codeword.
// Default code: (n, k, t) = (17914, 16384, 102) shortened from GF(2^15), with P = 4,
// the strongest code the paper evaluates (12 levels per cell, 16384 user bits).
//
// Pipelining (per the paper): PIPE = 2 lets the three blocks work on three consecutive
// codewords, for codes where the error locator takes about as long as a codeword
// transfer (large t). PIPE = 1 keeps syndrome and error locator on one codeword while
// the Chien search works on the previous one, for small t. The FIFO holds PIPE+1
// codewords.
// Codeword format (this design's choice): the codeword is zero-extended at the top
// to NPAD = BEATS*P bits, BEATS = ceil(N/P), and sent highest degree first; in each
// beat bit P-1 is the highest degree. The padding bits must be zero.
// Interface: in_valid/in_ready; out_valid is high for the BEATS beats of a corrected
// codeword, with out_last on the final one. There is no output back-pressure.
// Latency from the last input beat to the first output beat:
// T(T+3)/2 + 3 cycles when the blocks are free (one cycle to hand the syndromes to
// the error locator, T(T+3)/2 to compute it, one to load the Chien search and one
// output register). First beat in to last beat out: 2*BEATS + T(T+3)/2 + 2.
module bch_decoder #(
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
  input  logic         in_valid,
  output logic         in_ready,
  input  logic [P-1:0] in_data,
  output logic         out_valid,
  output logic [P-1:0] out_data,
  output logic         out_last
);
  localparam int unsigned BEATS = (N + P - 1) / P;

  // parameter sanity: the shortened code must fit the field and its redundancy
  // must be M*T bits; P divides nothing in particular (padding covers the rest)
  if (N > (1 << M) - 1 || BEATS * P > (1 << M) - 1) begin : g_bad_n
    $error("bch_decoder: padded code length exceeds 2^M - 1");
  end
  if (N - K > M * T) begin : g_bad_k
    $error("bch_decoder: redundancy N-K exceeds M*T");
  end
  if (PIPE != 1 && PIPE != 2) begin : g_bad_pipe
    $error("bch_decoder: PIPE must be 1 or 2");
  end

  logic         syn_valid, syn_ready;
  logic [M-1:0] syn [1:2*T];
  logic         loc_valid, loc_ready;
  logic [M-1:0] lambda [T+1];
  logic         err_valid, err_last;
  logic [P-1:0] err;
  logic         take;
  logic         hold_in;
  logic         fifo_empty, fifo_full;
  logic [P-1:0] fifo_q;
  logic [P-1:0] err_q;
  logic         err_valid_q, err_last_q;

  assign take    = in_valid && in_ready;
  assign hold_in = (PIPE == 1) && !syn_ready;

  bch_syndrome #(.M(M), .POLY(POLY), .P(P), .T(T), .BEATS(BEATS)) u_syn (
    .clk, .rst_n, .hold_in,
    .in_valid, .in_ready, .in_data,
    .out_valid(syn_valid), .out_ready(syn_ready), .syn);

  bch_ibm #(.M(M), .POLY(POLY), .T(T)) u_ibm (
    .clk, .rst_n,
    .in_valid(syn_valid), .in_ready(syn_ready), .syn,
    .out_valid(loc_valid), .out_ready(loc_ready), .lambda);

  bch_chien #(.M(M), .POLY(POLY), .P(P), .T(T), .BEATS(BEATS)) u_chien (
    .clk, .rst_n,
    .in_valid(loc_valid), .in_ready(loc_ready), .lambda,
    .err_valid, .err, .err_last);

  bch_fifo #(.W(P), .DEPTH((PIPE + 1) * BEATS)) u_fifo (
    .clk, .rst_n,
    .wr_en(take), .wr_data(in_data),
    .rd_en(err_valid), .rd_data(fifo_q),
    .empty(fifo_empty), .full(fifo_full));

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      err_q       <= '0;
      err_valid_q <= 1'b0;
      err_last_q  <= 1'b0;
    end else begin
      err_q       <= err;
      err_valid_q <= err_valid;
      err_last_q  <= err_last;
    end

  assign out_valid = err_valid_q;
  assign out_data  = err_valid_q ? (fifo_q ^ err_q) : '0;
  assign out_last  = err_last_q;

  // the Chien search never runs ahead of the buffered data
  always_ff @(posedge clk)
    if (rst_n) begin
      a_fifo_has_data: assert (!(err_valid && fifo_empty))
        else $error("bch_decoder: error vector without buffered data");
      a_fifo_room: assert (!(take && fifo_full))
        else $error("bch_decoder: codeword buffer overflow");
    end
endmodule

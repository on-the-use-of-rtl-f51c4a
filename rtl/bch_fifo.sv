// bch_fifo: codeword buffer of the BCH decoder (the FIFO of the decoder structure).
//
// Holds the received beats while their syndromes, error locator and Chien search are
// computed, so that each beat can be added to its error bits. The paper builds it
// from SRAM; here it is a single-port-per-side memory array (one write and one read
// port) that synthesis maps to a memory, with a synchronous read: rd_data is valid
// the cycle after rd_en. DEPTH need not be a power of two. Writing when full or
// reading when empty is a protocol error, flagged by assertions.
module bch_fifo #(
  parameter int unsigned W     = 4,
  parameter int unsigned DEPTH = 13437
) (
  input  logic         clk,
  input  logic         rst_n,
  input  logic         wr_en,
  input  logic [W-1:0] wr_data,
  input  logic         rd_en,
  output logic [W-1:0] rd_data,
  output logic         empty,
  output logic         full
);
  localparam int unsigned AW = $clog2(DEPTH);

  logic [W-1:0]  mem [DEPTH];
  logic [AW-1:0] wp, rp;
  logic [AW:0]   count;

  assign empty = (count == '0);
  assign full  = (count == (AW+1)'(DEPTH));

  always_ff @(posedge clk) begin
    if (wr_en) mem[wp] <= wr_data;
    if (rd_en) rd_data <= mem[rp];
  end

  always_ff @(posedge clk or negedge rst_n)
    if (!rst_n) begin
      wp    <= '0;
      rp    <= '0;
      count <= '0;
    end else begin
      if (wr_en) wp <= (wp == AW'(DEPTH - 1)) ? '0 : wp + 1'b1;
      if (rd_en) rp <= (rp == AW'(DEPTH - 1)) ? '0 : rp + 1'b1;
      count <= count + (AW+1)'(wr_en) - (AW+1)'(rd_en);
    end

  // protocol checks
  always_ff @(posedge clk)
    if (rst_n) begin
      a_no_overflow:  assert (!(wr_en && full))  else $error("bch_fifo: write when full");
      a_no_underflow: assert (!(rd_en && empty)) else $error("bch_fifo: read when empty");
    end
endmodule

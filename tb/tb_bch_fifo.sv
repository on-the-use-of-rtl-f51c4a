// tb_bch_fifo: checks the codeword buffer against a queue model with random
// writes and reads (never writing when full or reading when empty), a depth that
// is not a power of two so the pointers wrap, and the one-cycle read latency.
module tb_bch_fifo;
  localparam int unsigned W = 4, DEPTH = 13;

  logic clk = 0, rst_n = 0, wr_en = 0, rd_en = 0, empty, full;
  logic [W-1:0] wr_data = '0, rd_data;
  int checks = 0, failures = 0;

  bch_fifo #(.W(W), .DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] model[$];
    logic [W-1:0] expect_q;
    logic         pending;
    int           fills = 0;
    pending = 0;
    expect_q = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      if (pending) begin
        checks++;
        if (rd_data !== expect_q) begin
          failures++;
          $display("read %h, expected %h", rd_data, expect_q);
        end
      end
      checks++;
      if (empty != (model.size() == 0) || full != (model.size() == DEPTH)) begin
        failures++;
        $display("flags empty=%0d full=%0d with %0d entries", empty, full, model.size());
      end
      if (full) fills++;
      // phases: mostly write, then mostly read, so the buffer fills and drains
      wr_en = !full && ($urandom_range(99, 0) < (((i / 200) % 2 == 0) ? 80 : 20));
      rd_en = !empty && ($urandom_range(99, 0) < (((i / 200) % 2 == 0) ? 20 : 80));
      wr_data = W'($urandom);
      pending = rd_en;
      if (rd_en) expect_q = model.pop_front();
      if (wr_en) model.push_back(wr_data);
    end
    checks++;
    if (fills == 0) begin
      failures++;
      $display("buffer never filled");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

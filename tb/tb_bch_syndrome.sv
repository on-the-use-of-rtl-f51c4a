// tb_bch_syndrome: checks all 2T syndromes (odd generators and square circuits)
// against direct evaluation, the one-cycle result timing, and the hand-off: while
// a result is held (out_ready low) the block must refuse the next codeword.
module tb_bch_syndrome;
  import tb_bch_ref::*;
  localparam int unsigned M = 15, P = 4, T = 8, BEATS = 25, WORDS = 5;

  logic clk = 0, rst_n = 0;
  logic hold_in = 0, in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [P-1:0] in_data = '0;
  logic [M-1:0] syn [1:2*T];
  int checks = 0, failures = 0;

  bch_syndrome #(.M(M), .POLY('h8003), .P(P), .T(T), .BEATS(BEATS)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit cw[];
    int unsigned exp_s;
    init(M, 'h8003);
    cw = new[BEATS * P];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      foreach (cw[d]) cw[d] = $urandom_range(1, 0);
      for (int c = 0; c < BEATS; c++) begin
        @(negedge clk);
        in_valid = 1;
        for (int q = 0; q < P; q++) in_data[q] = cw[(BEATS - 1 - c) * P + q];
        checks++;
        if (!in_ready) begin
          failures++;
          $display("word %0d beat %0d refused", w, c);
        end
      end
      @(negedge clk);
      // result due one cycle after the last beat; input must now be refused
      checks++;
      if (!out_valid || in_ready) begin
        failures++;
        $display("word %0d: out_valid=%0d in_ready=%0d after last beat", w, out_valid, in_ready);
      end
      in_valid = 1;        // offered but must not be taken while the result is held
      repeat (3) @(negedge clk);
      for (int i = 1; i <= 2 * T; i++) begin
        exp_s = syndrome(cw, i);
        checks++;
        if (syn[i] !== M'(exp_s)) begin
          failures++;
          $display("word %0d: S_%0d = %h, expected %h", w, i, syn[i], exp_s);
        end
      end
      in_valid = 0;
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
      checks++;
      if (out_valid || !in_ready) begin
        failures++;
        $display("word %0d: result not released", w);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

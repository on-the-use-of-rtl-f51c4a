// tb_bch_encoder: checks the systematic encoder at its default size, the
// (17914, 16384, 102) code over GF(2^15). For random messages every one of the 2T
// syndromes of the output codeword must be zero (so it is a codeword of the
// t-error-correcting BCH code, by the reference model's direct evaluation), the
// message degrees must pass unchanged, the padding must be zero, and the output must
// follow the input by one cycle with out_last on the final beat.
module tb_bch_encoder;
  import tb_bch_ref::*;
  localparam int unsigned M = 15, N = 17914, K = 16384, T = 102, P = 4;
  localparam int unsigned BEATS = (N + P - 1) / P, NPAD = BEATS * P, R = N - K;
  localparam int unsigned WORDS = 2;

  logic clk = 0, rst_n = 0, in_valid = 0;
  logic [P-1:0] in_data = '0;
  logic out_valid, out_last;
  logic [P-1:0] out_data;
  int checks = 0, failures = 0;

  bch_encoder dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (40000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit msg[];
    bit got[];
    int unsigned s;
    int seen;
    init(M, 'h8003);
    msg = new[NPAD];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int w = 0; w < WORDS; w++) begin
      foreach (msg[d]) msg[d] = (d >= R && d < N) ? $urandom_range(1, 0) : 1'b0;
      // parity positions of the input carry garbage, which must be ignored
      for (int d = 0; d < R; d++) msg[d] = $urandom_range(1, 0);
      got = new[NPAD];
      seen = 0;
      fork
        begin
          for (int c = 0; c < BEATS; c++) begin
            @(negedge clk);
            in_valid = 1;
            for (int q = 0; q < P; q++) in_data[q] = msg[NPAD - 1 - c * P - (P - 1 - q)];
          end
          @(negedge clk);
          in_valid = 0;
        end
        begin
          @(negedge clk);
          while (seen < BEATS) begin
            @(negedge clk);
            checks++;
            if (!out_valid || out_last != (seen == BEATS - 1)) begin
              failures++;
              $display("word %0d beat %0d: out_valid=%0d out_last=%0d", w, seen, out_valid, out_last);
            end
            for (int q = 0; q < P; q++) got[NPAD - 1 - seen * P - (P - 1 - q)] = out_data[q];
            seen++;
          end
        end
      join
      for (int d = R; d < NPAD; d++) begin
        if (got[d] != msg[d]) begin
          checks++;
          failures++;
          $display("word %0d: message degree %0d changed", w, d);
        end
      end
      checks++;
      for (int i = 1; i <= 2 * T; i++) begin
        s = syndrome(got, i);
        checks++;
        if (s != 0) begin
          failures++;
          $display("word %0d: syndrome S_%0d = %h, not zero", w, i, s);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

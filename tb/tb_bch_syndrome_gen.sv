// tb_bch_syndrome_gen: checks one syndrome generator against direct evaluation.
// Random 120-bit words are streamed 4 bits per clock, back to back; after each
// word the register must hold sum_d r_d alpha^(5d) (reference: tb_bch_ref). The
// `first` flag must restart the sum without a clear cycle.
module tb_bch_syndrome_gen;
  import tb_bch_ref::*;
  localparam int unsigned M = 15, P = 4, I = 5, BEATS = 30, WORDS = 6;

  logic clk = 0, rst_n = 0, en = 0, first = 0;
  logic [P-1:0] r = '0;
  logic [M-1:0] s;
  int checks = 0, failures = 0;

  bch_syndrome_gen #(.M(M), .POLY('h8003), .P(P), .I(I)) dut (.*);

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
      foreach (cw[d]) cw[d] = (w == 0) ? (d == 0) : $urandom_range(1, 0);
      exp_s = syndrome(cw, I);
      for (int c = 0; c < BEATS; c++) begin
        @(negedge clk);
        en = 1;
        first = (c == 0);
        for (int q = 0; q < P; q++) r[q] = cw[(BEATS - 1 - c) * P + q];
      end
      @(negedge clk);
      en = 0;
      first = 0;
      checks++;
      if (s !== M'(exp_s)) begin
        failures++;
        $display("word %0d: S_%0d = %h, expected %h", w, I, s, exp_s);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bch_chien: checks the P-parallel Chien search on a shortened code.
// Lambda(x) is built by the reference model from chosen error degrees,
// Lambda(x) = c * prod (1 + alpha^d x), with a random nonzero scale c. The error
// bits must mark exactly those degrees, in arrival order (degree NPAD-1 first, bit
// P-1 of a beat highest), over exactly BEATS consecutive cycles after the load.
module tb_bch_chien;
  import tb_bch_ref::*;
  localparam int unsigned M = 8, P = 4, T = 6, BEATS = 45, TRIALS = 12;
  localparam int unsigned NPAD = BEATS * P;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, err_valid, err_last;
  logic [M-1:0] lambda [T+1];
  logic [P-1:0] err;
  int checks = 0, failures = 0;

  bch_chien #(.M(M), .POLY('h11d), .P(P), .T(T), .BEATS(BEATS)) dut (.*);

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
    bit got[];
    int unsigned pos[$];
    int unsigned lam[];
    int unsigned nerr, x, cycles;
    init(M, 'h11d);
    foreach (lambda[j]) lambda[j] = '0;
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      nerr = (tr <= T) ? tr : $urandom_range(T, 1);
      cw = new[NPAD];
      add_errors(cw, NPAD, nerr, pos);
      if (tr == 1) begin               // corner degrees: first and last bit
        cw[pos[0]] = 0;
        pos[0] = NPAD - 1;
        cw[pos[0]] = 1;
      end
      if (tr == 2) begin
        cw[pos[0]] = 0;
        pos[0] = 0;
        cw[pos[0]] = 1;
      end
      lam = new[T + 1];
      lam[0] = $urandom_range((1 << M) - 1, 1);
      foreach (pos[l]) begin
        x = apow(pos[l]);
        for (int j = T; j >= 1; j--) lam[j] ^= mul(lam[j-1], x);
      end
      foreach (lambda[j]) lambda[j] = M'(lam[j]);
      @(negedge clk);
      checks++;
      if (!in_ready) begin
        failures++;
        $display("trial %0d: not idle", tr);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      got = new[NPAD];
      cycles = 0;
      while (err_valid) begin
        for (int q = 0; q < P; q++) got[NPAD - 1 - cycles * P - (P - 1 - q)] = err[q];
        checks++;
        if (err_last != (cycles == BEATS - 1)) begin
          failures++;
          $display("trial %0d: err_last wrong at beat %0d", tr, cycles);
        end
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != BEATS) begin
        failures++;
        $display("trial %0d: %0d beats, expected %0d", tr, cycles, BEATS);
      end
      for (int d = 0; d < NPAD; d++) begin
        checks++;
        if (got[d] != cw[d]) begin
          failures++;
          $display("trial %0d: degree %0d error bit %0d, expected %0d", tr, d, got[d], cw[d]);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

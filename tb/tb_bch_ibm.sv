// tb_bch_ibm: checks the serial inversion-free Berlekamp-Massey block.
// For random error patterns of 0 .. T errors at random degrees, the syndromes are
// computed by the reference model and the resulting Lambda(x) must vanish at
// alpha^(-d) for every error degree d, have degree equal to the number of errors and a
// nonzero Lambda_0. The time from the start to out_valid must be 1 + T(T+3)/2 cycles
// (one load cycle plus the paper's t(t+3)/2), and the result must be held until
// out_ready.
module tb_bch_ibm;
  import tb_bch_ref::*;
  localparam int unsigned M = 15, T = 10, TRIALS = 40;
  localparam int unsigned NCODE = 3000;

  logic clk = 0, rst_n = 0;
  logic in_valid = 0, in_ready, out_valid, out_ready = 0;
  logic [M-1:0] syn [1:2*T];
  logic [M-1:0] lambda [T+1];
  int checks = 0, failures = 0;

  bch_ibm #(.M(M), .POLY('h8003), .T(T)) dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    bit cw[];
    int unsigned pos[$];
    int unsigned lam[];
    int unsigned nerr, deg, cycles;
    init(M, 'h8003);
    for (int i = 1; i <= 2 * T; i++) syn[i] = '0;
    lam = new[T + 1];
    repeat (3) @(posedge clk);
    rst_n = 1;
    for (int tr = 0; tr < TRIALS; tr++) begin
      nerr = (tr <= T) ? tr : $urandom_range(T, 0);
      cw = new[NCODE];
      add_errors(cw, NCODE, nerr, pos);
      for (int i = 1; i <= 2 * T; i++) syn[i] = M'(syndrome(cw, i));
      @(negedge clk);
      checks++;
      if (!in_ready) begin
        failures++;
        $display("trial %0d: not idle", tr);
      end
      in_valid = 1;
      @(negedge clk);
      in_valid = 0;
      cycles = 1;
      while (!out_valid && cycles < 10000) begin
        @(negedge clk);
        cycles++;
      end
      checks++;
      if (cycles != 1 + T * (T + 3) / 2) begin
        failures++;
        $display("trial %0d: %0d cycles, expected %0d", tr, cycles, 1 + T * (T + 3) / 2);
      end
      foreach (lam[j]) lam[j] = lambda[j];
      deg = 0;
      foreach (lam[j]) if (lam[j] != 0) deg = j;
      checks++;
      if (deg != nerr || lam[0] == 0) begin
        failures++;
        $display("trial %0d: %0d errors, Lambda degree %0d, Lambda_0 %h", tr, nerr, deg, lam[0]);
      end
      foreach (pos[l]) begin
        checks++;
        if (eval(lam, apow(-longint'(pos[l]))) != 0) begin
          failures++;
          $display("trial %0d: error at degree %0d not a root", tr, pos[l]);
        end
      end
      // result must be held until taken
      repeat (2) @(negedge clk);
      checks++;
      if (!out_valid || in_ready) begin
        failures++;
        $display("trial %0d: result not held", tr);
      end
      out_ready = 1;
      @(negedge clk);
      out_ready = 0;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

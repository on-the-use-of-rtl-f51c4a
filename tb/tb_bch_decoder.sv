// tb_bch_decoder: end-to-end check of the decoder on small shortened codes over
// GF(2^10), in both pipeline arrangements:
//   config 0: PIPE = 2, t = 12, (203, 83)  - error locator slower than a codeword
//   config 1: PIPE = 1, t = 4,  (203, 163) - error locator much faster
// Codewords (multiples of the generator polynomial, reference model) get 0 .. t
// random bit errors, including the padding-adjacent top degree, and are sent back to
// back. Every output codeword must equal the error-free one. Checked as well: the
// latency of the first codeword, last beat in to first beat out, is T(T+3)/2 + 3
// cycles, input stalls happen, and the Chien search overlaps the next codeword's
// syndrome computation (and, with PIPE = 2, the error locator overlaps both).
module tb_bch_decoder;
  import tb_bch_ref::*;
  localparam int unsigned M = 10, POLY = 'h409, N = 203, P = 4, WORDS = 10;
  localparam int unsigned BEATS = (N + P - 1) / P, NPAD = BEATS * P;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int done = 0;

  always #5 clk = ~clk;

  initial begin
    repeat (60000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    init(M, POLY);
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == 2);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  for (genvar cfg = 0; cfg < 2; cfg++) begin : g_cfg
    localparam int unsigned T    = (cfg == 0) ? 12 : 4;
    localparam int unsigned PIPE = (cfg == 0) ? 2 : 1;
    localparam int unsigned K    = N - M * T;

    logic         in_valid = 0, in_ready, out_valid, out_last;
    logic [P-1:0] in_data = '0, out_data;
    bit           sent [WORDS][];
    longint       t_last_in [WORDS];
    longint       cyc = 0;
    int           stalls = 0, overlap_chien_syn = 0, overlap_three = 0;

    bch_decoder #(.M(M), .POLY(POLY), .N(N), .K(K), .T(T), .P(P), .PIPE(PIPE)) dut (
      .clk, .rst_n, .in_valid, .in_ready, .in_data, .out_valid, .out_data, .out_last);

    always @(posedge clk) begin
      cyc <= cyc + 1;
      if (in_valid && !in_ready) stalls++;
      if (dut.u_chien.busy && in_valid && in_ready) overlap_chien_syn++;
      if (dut.u_chien.busy && !dut.u_ibm.in_ready && !dut.u_ibm.out_valid && in_valid && in_ready)
        overlap_three++;
    end

    // driver
    initial begin
      bit g[];
      bit cw[];
      int unsigned pos[$];
      int unsigned nerr;
      wait (rst_n);
      gen_poly(T, g);
      for (int w = 0; w < WORDS; w++) begin
        rand_codeword(N, g, cw);
        sent[w] = new[NPAD];
        foreach (cw[d]) sent[w][d] = cw[d];
        nerr = (w == 0) ? T : (w == 1) ? 0 : $urandom_range(T, 0);
        add_errors(cw, N, nerr, pos);
        if (w == 2 && nerr > 0 && !(N - 1 inside {pos})) begin
          cw[pos[0]] ^= 1'b1;          // move one error to the top degree
          cw[N - 1]  ^= 1'b1;
        end
        for (int c = 0; c < BEATS; c++) begin
          @(negedge clk);
          in_valid = 1;
          for (int q = 0; q < P; q++) begin
            int unsigned d;
            d = NPAD - 1 - c * P - (P - 1 - q);
            in_data[q] = (d < N) ? cw[d] : 1'b0;
          end
          @(posedge clk);
          while (!in_ready) @(posedge clk);
        end
        t_last_in[w] = cyc + 1;   // edges counted up to and including this one
        @(negedge clk);
        in_valid = 0;
      end
    end

    // monitor
    initial begin
      bit got[];
      int beat;
      longint t_first;
      wait (rst_n);
      for (int w = 0; w < WORDS; w++) begin
        got = new[NPAD];
        beat = 0;
        do begin
          @(posedge clk);
          #1;
          if (out_valid) begin
            if (beat == 0) t_first = cyc;
            for (int q = 0; q < P; q++) got[NPAD - 1 - beat * P - (P - 1 - q)] = out_data[q];
            checks++;
            if (out_last != (beat == BEATS - 1)) begin
              failures++;
              $display("cfg %0d word %0d: out_last wrong at beat %0d", cfg, w, beat);
            end
            beat++;
          end
        end while (beat < BEATS);
        checks++;
        if (got != sent[w]) begin
          failures++;
          $display("cfg %0d word %0d: decoded word differs", cfg, w);
        end
        if (w == 0) begin
          checks++;
          if (t_first - t_last_in[0] != T * (T + 3) / 2 + 3) begin
            failures++;
            $display("cfg %0d: latency %0d, expected %0d", cfg, t_first - t_last_in[0],
                     T * (T + 3) / 2 + 3);
          end
        end
      end
      checks += 2;
      if (stalls == 0 || overlap_chien_syn == 0) begin
        failures++;
        $display("cfg %0d: stalls %0d, Chien/syndrome overlap %0d", cfg, stalls, overlap_chien_syn);
      end
      if (PIPE == 2 && overlap_three == 0) begin
        failures++;
        $display("cfg %0d: three-codeword overlap never seen", cfg);
      end
      $display("cfg %0d: %0d words, stalls %0d, overlap %0d, three-stage %0d", cfg, WORDS,
               stalls, overlap_chien_syn, overlap_three);
      done++;
    end
  end
endmodule

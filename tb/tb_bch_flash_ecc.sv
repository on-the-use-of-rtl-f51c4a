// tb_bch_flash_ecc: full-size end-to-end test of the Flash ECC at its default
// parameters, the (17914, 16384, 102) BCH code over GF(2^15), parallelism 4, 2-stage
// decoder pipeline.
// Three random 16384-bit pages are encoded by the write path; the codewords pass a
// model of the cell array that flips 102 (the full t), a random number and no bits;
// the read path must return every codeword exactly, its message bits equal to the
// page written. The three codewords are sent back to back, so the mechanisms of the
// decoder must all occur and are counted: input stalls while a result waits for the
// next block, the Chien search overlapping the next syndrome computation, all three
// blocks busy on three codewords at once (2-stage pipeline), and codewords with t
// errors corrected. Latency of the first codeword, last beat in to first beat out, is
// checked against T(T+3)/2 + 3 cycles, and the decoder throughput (beats out per
// cycle over the run) is reported.
module tb_bch_flash_ecc;
  import tb_bch_ref::*;
  localparam int unsigned M = 15, N = 17914, K = 16384, T = 102, P = 4, WORDS = 3;
  localparam int unsigned BEATS = (N + P - 1) / P, NPAD = BEATS * P, R = N - K;

  logic clk = 0, rst_n = 0;
  logic enc_in_valid = 0, enc_out_valid, enc_out_last;
  logic [P-1:0] enc_in_data = '0, enc_out_data;
  logic dec_in_valid = 0, dec_in_ready, dec_out_valid, dec_out_last;
  logic [P-1:0] dec_in_data = '0, dec_out_data;
  int checks = 0, failures = 0;

  bch_flash_ecc dut (.*);

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  longint cyc = 0;
  int stalls = 0, overlap_chien_syn = 0, overlap_three = 0, full_t_words = 0;
  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (dec_in_valid && !dec_in_ready) stalls++;
    if (dut.u_dec.u_chien.busy && dec_in_valid && dec_in_ready) overlap_chien_syn++;
    if (dut.u_dec.u_chien.busy && !dut.u_dec.u_ibm.in_ready && !dut.u_dec.u_ibm.out_valid &&
        dec_in_valid && dec_in_ready)
      overlap_three++;
  end

  bit page [WORDS][];
  bit code [WORDS][];
  bit rx   [WORDS][];
  longint t_last_in = 0;

  initial begin
    int unsigned pos[$];
    int unsigned nerr;
    bit got[];
    int beat;
    longint t_first, t_end;
    init(M, 'h8003);
    repeat (3) @(posedge clk);
    rst_n = 1;
    // write path
    for (int w = 0; w < WORDS; w++) begin
      page[w] = new[NPAD];
      code[w] = new[NPAD];
      for (int d = R; d < N; d++) page[w][d] = $urandom_range(1, 0);
      fork
        for (int c = 0; c < BEATS; c++) begin
          @(negedge clk);
          enc_in_valid = 1;
          for (int q = 0; q < P; q++) enc_in_data[q] = page[w][NPAD - 1 - c * P - (P - 1 - q)];
        end
        begin
          beat = 0;
          while (beat < BEATS) begin
            @(posedge clk);
            #1;
            if (enc_out_valid) begin
              for (int q = 0; q < P; q++) code[w][NPAD - 1 - beat * P - (P - 1 - q)] = enc_out_data[q];
              beat++;
            end
          end
        end
      join
      @(negedge clk);
      enc_in_valid = 0;
      // the written codeword carries the page unchanged
      checks++;
      for (int d = R; d < NPAD; d++)
        if (code[w][d] != page[w][d]) begin
          failures++;
          $display("word %0d: page bit %0d not carried by the codeword", w, d);
          break;
        end
      // cell array model: bit errors
      rx[w] = new[NPAD];
      foreach (code[w][d]) rx[w][d] = code[w][d];
      nerr = (w == 0) ? T : (w == 1) ? $urandom_range(T - 1, 1) : 0;
      add_errors(rx[w], N, nerr, pos);
      if (nerr == T) full_t_words++;
    end
    // read path: driver and monitor
    fork
      for (int w = 0; w < WORDS; w++) begin
        for (int c = 0; c < BEATS; c++) begin
          @(negedge clk);
          dec_in_valid = 1;
          for (int q = 0; q < P; q++) dec_in_data[q] = rx[w][NPAD - 1 - c * P - (P - 1 - q)];
          @(posedge clk);
          while (!dec_in_ready) @(posedge clk);
        end
        if (w == 0) t_last_in = cyc + 1;
        @(negedge clk);
        dec_in_valid = 0;
      end
      for (int w = 0; w < WORDS; w++) begin
        got = new[NPAD];
        beat = 0;
        do begin
          @(posedge clk);
          #1;
          if (dec_out_valid) begin
            if (beat == 0 && w == 0) t_first = cyc;
            for (int q = 0; q < P; q++) got[NPAD - 1 - beat * P - (P - 1 - q)] = dec_out_data[q];
            checks++;
            if (dec_out_last != (beat == BEATS - 1)) begin
              failures++;
              $display("word %0d: out_last wrong at beat %0d", w, beat);
            end
            beat++;
          end
        end while (beat < BEATS);
        checks++;
        if (got != code[w]) begin
          failures++;
          $display("word %0d: decoded codeword differs from the one written", w);
        end
        t_end = cyc;
      end
    join
    checks++;
    if (t_first - t_last_in != T * (T + 3) / 2 + 3) begin
      failures++;
      $display("latency %0d cycles, expected %0d", t_first - t_last_in, T * (T + 3) / 2 + 3);
    end
    $display("first-codeword latency %0d cycles (%0d ns at 400 MHz)", t_first - t_last_in,
             (t_first - t_last_in) * 5 / 2);
    $display("stalls %0d, Chien/syndrome overlap %0d, three-codeword overlap %0d, t-error words %0d",
             stalls, overlap_chien_syn, overlap_three, full_t_words);
    checks += 4;
    if (stalls == 0)            begin failures++; $display("no input stall"); end
    if (overlap_chien_syn == 0) begin failures++; $display("no Chien/syndrome overlap"); end
    if (overlap_three == 0)     begin failures++; $display("no three-codeword overlap"); end
    if (full_t_words == 0)      begin failures++; $display("no codeword with t errors"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bch_workloads: runs each of the six evaluated BCH codes through the Flash ECC
// (encoder and decoder) at its own full size and compares the decoding latency with
// the post-layout figures the design was sized against (400 MHz clock):
//   l   code                    field     t    pipeline  latency
//   6   (8262, 8192, 5)         GF(2^14)  5    1-stage   10.4 us
//   8   (8360, 8192, 12)        GF(2^14)  12   1-stage   10.9 us
//   12  (9130, 8192, 67)        GF(2^14)  67   2-stage   17.6 us
//   6   (16459, 16384, 5)       GF(2^15)  5    1-stage   20.7 us
//   8   (16609, 16384, 15)      GF(2^15)  15   1-stage   21.4 us
//   12  (17914, 16384, 102)     GF(2^15)  102  2-stage   40.2 us
// Per code, two pages are encoded; one codeword gets t bit errors and one a random
// number; both are decoded back to back and must equal the written codewords. The
// latency (first beat in to last beat out of the first codeword, no other codeword
// in the decoder) must lie between 85% and 100% of the figure above.
module tb_bch_workloads;
  import tb_bch_ref::*;
  localparam int unsigned NW = 6, P = 4, WORDS = 2;

  logic clk = 0, rst_n = 0;
  int checks = 0, failures = 0;
  int done = 0;
  bit busy_ref = 0;     // the reference tables are shared: one code at a time

  always #5 clk = ~clk;

  initial begin
    repeat (400000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    wait (done == NW);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  localparam int unsigned C_M    [NW] = '{14, 14, 14, 15, 15, 15};
  localparam int unsigned C_POLY [NW] = '{'h4443, 'h4443, 'h4443, 'h8003, 'h8003, 'h8003};
  localparam int unsigned C_N    [NW] = '{8262, 8360, 9130, 16459, 16609, 17914};
  localparam int unsigned C_K    [NW] = '{8192, 8192, 8192, 16384, 16384, 16384};
  localparam int unsigned C_T    [NW] = '{5, 12, 67, 5, 15, 102};
  localparam int unsigned C_PIPE [NW] = '{1, 1, 2, 1, 1, 2};
  localparam int unsigned C_NS   [NW] = '{10400, 10900, 17600, 20700, 21400, 40200};

  for (genvar w = 0; w < NW; w++) begin : g_code
    localparam int unsigned M = C_M[w], POLY = C_POLY[w], N = C_N[w], K = C_K[w];
    localparam int unsigned T = C_T[w], PIPE = C_PIPE[w];
    localparam int unsigned BEATS = (N + P - 1) / P, NPAD = BEATS * P, R = N - K;

    logic enc_in_valid = 0, enc_out_valid, enc_out_last;
    logic [P-1:0] enc_in_data = '0, enc_out_data;
    logic dec_in_valid = 0, dec_in_ready, dec_out_valid, dec_out_last;
    logic [P-1:0] dec_in_data = '0, dec_out_data;
    longint cyc = 0;

    bch_flash_ecc #(.M(M), .POLY(POLY), .N(N), .K(K), .T(T), .P(P), .PIPE(PIPE)) dut (
      .clk, .rst_n, .enc_in_valid, .enc_in_data, .enc_out_valid, .enc_out_data,
      .enc_out_last, .dec_in_valid, .dec_in_ready, .dec_in_data, .dec_out_valid,
      .dec_out_data, .dec_out_last);

    always @(posedge clk) cyc <= cyc + 1;

    initial begin
      bit code [WORDS][];
      bit rx   [WORDS][];
      bit got[];
      int unsigned pos[$];
      int beat;
      longint t_in0, t_out0;
      wait (rst_n);
      wait (!busy_ref);
      busy_ref = 1;
      init(M, POLY);
      for (int i = 0; i < WORDS; i++) begin
        code[i] = new[NPAD];
        fork
          for (int c = 0; c < BEATS; c++) begin
            @(negedge clk);
            enc_in_valid = 1;
            for (int q = 0; q < P; q++) begin
              int unsigned d;
              d = NPAD - 1 - c * P - (P - 1 - q);
              enc_in_data[q] = (d >= R && d < N) ? 1'($urandom_range(1, 0)) : 1'b0;
            end
          end
          begin
            beat = 0;
            while (beat < BEATS) begin
              @(posedge clk);
              #1;
              if (enc_out_valid) begin
                for (int q = 0; q < P; q++) code[i][NPAD - 1 - beat * P - (P - 1 - q)] = enc_out_data[q];
                beat++;
              end
            end
          end
        join
        @(negedge clk);
        enc_in_valid = 0;
        rx[i] = new[NPAD];
        foreach (code[i][d]) rx[i][d] = code[i][d];
        add_errors(rx[i], N, (i == 0) ? T : $urandom_range(T, 0), pos);
      end
      busy_ref = 0;
      t_in0 = 0;
      t_out0 = 0;
      fork
        for (int i = 0; i < WORDS; i++) begin
          for (int c = 0; c < BEATS; c++) begin
            @(negedge clk);
            dec_in_valid = 1;
            for (int q = 0; q < P; q++) dec_in_data[q] = rx[i][NPAD - 1 - c * P - (P - 1 - q)];
            @(posedge clk);
            while (!dec_in_ready) @(posedge clk);
            if (i == 0 && c == 0) t_in0 = cyc;   // edge count before this edge
          end
          @(negedge clk);
          dec_in_valid = 0;
        end
        for (int i = 0; i < WORDS; i++) begin
          got = new[NPAD];
          beat = 0;
          do begin
            @(posedge clk);
            #1;
            if (dec_out_valid) begin
              for (int q = 0; q < P; q++) got[NPAD - 1 - beat * P - (P - 1 - q)] = dec_out_data[q];
              beat++;
            end
          end while (beat < BEATS);
          if (i == 0) t_out0 = cyc;
          checks++;
          if (got != code[i]) begin
            failures++;
            $display("(%0d, %0d, %0d): codeword %0d decoded wrongly", N, K, T, i);
          end
        end
      join
      begin
        longint ns;
        ns = (t_out0 - t_in0) * 5 / 2;
        $display("(%0d, %0d, %0d) PIPE=%0d: latency %0d cycles = %0d ns, table %0d ns",
                 N, K, T, PIPE, t_out0 - t_in0, ns, C_NS[w]);
        checks++;
        if (ns > C_NS[w] || ns * 100 < longint'(C_NS[w]) * 85) begin
          failures++;
          $display("(%0d, %0d, %0d): latency outside 85-100%% of %0d ns", N, K, T, C_NS[w]);
        end
      end
      done++;
    end
  end
endmodule

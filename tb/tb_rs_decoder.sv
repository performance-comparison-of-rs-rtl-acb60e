// tb_rs_decoder: end-to-end testbench of the RS(255,239) decoder at its
// default size.
//
// A driver sends random systematic codewords (encoded by the reference
// model) with 0..8 random symbol errors, plus some with 9..16 errors, mostly
// back to back and sometimes with idle gaps, honouring in_ready. A monitor
// collects each output word by out_pos and checks:
//   - words with <= t errors: every symbol equals the transmitted codeword,
//     out_corrected marks exactly the error positions, out_nerr equals the
//     number of errors, out_fail is low;
//   - words with > t errors: either out_fail is raised, or the output is a
//     codeword (all syndromes zero) that the decoder could legitimately reach;
//   - positions come out 0..N-1 in order, out_last on position N-1;
//   - with back-to-back input, words leave one per PERIOD = N + 5t + 3
//     clocks;
//   - the first word's first output appears FIRST_OUT clocks after its last
//     input symbol (syndrome handoff, 5t+1 clocks of key equation solving,
//     Chien load, Forney and correction registers).
// It also counts how often each mechanism of the decoder happened: input
// stall, reception overlapping correction, error-free words, words with the
// full t errors, words flagged uncorrectable, and the three branches of the
// Berlekamp-Massey iteration (Delta = 0; length change; sigma update without
// length change); each must occur.
module tb_rs_decoder;
  import rs_pkg::gf_t;
  import rs_tb_pkg::*;

  localparam int N = 255;
  localparam int K = 239;
  localparam int T = (N - K) / 2;
  localparam int FIRST_OUT = 5 * T + 5;
  localparam int WORDS = 60;
  localparam int PERIOD = N + 5 * T + 3;   // clocks per codeword, back to back

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic in_ready;
  gf_t  in_data;
  logic out_valid;
  logic [7:0] out_pos;
  gf_t  out_data;
  logic out_corrected;
  logic out_last;
  logic out_fail;
  logic [7:0] out_nerr;

  int checks = 0;
  int failures = 0;
  // mechanism counters
  int n_stall = 0, n_overlap = 0, n_clean = 0, n_full_t = 0, n_flagged = 0;
  int n_miscorrected = 0;
  // Berlekamp-Massey flowchart branches, seen inside the key equation solver
  int n_bm_delta_zero = 0, n_bm_grow = 0, n_bm_keep = 0;

  always #5 clk = ~clk;

  rs_decoder dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  cw_t  sent_c [WORDS];
  cw_t  sent_e [WORDS];
  int   sent_n [WORDS];
  int   last_in_cycle [WORDS];
  int   cycle = 0;   // number of rising edges so far
  int   words_in = 0;
  bit   driver_done = 1'b0;

  always @(posedge clk) begin
    cycle = cycle + 1;
    if (rst_n && in_valid && !in_ready) n_stall++;
    if (rst_n && in_valid && in_ready && out_valid) n_overlap++;
    if (rst_n && dut.u_kes.state == dut.u_kes.S_UPD) begin
      if (dut.u_kes.delta == '0) n_bm_delta_zero++;
      else if (dut.u_kes.grow)   n_bm_grow++;
      else                       n_bm_keep++;
    end
  end

  // driver
  initial begin
    cw_t c, e;
    rst_n    = 1'b0;
    in_valid = 1'b0;
    in_data  = '0;
    build_tables();
    repeat (4) @(posedge clk);
    @(negedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < WORDS; w++) begin
      int nerr;
      if (w % 10 == 9)      nerr = $urandom_range(16, T + 1);
      else if (w % 10 == 0) nerr = 0;
      else                  nerr = (w % 10 == 8) ? T : $urandom_range(T, 1);
      random_codeword(N, T, c);
      random_errors(N, nerr, e);
      sent_c[w] = c;
      sent_e[w] = e;
      sent_n[w] = nerr;
      if (w % 7 == 3) repeat ($urandom_range(400, 1)) @(negedge clk);
      // inputs change on the falling edge; in_ready seen there is what the
      // next rising edge samples
      for (int i = N - 1; i >= 0; i--) begin
        @(negedge clk);
        in_valid = 1'b1;
        in_data  = c[i] ^ e[i];
        while (!in_ready) @(negedge clk);
      end
      @(negedge clk);
      last_in_cycle[w] = cycle;      // rising edge that took the last symbol
      in_valid = 1'b0;
      words_in++;
    end
    driver_done = 1'b1;
  end

  // monitor
  initial begin
    cw_t got;
    bit  corr [255];
    int  first_cycle;
    int  prev_last;
    int  min_gap;
    sym_t s [17];
    prev_last = -1;
    min_gap   = 1 << 30;
    @(posedge rst_n);
    for (int w = 0; w < WORDS; w++) begin
      for (int i = 0; i < N; i++) begin
        do @(negedge clk); while (!out_valid);
        if (i == 0) first_cycle = cycle;
        got[i]  = out_data;
        corr[i] = out_corrected;
        check(int'(out_pos) == i, $sformatf("word %0d: out_pos %0d, expected %0d", w, out_pos, i));
        check(out_last == (i == N - 1), "out_last on the last position");
        if (i == N - 1) begin
          if (prev_last >= 0 && cycle - prev_last < min_gap) min_gap = cycle - prev_last;
          prev_last = cycle;
          if (sent_n[w] <= T) begin
            int bad;
            bad = 0;
            for (int p = 0; p < N; p++) begin
              if (got[p] != sent_c[w][p]) bad++;
              if (corr[p] != (sent_e[w][p] != 0)) bad++;
            end
            check(bad == 0, $sformatf("word %0d (%0d errors): %0d symbols wrong", w, sent_n[w], bad));
            check(!out_fail, $sformatf("word %0d: correctable word flagged", w));
            check(int'(out_nerr) == sent_n[w],
                  $sformatf("word %0d: out_nerr %0d, expected %0d", w, out_nerr, sent_n[w]));
            if (sent_n[w] == 0) n_clean++;
            if (sent_n[w] == T) n_full_t++;
          end else begin
            if (out_fail) n_flagged++;
            else begin
              n_miscorrected++;
              syndromes(got, N, T, s);
              for (int j = 1; j <= 2 * T; j++)
                check(s[j] == 0, $sformatf("word %0d: unflagged output is not a codeword", w));
            end
          end
        end
      end
      if (w == 0)
        check(first_cycle - last_in_cycle[0] == FIRST_OUT,
              $sformatf("first output %0d clocks after last input, expected %0d",
                        first_cycle - last_in_cycle[0], FIRST_OUT));
    end
    repeat (5) @(posedge clk);
    check(!out_valid, "no output after the last word");
    $display("mechanisms: stall cycles %0d, overlap cycles %0d, clean words %0d, t-error words %0d, flagged %0d, miscorrected %0d",
             n_stall, n_overlap, n_clean, n_full_t, n_flagged, n_miscorrected);
    $display("Berlekamp-Massey iterations: Delta = 0 %0d, length change %0d, no length change %0d",
             n_bm_delta_zero, n_bm_grow, n_bm_keep);
    check(n_bm_delta_zero > 0, "iteration with Delta = 0");
    check(n_bm_grow > 0, "iteration with 2L < k (length change)");
    check(n_bm_keep > 0, "iteration with Delta != 0 and 2L >= k");
    check(min_gap == PERIOD, $sformatf("fastest codeword rate: one per %0d clocks, expected %0d",
                                       min_gap, PERIOD));
    check(n_stall > 0, "input stall happened");
    check(n_overlap > 0, "reception overlapped correction");
    check(n_clean > 0, "error-free word decoded");
    check(n_full_t > 0, "word with t errors decoded");
    check(n_flagged > 0, "uncorrectable word flagged");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rs_syndrome: self-checking testbench of the syndrome calculator.
//
// Sends random RS(255,239) codewords, some clean and some with 1..10 random
// symbol errors, highest degree first with random idle clocks between
// symbols. After each codeword it checks S_1..S_16 against r(alpha^j)
// computed by the table-based reference model, that synd_valid rises exactly
// one clock after the 255th symbol, that in_ready stays low while the
// syndromes wait, and that clean codewords give all-zero syndromes.
module tb_rs_syndrome;
  import rs_pkg::gf_t;
  import rs_tb_pkg::*;

  localparam int N = 255;
  localparam int T = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic in_valid;
  logic in_ready;
  gf_t  in_data;
  logic synd_valid;
  logic synd_ready;
  gf_t [2*T:1] synd;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rs_syndrome #(.N(N), .T(T)) dut (.*);

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

  initial begin
    cw_t  c, e, r;
    sym_t s [17];
    build_tables();
    rst_n      = 1'b0;
    in_valid   = 1'b0;
    in_data    = '0;
    synd_ready = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    for (int w = 0; w < 30; w++) begin
      int nerr;
      nerr = (w % 3 == 0) ? 0 : $urandom_range(10, 1);
      random_codeword(N, T, c);
      random_errors(N, nerr, e);
      for (int i = 0; i < N; i++) r[i] = c[i] ^ e[i];
      syndromes(r, N, T, s);
      for (int i = N - 1; i >= 0; i--) begin
        while ($urandom_range(3) == 0) begin
          in_valid <= 1'b0;
          @(posedge clk);
        end
        in_valid <= 1'b1;
        in_data  <= r[i];
        @(posedge clk);
        while (!in_ready) @(posedge clk);
      end
      in_valid <= 1'b0;
      #1;
      check(synd_valid, "synd_valid one clock after the last symbol");
      check(!in_ready, "in_ready low while syndromes wait");
      // hold the syndromes a few clocks: they must not change
      repeat ($urandom_range(4)) @(posedge clk);
      #1;
      for (int j = 1; j <= 2 * T; j++)
        check(synd[j] == s[j], $sformatf("word %0d S_%0d = %02x, expected %02x", w, j, synd[j], s[j]));
      if (nerr == 0) check(synd == '0, "clean codeword has zero syndromes");
      synd_ready <= 1'b1;
      @(posedge clk);
      synd_ready <= 1'b0;
      #1;
      check(!synd_valid && in_ready, "syndromes taken, input open again");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

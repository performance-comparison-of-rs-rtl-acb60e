// tb_rs_key_equation: self-checking testbench of the Berlekamp-Massey key
// equation solver.
//
// For random error patterns of 0..8 symbol errors it computes the syndromes
// with the reference model, starts the solver and checks, against values
// worked out from the known error positions:
//   sigma(x) = prod (1 + alpha^p x) over the error positions p,
//   L        = number of errors,
//   Omega(x) = sigma(x) [1 + S(x)] mod x^(t+1),
// and that done comes LATENCY clocks after start (2 clocks per iteration for
// 2t iterations, t+1 clocks for Omega). Patterns of 9..12 errors are also
// run; for those it only checks that the solver finishes.
module tb_rs_key_equation;
  import rs_pkg::gf_t;
  import rs_tb_pkg::*;

  localparam int N = 255;
  localparam int T = 8;
  localparam int LATENCY = 4 * T + T + 1;

  logic clk = 1'b0;
  logic rst_n;
  logic start;
  gf_t [2*T:1] synd;
  logic ready;
  logic done;
  gf_t [T:0] sigma;
  gf_t [T:0] omega;
  logic [5:0] L;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rs_key_equation #(.T(T)) dut (.*);

  task automatic check(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL: watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    cw_t  c, e, r;
    sym_t s [17];
    sym_t sg [17];
    sym_t om [17];
    int   deg, cyc;
    build_tables();
    rst_n = 1'b0;
    start = 1'b0;
    synd  = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int w = 0; w < 120; w++) begin
      int nerr;
      nerr = (w < 90) ? (w % 9) : 9 + (w % 4);
      random_codeword(N, T, c);
      random_errors(N, nerr, e);
      for (int i = 0; i < N; i++) r[i] = c[i] ^ e[i];
      syndromes(r, N, T, s);
      deg = locator(e, N, sg);
      omega_of(sg, s, T, om);
      check(ready, "solver ready before start");
      for (int j = 1; j <= 2 * T; j++) synd[j] <= s[j];
      start <= 1'b1;
      @(posedge clk);
      start <= 1'b0;
      cyc = 0;
      do begin
        @(posedge clk);
        cyc++;
        #1;
      end while (!done && cyc < 1000);
      check(done, "done raised");
      if (nerr <= T) begin
        check(cyc == LATENCY, $sformatf("latency %0d clocks, expected %0d", cyc, LATENCY));
        check(int'(L) == deg, $sformatf("word %0d: L = %0d, expected %0d", w, L, deg));
        for (int i = 0; i <= T; i++) begin
          check(sigma[i] == sg[i], $sformatf("word %0d: sigma_%0d = %02x, expected %02x", w, i, sigma[i], sg[i]));
          check(omega[i] == om[i], $sformatf("word %0d: omega_%0d = %02x, expected %02x", w, i, omega[i], om[i]));
        end
      end
      repeat ($urandom_range(2)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_rs_forney: self-checking testbench of the Forney error magnitude block.
//
// For random codewords with 0..8 random symbol errors the reference model
// gives the syndromes, sigma(x) from the known error positions and
// Omega(x) = sigma(x)[1 + S(x)] mod x^(t+1). The testbench loads Omega and
// plays the part of the Chien block: for i = 0..N-1 it drives step, pos,
// root = (sigma(alpha^-i) == 0) and odd_sum = odd part of sigma at alpha^-i.
// One clock after each step it checks that err_pos = i and that err_val is
// the error value that was injected at position i (0 where there was none).
module tb_rs_forney;
  import rs_pkg::gf_t;
  import rs_tb_pkg::*;

  localparam int N = 255;
  localparam int T = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  gf_t [T:0] omega;
  logic step;
  logic [7:0] pos;
  logic root;
  gf_t odd_sum;
  logic err_valid;
  logic [7:0] err_pos;
  gf_t err_val;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rs_forney #(.T(T)) dut (.*);

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
    cw_t  c, e, r, sgw;
    sym_t s [17];
    sym_t sg [17];
    sym_t om [17];
    int   deg;
    build_tables();
    rst_n = 1'b0;
    load  = 1'b0;
    step  = 1'b0;
    pos   = '0;
    root  = 1'b0;
    odd_sum = '0;
    omega = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int w = 0; w < 40; w++) begin
      int nerr;
      nerr = w % (T + 1);
      random_codeword(N, T, c);
      random_errors(N, nerr, e);
      for (int i = 0; i < N; i++) r[i] = c[i] ^ e[i];
      syndromes(r, N, T, s);
      deg = locator(e, N, sg);
      omega_of(sg, s, T, om);
      for (int i = 0; i < 255; i++) sgw[i] = (i <= 16) ? sg[i] : 8'h00;
      for (int i = 0; i <= T; i++) omega[i] <= om[i];
      load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      for (int i = 0; i <= N; i++) begin
        if (i < N) begin
          sym_t odd;
          odd = 0;
          for (int j = 1; j <= T; j += 2) odd = odd ^ gm(sg[j], apow(-i * j));
          step    <= 1'b1;
          pos     <= 8'(i);
          root    <= (peval(sgw, T + 1, apow(-i)) == 0);
          odd_sum <= odd;
        end else begin
          step <= 1'b0;
        end
        @(posedge clk);
        #1;
        // err_* now shows the step of this clock
        if (i < N) begin
          check(err_valid, "err_valid follows step");
          check(int'(err_pos) == i, $sformatf("err_pos %0d, expected %0d", err_pos, i));
          check(err_val == e[i], $sformatf("word %0d pos %0d: err_val %02x, expected %02x", w, i, err_val, e[i]));
        end else begin
          check(!err_valid, "err_valid low after the last step");
        end
      end
      repeat ($urandom_range(3)) @(posedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

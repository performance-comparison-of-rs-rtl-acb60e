// tb_rs_chien_search: self-checking testbench of the Chien search block.
//
// Builds sigma(x) = prod (1 + alpha^p x) for 0..8 random distinct error
// positions p, loads it and follows the N-clock search. For every clock it
// checks that pos counts 0..N-1, that root is high exactly at the error
// positions, and that odd_sum equals the odd-degree part of sigma evaluated
// at alpha^-pos by the reference model. It also checks that done comes one
// clock after the last position, that the search lasts exactly N clocks and
// that root_count equals the number of errors.
module tb_rs_chien_search;
  import rs_pkg::gf_t;
  import rs_tb_pkg::*;

  localparam int N = 255;
  localparam int T = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic load;
  gf_t [T:0] sigma;
  logic busy;
  logic valid;
  logic [7:0] pos;
  logic root;
  gf_t odd_sum;
  logic done;
  logic [7:0] root_count;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

  rs_chien_search #(.N(N), .T(T)) dut (.*);

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
    cw_t  e;
    sym_t sg [17];
    int   deg;
    build_tables();
    rst_n = 1'b0;
    load  = 1'b0;
    sigma = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int w = 0; w < 40; w++) begin
      int nerr;
      nerr = w % (T + 1);
      random_errors(N, nerr, e);
      deg = locator(e, N, sg);
      for (int i = 0; i <= T; i++) sigma[i] <= sg[i];
      load <= 1'b1;
      @(posedge clk);
      load <= 1'b0;
      for (int i = 0; i < N; i++) begin
        sym_t odd, x;
        #1;
        x   = apow(-i);
        odd = 0;
        for (int j = 1; j <= T; j += 2) odd = odd ^ gm(sg[j], apow(-i * j));
        check(valid && busy, "valid during search");
        check(int'(pos) == i, $sformatf("pos %0d, expected %0d", pos, i));
        check(root == (e[i] != 0), $sformatf("word %0d pos %0d: root %0d, error %02x", w, i, root, e[i]));
        check(odd_sum == odd, $sformatf("word %0d pos %0d: odd_sum %02x, expected %02x", w, i, odd_sum, odd));
        check(!done, "done not before the end");
        @(posedge clk);
      end
      #1;
      check(done && !busy && !valid, "done one clock after the last position");
      check(int'(root_count) == nerr, $sformatf("root_count %0d, expected %0d", root_count, nerr));
      @(posedge clk);
      #1;
      check(!done, "done is one clock long");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

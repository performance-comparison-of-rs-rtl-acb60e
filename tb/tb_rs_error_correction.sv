// tb_rs_error_correction: self-checking testbench of the error correction
// stage.
//
// Drives random streams of error values (mostly zero) and received symbols
// for N positions per word and checks, one clock later, out_data =
// rx_data XOR err_val, out_pos, out_corrected and out_last. At the end of
// each word it presents a root count and L and checks the failure verdict:
// fail exactly when L > t or the root count differs from L.
module tb_rs_error_correction;
  import rs_pkg::gf_t;

  localparam int N = 255;
  localparam int T = 8;

  logic clk = 1'b0;
  logic rst_n;
  logic err_valid;
  logic [7:0] err_pos;
  gf_t err_val;
  gf_t rx_data;
  logic check_valid;
  logic [7:0] root_count;
  logic [5:0] L;
  logic out_valid;
  logic [7:0] out_pos;
  gf_t out_data;
  logic out_corrected;
  logic out_last;
  logic out_fail;
  logic [7:0] out_nerr;

  int checks = 0;
  int failures = 0;
  int fails_seen = 0;

  always #5 clk = ~clk;

  rs_error_correction #(.N(N), .T(T)) dut (.*);

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
    rst_n       = 1'b0;
    err_valid   = 1'b0;
    err_pos     = '0;
    err_val     = '0;
    rx_data     = '0;
    check_valid = 1'b0;
    root_count  = '0;
    L           = '0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    @(posedge clk);
    for (int w = 0; w < 30; w++) begin
      int  lval, cnt;
      bit  exp_fail;
      lval = $urandom_range(10);
      cnt  = (w % 3 == 0) ? $urandom_range(10) : lval;
      exp_fail = (lval > T) || (cnt != lval);
      for (int i = 0; i < N; i++) begin
        gf_t ev, rx;
        ev = ($urandom_range(9) == 0) ? gf_t'($urandom_range(255, 1)) : gf_t'(0);
        rx = gf_t'($urandom);
        err_valid   <= 1'b1;
        err_pos     <= 8'(i);
        err_val     <= ev;
        rx_data     <= rx;
        check_valid <= (i == N - 1);
        root_count  <= 8'(cnt);
        L           <= 6'(lval);
        @(posedge clk);
        #1;
        check(out_valid && int'(out_pos) == i, "out_valid/out_pos");
        check(out_data == (rx ^ ev), $sformatf("pos %0d: out %02x, expected %02x", i, out_data, rx ^ ev));
        check(out_corrected == (ev != 0), "out_corrected");
        check(out_last == (i == N - 1), "out_last");
        if (i == N - 1) begin
          check(out_fail == exp_fail, $sformatf("word %0d: fail %0d, expected %0d (L %0d, roots %0d)",
                                                w, out_fail, exp_fail, lval, cnt));
          check(int'(out_nerr) == cnt, "out_nerr");
          if (exp_fail) fails_seen++;
        end
      end
      err_valid   <= 1'b0;
      check_valid <= 1'b0;
      @(posedge clk);
      #1;
      check(!out_valid && !out_last, "idle after the word");
    end
    check(fails_seen > 0, "failure verdict exercised");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

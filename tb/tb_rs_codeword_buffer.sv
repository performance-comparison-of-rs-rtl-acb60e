// tb_rs_codeword_buffer: self-checking testbench of the delay-path buffer.
//
// Writes a stream of random codewords (N symbols each, in arrival order
// r_{N-1} first), swapping banks after each. While codeword m+1 is being
// written, codeword m is read back by position i = 0..N-1 with random idle
// clocks, and every rd_data (one clock after rd_en) must equal r_i of
// codeword m. Runs with the full N = 255 and with a shortened N = 100.
module tb_rs_codeword_buffer;
  import rs_pkg::gf_t;

  logic clk = 1'b0;
  logic rst_n;

  int checks = 0;
  int failures = 0;

  always #5 clk = ~clk;

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

  // one harness per code length
  for (genvar g = 0; g < 2; g++) begin : g_len
    localparam int N = (g == 0) ? 255 : 100;
    logic       wr_en, swap, rd_en;
    gf_t        wr_data, rd_data;
    logic [7:0] rd_pos;
    logic       finished = 1'b0;

    rs_codeword_buffer #(.N(N)) dut (
      .clk, .rst_n, .wr_en, .wr_data, .swap, .rd_en, .rd_pos, .rd_data
    );

    gf_t words [6][255];

    initial begin
      wr_en = 1'b0;
      swap  = 1'b0;
      rd_en = 1'b0;
      wr_data = '0;
      rd_pos  = '0;
      for (int m = 0; m < 6; m++)
        for (int i = 0; i < 255; i++) words[m][i] = gf_t'($urandom);
      @(posedge rst_n);
      @(posedge clk);
      for (int m = 0; m <= 6; m++) begin
        fork
          // write codeword m (if any), highest degree first
          if (m < 6) begin
            for (int i = N - 1; i >= 0; i--) begin
              wr_en   <= 1'b1;
              wr_data <= words[m][i];
              @(posedge clk);
            end
            wr_en <= 1'b0;
          end
          // read codeword m-1 by position
          if (m > 0) begin
            for (int i = 0; i < N; i++) begin
              while ($urandom_range(4) == 0) begin
                rd_en <= 1'b0;
                @(posedge clk);
              end
              rd_en  <= 1'b1;
              rd_pos <= 8'(i);
              @(posedge clk);
              rd_en <= 1'b0;
              #1;
              check(rd_data == words[m-1][i],
                    $sformatf("N=%0d word %0d pos %0d: %02x, expected %02x",
                              N, m - 1, i, rd_data, words[m-1][i]));
            end
          end
        join
        swap <= 1'b1;
        @(posedge clk);
        swap <= 1'b0;
      end
      finished = 1'b1;
    end
  end

  initial begin
    rst_n = 1'b0;
    repeat (3) @(posedge clk);
    rst_n = 1'b1;
    wait (g_len[0].finished && g_len[1].finished);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

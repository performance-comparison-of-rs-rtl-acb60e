// rs_error_correction: error correction stage of the RS decoder.
//
// Adds (XOR in GF(2^8)) the error vector from the Forney block to the delayed
// received symbol of the same position, giving the decoder's estimate of the
// transmitted symbol: c_i = r_i + Y_i. The output is registered.
//
// It also judges the codeword as a whole. Berlekamp-Massey gives the degree L
// of sigma(x); the Chien search counts the roots it found. A correctable word
// (at most t errors) has exactly L distinct roots among the codeword
// positions. If L > t or the count differs from L, the word had more errors
// than the code can correct, and fail is raised with the word's last symbol.
// The adder follows the described correction block; the failure check is
// this design's addition and uses the root count the Chien search makes.
//
// Interface
//   err_valid, err_pos, err_val : error vector from the Forney block.
//   rx_data        : received symbol of position err_pos (same clock).
//   check_valid, root_count, L  : root count from the Chien block and L from
//                    the key equation solver, presented in the clock in which
//                    the last position (N-1) arrives on err_*.
//   out_valid, out_pos, out_data : corrected symbol, one clock later.
//   out_corrected  : this symbol was changed.
//   out_last       : last symbol of the word; out_fail and out_nerr valid.
//   out_nerr       : number of symbols corrected (the root count).
module rs_error_correction
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        err_valid,
  input  logic [7:0]  err_pos,
  input  gf_t         err_val,
  input  gf_t         rx_data,
  input  logic        check_valid,
  input  logic [7:0]  root_count,
  input  logic [5:0]  L,
  output logic        out_valid,
  output logic [7:0]  out_pos,
  output gf_t         out_data,
  output logic        out_corrected,
  output logic        out_last,
  output logic        out_fail,
  output logic [7:0]  out_nerr
);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      out_valid     <= 1'b0;
      out_pos       <= '0;
      out_data      <= '0;
      out_corrected <= 1'b0;
      out_last      <= 1'b0;
      out_fail      <= 1'b0;
      out_nerr      <= '0;
    end else begin
      out_valid     <= err_valid;
      out_pos       <= err_pos;
      out_data      <= rx_data ^ err_val;
      out_corrected <= err_valid && (err_val != '0);
      out_last      <= err_valid && (err_pos == 8'(N - 1));
      if (check_valid) begin
        out_fail <= (L > 6'(T)) || ({2'b00, L} != root_count);
        out_nerr <= root_count;
      end
    end
  end

endmodule

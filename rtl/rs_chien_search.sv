// rs_chien_search: error locator (Chien search) of the RS decoder.
//
// Finds the roots of the error locator polynomial sigma(x) by trying every
// codeword position. An error in position i (the coefficient r_i of x^i)
// makes sigma(alpha^-i) = 0. The block has t+1 stages; stage j holds a
// register and a constant multiplier by alpha^-j (= alpha^(255-j)). On the
// load clock the mux routes sigma_j into register j; on each later clock the
// register takes its own value times alpha^-j, so during search step i it
// holds sigma_j alpha^(-ij). The sum of all registers is sigma(alpha^-i); a
// zero detector flags a root. The search runs for N clocks, i = 0..N-1, and
// counts the zeros, which is the number of symbols in error.
//
// The positions come out as i = 0, 1, ..., N-1: lowest-degree coefficient
// first, which is the reverse of the order in which the codeword was received.
// The sum of the odd-degree registers, sigma_odd(alpha^-i) =
// alpha^-i * sigma'(alpha^-i), is also brought out for the Forney block.
// The stage structure, the negative exponents and the t+1 stage count are as
// described for this decoder; ports and the done/count outputs are this
// design's choices.
//
// Interface
//   load, sigma : load pulse with sigma_0..sigma_T; the search starts on the
//                 next clock.
//   valid, pos  : high for N clocks, pos = i of the position being tested.
//   root        : sigma(alpha^-pos) == 0 (combinational, valid with valid).
//   odd_sum     : sigma_odd(alpha^-pos) (combinational, valid with valid).
//   done        : one-clock pulse after the last position.
//   root_count  : number of roots found, valid from done until the next load.
//   busy        : a search is in progress.
module rs_chien_search
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  gf_t [T:0]     sigma,
  output logic          busy,
  output logic          valid,
  output logic [7:0]    pos,
  output logic          root,
  output gf_t           odd_sum,
  output logic          done,
  output logic [7:0]    root_count
);

  gf_t [T:0] r;
  gf_t       sum;

  always_comb begin
    sum     = '0;
    odd_sum = '0;
    for (int j = 0; j <= T; j++) begin
      sum = sum ^ r[j];
      if (j % 2 == 1) odd_sum = odd_sum ^ r[j];
    end
  end

  assign valid = busy;
  assign root  = busy && (sum == '0);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      busy       <= 1'b0;
      pos        <= '0;
      done       <= 1'b0;
      root_count <= '0;
    end else begin
      done <= 1'b0;
      if (load) begin
        busy       <= 1'b1;
        pos        <= '0;
        root_count <= '0;
      end else if (busy) begin
        if (root) root_count <= root_count + 8'd1;
        if (pos == 8'(N - 1)) begin
          busy <= 1'b0;
          done <= 1'b1;
        end else begin
          pos <= pos + 8'd1;
        end
      end
    end
  end

  for (genvar j = 0; j <= T; j++) begin : g_stage
    localparam gf_t AJ = gf_alpha(NMAX - j);    // alpha^-j
    always_ff @(posedge clk) begin
      if (load)      r[j] <= sigma[j];
      else if (busy) r[j] <= gf_mul(r[j], AJ);
    end
  end

endmodule

// rs_forney: error magnitude block (Forney algorithm) of the RS decoder.
//
// For every position i that the Chien search tests, it forms
//     Y_i = Omega(alpha^-i) / sigma_odd(alpha^-i)
// and gives Y_i out where alpha^-i is a root of sigma(x), and 0 elsewhere.
// With Omega(x) = sigma(x)[1 + S(x)] mod x^(2t+1) and syndromes starting at
// alpha^1, this is the Forney error value; sigma_odd(x) = x sigma'(x) is the
// odd-degree part of sigma, which the Chien block already sums.
//
// Omega(alpha^-i) is evaluated in the same way as the Chien search: t+1
// stages, each a mux (coefficient on the load clock, feedback afterwards), a
// register and a constant multiplier by alpha^-j. The odd sum from the Chien
// block goes through an inverter (a^254) and multiplies the Omega sum; the
// product is the error value, registered together with its position.
// This structure follows the described error magnitude block; the one-clock
// output register and the port names are this design's choices.
//
// Interface
//   load, omega      : load pulse with Omega_0..Omega_T, in the same clock as
//                      the Chien block's load.
//   step, pos, root, odd_sum : the Chien block's valid, pos, root and odd_sum.
//   err_valid, err_pos, err_val : one clock after each step; err_val = Y_pos
//                      at a root, 0 otherwise.
module rs_forney
  import rs_pkg::*;
#(
  parameter int unsigned T = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          load,
  input  gf_t [T:0]     omega,
  input  logic          step,
  input  logic [7:0]    pos,
  input  logic          root,
  input  gf_t           odd_sum,
  output logic          err_valid,
  output logic [7:0]    err_pos,
  output gf_t           err_val
);

  gf_t [T:0] r;
  gf_t       omega_sum;

  always_comb begin
    omega_sum = '0;
    for (int j = 0; j <= T; j++)
      omega_sum = omega_sum ^ r[j];
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      err_valid <= 1'b0;
      err_pos   <= '0;
      err_val   <= '0;
    end else begin
      err_valid <= step;
      err_pos   <= pos;
      err_val   <= (step && root) ? gf_mul(omega_sum, gf_inv(odd_sum)) : '0;
    end
  end

  for (genvar j = 0; j <= T; j++) begin : g_stage
    localparam gf_t AJ = gf_alpha(NMAX - j);    // alpha^-j
    always_ff @(posedge clk) begin
      if (load)      r[j] <= omega[j];
      else if (step) r[j] <= gf_mul(r[j], AJ);
    end
  end

endmodule

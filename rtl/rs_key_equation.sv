// rs_key_equation: key equation solver of the RS decoder (Berlekamp-Massey).
//
// From the 2t syndromes it finds the error locator polynomial sigma(x) and
// the error magnitude polynomial Omega(x) that satisfy the key equation
//     sigma(x) [1 + S(x)] = Omega(x)  mod x^(2t+1),
// with S(x) = S_1 x + S_2 x^2 + ... + S_2t x^2t.
//
// sigma(x) is found with the Berlekamp-Massey iteration of the flowchart this
// decoder follows: start with k = 0, sigma = 1, L = 0, T(x) = x; then for
// k = 1..2t
//     Delta = S_k + sum_{i=1..L} sigma_i S_{k-i}         (discrepancy)
//     if Delta != 0:  sigma <- sigma - Delta T(x)          (sigma update)
//                     if 2L < k: L <- k - L, T(x) <- sigma_old / Delta
//     T(x) <- x T(x)
// In GF(2^8) subtraction is XOR. Each iteration takes two clocks: one to form
// Delta (t multipliers and an adder tree), one to update sigma and T (t+1
// multipliers plus one inverter for 1/Delta). The shift of T(x) is done on
// every iteration, also when Delta = 0, which is what the algorithm needs.
// Afterwards Omega_j = sum_{i=0..j} sigma_i S'_{j-i} (S'_0 = 1, S'_m = S_m)
// is formed for j = 0..t, one coefficient per clock on t+1 multipliers; only
// the t+1 low coefficients are kept because deg Omega <= L <= t for every
// correctable word. sigma and T are likewise held to t+1 coefficients.
//
// Interface
//   start, synd   : start pulse with the 2T syndromes (accepted only in idle,
//                   see ready).
//   ready         : high while idle.
//   done          : one-clock pulse when sigma, omega and L are valid; they
//                   stay valid until the next start.
//   sigma[i], omega[i] : coefficients of x^i, i = 0..T.
//   L             : length of the final shift register (= deg sigma when the
//                   word is correctable; L > T means uncorrectable).
// Timing: done rises 5T + 1 clocks after start (41 for t = 8).
// The datapath organisation (two clocks per iteration, serial Omega) is this
// design's choice; the algorithm is the one described.
module rs_key_equation
  import rs_pkg::*;
#(
  parameter int unsigned T = 8
) (
  input  logic          clk,
  input  logic          rst_n,
  input  logic          start,
  input  gf_t [2*T:1]   synd,
  output logic          ready,
  output logic          done,
  output gf_t [T:0]     sigma,
  output gf_t [T:0]     omega,
  output logic [5:0]    L
);

  typedef enum logic [2:0] {S_IDLE, S_DISC, S_UPD, S_OMEGA, S_DONE} state_t;
  state_t state;

  gf_t [2*T:0] s;        // s[0] = 1 (the "1 +" of the key equation), s[m] = S_m
  gf_t [T:0]   tpoly;    // correction polynomial T(x)
  gf_t         delta;
  logic [5:0]  k;        // iteration number, 1..2T
  logic [5:0]  j;        // Omega coefficient being formed

  // Discrepancy of iteration k: S_k + sum sigma_i S_{k-i}, terms with k-i < 1
  // left out.
  gf_t delta_c;
  always_comb begin
    delta_c = s[k];
    for (int i = 1; i <= T; i++)
      if (int'(k) - i >= 1)
        delta_c = delta_c ^ gf_mul(sigma[i], s[int'(k) - i]);
  end

  // Sigma/T update of iteration k.
  gf_t         delta_inv;
  gf_t [T:0]   sigma_n;
  gf_t [T-1:0] tpoly_n;    // T(x) before the shift; its x^T term drops out
  logic        grow;      // 2L < k: the register length changes
  always_comb begin
    delta_inv = gf_inv(delta);
    grow      = (delta != '0) && ({L, 1'b0} < {1'b0, k});
    for (int i = 0; i <= T; i++) begin
      sigma_n[i] = (delta != '0) ? (sigma[i] ^ gf_mul(delta, tpoly[i])) : sigma[i];
      if (i < T) tpoly_n[i] = grow ? gf_mul(sigma[i], delta_inv) : tpoly[i];
    end
  end

  // Omega coefficient j.
  gf_t omega_c;
  always_comb begin
    omega_c = '0;
    for (int i = 0; i <= T; i++)
      if (i <= int'(j))
        omega_c = omega_c ^ gf_mul(sigma[i], s[int'(j) - i]);
  end

  assign ready = (state == S_IDLE) || (state == S_DONE);

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state <= S_IDLE;
      done  <= 1'b0;
      sigma <= '0;
      omega <= '0;
      tpoly <= '0;
      s     <= '0;
      delta <= '0;
      L     <= '0;
      k     <= '0;
      j     <= '0;
    end else begin
      done <= 1'b0;
      unique case (state)
        S_IDLE, S_DONE: begin
          state <= S_IDLE;
          if (start) begin
            s        <= {synd, gf_t'(1)};
            sigma    <= '0;
            sigma[0] <= gf_t'(1);
            tpoly    <= '0;
            tpoly[1] <= gf_t'(1);
            L        <= '0;
            k        <= 6'd1;
            state    <= S_DISC;
          end
        end
        S_DISC: begin
          delta <= delta_c;
          state <= S_UPD;
        end
        S_UPD: begin
          sigma <= sigma_n;
          if (grow) L <= k - L;
          tpoly <= {tpoly_n, gf_t'(0)};   // T(x) <- x T(x)
          if (k == 6'(2 * T)) begin
            j     <= '0;
            state <= S_OMEGA;
          end else begin
            k     <= k + 6'd1;
            state <= S_DISC;
          end
        end
        S_OMEGA: begin
          omega[j] <= omega_c;
          if (j == 6'(T)) begin
            done  <= 1'b1;
            state <= S_DONE;
          end else begin
            j <= j + 6'd1;
          end
        end
        default: state <= S_IDLE;
      endcase
    end
  end

endmodule

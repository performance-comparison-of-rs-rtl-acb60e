// rs_decoder: Reed-Solomon RS(255,239) decoder over GF(2^8), t = 8.
//
// A received codeword of N symbols enters one symbol per clock, highest
// degree first (r_{N-1} first). The decoder corrects up to t = (N-K)/2 symbol
// errors and streams out the corrected codeword. It is the classic chain
//   syndrome calculator -> key equation solver (Berlekamp-Massey)
//   -> error locator (Chien search) + error magnitude (Forney)
//   -> error correction (GF adder) fed from a delay-path memory
// that holds the received symbols until the error vector is ready.
//
// Flow of one codeword
//   1. rs_syndrome accumulates S_1..S_2t while rs_codeword_buffer stores the
//      symbols (N clocks).
//   2. When the back end is idle, the syndromes are handed over and the buffer
//      banks swap; the next codeword can then be received at once.
//   3. rs_key_equation runs 2t Berlekamp-Massey iterations and forms Omega
//      (5t+1 clocks).
//   4. rs_chien_search and rs_forney test positions i = 0..N-1, one per clock;
//      the buffer is read at the same position, and rs_error_correction adds
//      the error value and gives the symbol out two clocks later.
// Because the Chien search runs with multipliers alpha^-j, positions come out
// lowest degree first (r_0 first), the reverse of the input order; out_pos
// names the position (coefficient of x^out_pos) of every output symbol.
//
// Input stall: if a whole new codeword has arrived while the back end is still
// busy with the previous one, in_ready drops until the back end is free. The
// back end spends about N + 5t + 3 clocks on a codeword against N clocks of
// reception, so with back-to-back input in_ready is low for roughly 5t clocks
// per codeword and the sustained rate is about one codeword per N + 5t + 3
// clocks. The first corrected symbol of a word that finds the back end idle
// appears 5t + 5 clocks (45) after its last input symbol.
//
// Interface
//   in_valid/in_ready/in_data : received symbols, N per codeword.
//   out_valid, out_pos, out_data : corrected symbols, position out_pos.
//   out_corrected : the symbol was changed by the decoder.
//   out_last      : last symbol of a codeword (out_pos = N-1); with it
//   out_fail      : the word had more than t errors (detected, not corrected;
//                   the symbols given out are then not trustworthy),
//   out_nerr      : number of symbols corrected.
// Reset is synchronous and active low.
// Code size, algorithms and block structure follow the described decoder;
// handshakes, the output order tag, two-bank buffering and failure flag are
// this design's choices.
module rs_decoder
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned K = 239
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        in_valid,
  output logic        in_ready,
  input  gf_t         in_data,
  output logic        out_valid,
  output logic [7:0]  out_pos,
  output gf_t         out_data,
  output logic        out_corrected,
  output logic        out_last,
  output logic        out_fail,
  output logic [7:0]  out_nerr
);

  localparam int unsigned T = (N - K) / 2;

  // syndrome -> key equation
  logic          synd_valid, synd_ready, handoff;
  gf_t [2*T:1]   synd;
  // key equation -> Chien / Forney
  logic          kes_ready, kes_done;
  gf_t [T:0]     sigma, omega;
  logic [5:0]    L;
  // Chien -> Forney / buffer / correction
  logic          cs_busy, cs_valid, cs_root, cs_done;
  logic [7:0]    cs_pos, cs_count;
  gf_t           cs_odd;
  // Forney -> correction
  logic          err_valid;
  logic [7:0]    err_pos;
  gf_t           err_val;
  gf_t           rx_data;

  assign synd_ready = kes_ready && !kes_done && !cs_busy;
  assign handoff    = synd_valid && synd_ready;

  rs_syndrome #(.N(N), .T(T)) u_syndrome (
    .clk, .rst_n,
    .in_valid, .in_ready, .in_data,
    .synd_valid, .synd_ready, .synd
  );

  rs_codeword_buffer #(.N(N)) u_buffer (
    .clk, .rst_n,
    .wr_en   (in_valid && in_ready),
    .wr_data (in_data),
    .swap    (handoff),
    .rd_en   (cs_valid),
    .rd_pos  (cs_pos),
    .rd_data (rx_data)
  );

  rs_key_equation #(.T(T)) u_kes (
    .clk, .rst_n,
    .start (handoff),
    .synd,
    .ready (kes_ready),
    .done  (kes_done),
    .sigma, .omega, .L
  );

  rs_chien_search #(.N(N), .T(T)) u_chien (
    .clk, .rst_n,
    .load       (kes_done),
    .sigma,
    .busy       (cs_busy),
    .valid      (cs_valid),
    .pos        (cs_pos),
    .root       (cs_root),
    .odd_sum    (cs_odd),
    .done       (cs_done),
    .root_count (cs_count)
  );

  rs_forney #(.T(T)) u_forney (
    .clk, .rst_n,
    .load    (kes_done),
    .omega,
    .step    (cs_valid),
    .pos     (cs_pos),
    .root    (cs_root),
    .odd_sum (cs_odd),
    .err_valid, .err_pos, .err_val
  );

  rs_error_correction #(.N(N), .T(T)) u_correct (
    .clk, .rst_n,
    .err_valid, .err_pos, .err_val,
    .rx_data,
    .check_valid (cs_done),
    .root_count  (cs_count),
    .L,
    .out_valid, .out_pos, .out_data, .out_corrected,
    .out_last, .out_fail, .out_nerr
  );

  // Back-end sequencing rules: a block is only started when it is free.
  a_kes_start_idle : assert property (@(posedge clk) disable iff (!rst_n)
                                      handoff |-> kes_ready);
  a_cs_load_idle   : assert property (@(posedge clk) disable iff (!rst_n)
                                      kes_done |-> !cs_busy);

endmodule

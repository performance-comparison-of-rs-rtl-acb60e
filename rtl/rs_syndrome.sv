// rs_syndrome: syndrome calculator, the first stage of the RS decoder.
//
// It evaluates the received polynomial r(x) at the 2t roots of the generator
// polynomial, S_j = r(alpha^j) for j = 1..2t. Each syndrome has its own cell:
// an adder, a register S_j and a constant multiplier by alpha^j in the
// feedback, so that with the symbols arriving highest degree first
// (r_{n-1}, r_{n-2}, ..., r_0) each cell runs Horner's rule
//     S_j <- S_j * alpha^j + r.
// The cell structure follows the described syndrome cell; the handshake, the
// symbol order and the hold-until-taken behaviour are this design's choices.
//
// Interface
//   in_valid/in_ready/in_data : one received symbol per accepted clock; N
//                               symbols form one codeword (no framing signal,
//                               the block counts them). A shorter N gives a
//                               shortened code.
//   synd_valid/synd_ready      : after the N-th symbol the syndromes are held on
//                               synd and synd_valid is high until the consumer
//                               takes them with synd_ready. Meanwhile in_ready
//                               is low: this is the decoder's input stall.
//   synd[j]                    : S_j, j = 1..2T.
// Timing: N accepted symbols, then synd_valid rises on the next clock edge.
// Reset (active-low, synchronous) clears the symbol count and the full flag;
// the first symbol of each codeword loads the cells, so S needs no clearing.
module rs_syndrome
  import rs_pkg::*;
#(
  parameter int unsigned N = 255,
  parameter int unsigned T = 8
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              in_valid,
  output logic              in_ready,
  input  gf_t               in_data,
  output logic              synd_valid,
  input  logic              synd_ready,
  output gf_t [2*T:1]       synd
);

  logic [7:0] cnt;       // symbols received of the current codeword
  logic       full;      // all N symbols in, syndromes waiting to be taken
  logic       accept;

  assign in_ready   = !full;
  assign accept     = in_valid && in_ready;
  assign synd_valid = full;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      cnt  <= '0;
      full <= 1'b0;
    end else begin
      if (accept) begin
        if (cnt == 8'(N - 1)) begin
          cnt  <= '0;
          full <= 1'b1;
        end else begin
          cnt <= cnt + 8'd1;
        end
      end else if (full && synd_ready) begin
        full <= 1'b0;
      end
    end
  end

  for (genvar j = 1; j <= 2 * T; j++) begin : g_cell
    localparam gf_t AJ = gf_alpha(j);
    always_ff @(posedge clk) begin
      if (accept)
        synd[j] <= ((cnt == '0) ? gf_t'(0) : gf_mul(synd[j], AJ)) ^ in_data;
    end
  end

  // Handshake rule: waiting syndromes stay put until taken.
  a_synd_hold : assert property (@(posedge clk) disable iff (!rst_n)
                                 synd_valid && !synd_ready |=> synd_valid && $stable(synd));

endmodule

// rs_codeword_buffer: delay path of the RS decoder.
//
// Holds each received codeword until its error vector has been computed, so
// that the two can be added symbol by symbol. It is a dual-port memory (one
// write port, one read port, same clock) of two banks of 256 symbols with a
// write pointer and bank-select control:
//   - the write side stores the incoming symbols of one codeword in the write
//     bank, in arrival order (r_{N-1} at address 0, r_0 at address N-1);
//   - on swap (one codeword fully received and handed to the back end) the
//     filled bank becomes the read bank and the other bank takes the next
//     codeword, so reception of codeword m+1 overlaps correction of m;
//   - the read side is addressed by codeword position i, the order in which
//     the Chien/Forney blocks produce the error vector. Since that order is
//     the reverse of arrival, position i is read from address N-1-i.
// A memory with read and write pointers is what the delay path is described
// as; the two-bank organisation and the position-addressed read port, which
// absorb the order reversal, are this design's choices.
//
// Interface
//   wr_en, wr_data : write one symbol at the write pointer, which advances and
//                    wraps after N symbols.
//   swap           : exchange the banks (give the pulse after the N-th write).
//   rd_en, rd_pos  : read the symbol of position rd_pos (0..N-1) of the read
//                    bank; rd_data is valid on the next clock (registered).
module rs_codeword_buffer
  import rs_pkg::*;
#(
  parameter int unsigned N = 255
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        wr_en,
  input  gf_t         wr_data,
  input  logic        swap,
  input  logic        rd_en,
  input  logic [7:0]  rd_pos,
  output gf_t         rd_data
);

  gf_t        mem [512];
  logic [7:0] wptr;
  logic       wbank;
  logic       rbank;

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      wptr  <= '0;
      wbank <= 1'b0;
      rbank <= 1'b1;
    end else begin
      if (wr_en) wptr <= (wptr == 8'(N - 1)) ? 8'd0 : wptr + 8'd1;
      if (swap) begin
        wbank <= ~wbank;
        rbank <= wbank;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (wr_en) mem[{wbank, wptr}] <= wr_data;
  end

  always_ff @(posedge clk) begin
    if (rd_en) rd_data <= mem[{rbank, 8'(N - 1) - rd_pos}];
  end

endmodule

// prbs_gen: parallel pseudo-random bit source, PRBS 2^15 - 1.
//
// A 15-bit Fibonacci LFSR with polynomial x^15 + x^14 + 1 (feedback
// s[14] ^ s[13], shifted in at the bottom) is advanced NBITS steps per clock;
// the NBITS new feedback bits form the output word, bits[0] being the first
// in time. The polynomial, the seed and the bit order are this design's
// choice; the document gives only the sequence length. Two instances with the
// same SEED and reset produce the same data in lock step, which is how the
// in-phase and quadrature FPGAs stay synchronised.
//
// Timing: bits is registered. The first word after reset release appears one
// clock after the first clock with rst_n high; a new word follows every clock.
module prbs_gen #(
  parameter int          NBITS = 464,
  parameter logic [14:0] SEED  = 15'h7fff
) (
  input  logic             clk,
  input  logic             rst_n,
  output logic [NBITS-1:0] bits
);

  logic [14:0] state;

  always_ff @(posedge clk) begin
    logic [14:0] s;
    if (!rst_n) begin
      state <= SEED;
      bits  <= '0;
    end else begin
      s = state;
      for (int i = 0; i < NBITS; i++) begin
        bits[i] <= s[14] ^ s[13];
        s = {s[13:0], s[14] ^ s[13]};
      end
      state <= s;
    end
  end

  initial assert (SEED != '0) else $error("prbs_gen: all-zero seed locks the LFSR");

endmodule

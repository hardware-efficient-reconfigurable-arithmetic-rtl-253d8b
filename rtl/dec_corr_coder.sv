// dec_corr_coder: decimal correction coder.
//
// Forms the word that the second carry-propagate adder adds to the binary
// digit sum in BCD mode. Per digit:
//   effective addition, or subtraction with |N1| > |N2| (Co = 1):
//     0110 where the digit produced a decimal carry (DC = 1), else 0000;
//   effective subtraction with |N1| <= |N2| (Co = 0):
//     1100 where DC = 1, else 0110.
// The +6 converts a binary nibble sum into the BCD digit where a decimal
// carry left the digit. In the Co = 0 case the sum is the nine's complement
// of the true difference; a further +6 per digit makes each nibble
// 15 - r, so that the final XOR with SC yields the digit r itself. In
// binary mode the correction is inactive (all zero).
//
// These values are the reference design's; using the effective operation
// (rather than the raw Add input) to choose them is this design's reading.
//
// Interface: dc[DIGITS], bin, eop, co, corr[4*DIGITS]. Combinational.
module dec_corr_coder #(
  parameter int unsigned DIGITS = 7
) (
  input  logic [DIGITS-1:0]   dc,
  input  logic                bin,
  input  logic                eop,
  input  logic                co,
  output logic [4*DIGITS-1:0] corr
);

  import ra_pkg::*;

  logic neg_sub;  // effective subtraction whose result is left complemented
  assign neg_sub = ~eop & ~co;

  always_comb begin
    for (int i = 0; i < DIGITS; i++) begin
      bcd_digit_t c;
      if (bin)               c = 4'b0000;
      else if (neg_sub)      c = dc[i] ? 4'b1100 : 4'b0110;
      else                   c = dc[i] ? 4'b0110 : 4'b0000;
      corr[4*i +: 4] = c;
    end
  end

endmodule

// digitwise6: hard-wired "minus six" on every BCD nibble.
//
// Input is the one's complement of a BCD operand, so each nibble holds
// 15 - d (6..15 for a valid digit d). Subtracting 6 from every nibble with
// no borrow between nibbles gives 9 - d, the nine's complement of the digit.
// No adder is needed: per nibble
//   nd[3] = ~x3 & ~x2 | ~x3 & ~x1 | x3 & x2 & x1
//   nd[2] = x2 ^ x1
//   nd[1] = ~x1
//   nd[0] = x0
// These equations are the reference design's; for the first output the
// three product terms are ORed (for valid input at most one of them is 1).
//
// Interface: x[4*DIGITS], nd[4*DIGITS]. Combinational. Results for nibbles
// below 6 (not the complement of a valid digit) are not meaningful.
module digitwise6 #(
  parameter int unsigned DIGITS = 8
) (
  input  logic [4*DIGITS-1:0] x,
  output logic [4*DIGITS-1:0] nd
);

  import ra_pkg::*;

  always_comb begin
    for (int i = 0; i < DIGITS; i++) begin
      bcd_digit_t d;
      bcd_digit_t r;
      d = x[4*i +: 4];
      r[3] = (~d[3] & ~d[2]) | (~d[3] & ~d[1]) | (d[3] & d[2] & d[1]);
      r[2] = d[2] ^ d[1];
      r[1] = ~d[1];
      r[0] = d[0];
      nd[4*i +: 4] = r;
    end
  end

endmodule

// dc_logic: decimal digit-carry logic.
//
// For two BCD operands a and b (b is N2 on addition or its nine's complement
// on subtraction) and a carry-in, it gives the decimal carry out of every
// digit position of a + b + cin. Each digit has a decimal generate
// (a_i + b_i >= 10) and a decimal propagate (a_i + b_i = 9), and the carries
// follow dc_i = g_i | p_i & dc_{i-1}, dc_{-1} = cin. The correction coder
// turns these carries into the +6 / +12 terms added by the second adder.
//
// The role of the block is the reference design's; its gate-level form is
// this design's own (generate/propagate from the 5-bit digit sum, carries in
// a ripple chain).
//
// Interface: a, b [4*DIGITS] (valid BCD digits), cin, dc[DIGITS].
// Combinational.
module dc_logic #(
  parameter int unsigned DIGITS = 7
) (
  input  logic [4*DIGITS-1:0] a,
  input  logic [4*DIGITS-1:0] b,
  input  logic                cin,
  output logic [DIGITS-1:0]   dc
);

  always_comb begin
    logic       c;
    logic [4:0] s;
    logic       g;
    logic       p;
    c = cin;
    for (int i = 0; i < DIGITS; i++) begin
      s = {1'b0, a[4*i +: 4]} + {1'b0, b[4*i +: 4]};
      g = (s >= 5'd10);
      p = (s == 5'd9);
      c = g | (p & c);
      dc[i] = c;
    end
  end

endmodule

// eop_logic: effective-operation logic.
//
// Decides whether the magnitudes of two sign-magnitude operands are to be
// added or subtracted: EOp = N1s xor N2s xor Add. EOp = 1 means effective
// addition (|N1| + |N2|), EOp = 0 effective subtraction (|N1| - |N2|). With
// Add = 1 for a requested addition this gives the eight cases of the
// reference truth table (e.g. +a - (-b) is an effective addition).
//
// Interface: add (1 = add, 0 = subtract), n1s and n2s (operand signs),
// eop_out. Purely combinational, no clock. The port names follow the
// reference block; the gate-level form is the printed equation.
module eop_logic (
  input  logic add,
  input  logic n1s,
  input  logic n2s,
  output logic eop_out
);

  assign eop_out = n1s ^ n2s ^ add;

endmodule

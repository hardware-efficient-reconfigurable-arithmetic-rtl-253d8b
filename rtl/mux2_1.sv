// mux2_1: two-input word multiplexer.
//
// mux_out = mux_in1 when mux_select = 0, mux_in2 when mux_select = 1.
// In the adder it appears as MUX1 (one's or nine's complement of the
// subtrahend, selected by DSS), MUX2 (operand of the digit-carry logic,
// selected by DSS) and MUX4 (binary or decimal-corrected sum, selected by
// Bin). Port names follow the reference block; the select polarity is this
// design's choice. Combinational.
module mux2_1 #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] mux_in1,
  input  logic [WIDTH-1:0] mux_in2,
  input  logic             mux_select,
  output logic [WIDTH-1:0] mux_out
);

  assign mux_out = mux_select ? mux_in2 : mux_in1;

endmodule

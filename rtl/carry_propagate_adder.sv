// carry_propagate_adder: word adder with carry-in and carry-out.
//
// {cp_out, cp_sum} = cp_in1 + cp_in2 + cp_in3. The adder is written as a
// plain addition so that synthesis maps it onto the target's fast carry
// logic. The adder is used twice: the first forms the binary sum (or, in
// BCD mode, the uncorrected digit sum), the second adds the decimal
// correction word. Port names and the 32-bit default follow the reference
// block. Combinational.
module carry_propagate_adder #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] cp_in1,
  input  logic [WIDTH-1:0] cp_in2,
  input  logic             cp_in3,
  output logic [WIDTH-1:0] cp_sum,
  output logic             cp_out
);

  assign {cp_out, cp_sum} = {1'b0, cp_in1} + {1'b0, cp_in2} + {{WIDTH{1'b0}}, cp_in3};

endmodule

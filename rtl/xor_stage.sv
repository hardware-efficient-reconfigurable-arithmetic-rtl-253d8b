// xor_stage: conditional one's complement of a word.
//
// Every bit of data_in is XORed with the single control bit, so the word
// passes unchanged when ctrl = 0 and is inverted when ctrl = 1. The adder
// uses it twice: in front of the first carry-propagate adder to form the
// one's complement of the subtrahend on effective subtraction, and at the
// output to undo a one's-complement result (the sum-correction XOR).
//
// Interface: data_in[WIDTH], ctrl, data_out[WIDTH]. Combinational.
module xor_stage #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-1:0] data_in,
  input  logic             ctrl,
  output logic [WIDTH-1:0] data_out
);

  assign data_out = data_in ^ {WIDTH{ctrl}};

endmodule

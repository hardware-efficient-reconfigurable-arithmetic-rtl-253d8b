// dss_logic: decimal-subtraction select.
//
// DSS = not EOp and not Bin. It is 1 only for an effective subtraction in
// BCD mode, where the nine's complement of the subtrahend (the output of the
// digitwise-6 logic) must be chosen in place of the plain one's complement.
//
// Interface: dss_in1 = EOp, dss_in2 = Bin, dss_out = DSS. Combinational.
// The equation follows the reference design; which input carries EOp and
// which Bin is this design's choice.
module dss_logic (
  input  logic dss_in1,
  input  logic dss_in2,
  output logic dss_out
);

  assign dss_out = ~dss_in1 & ~dss_in2;

endmodule

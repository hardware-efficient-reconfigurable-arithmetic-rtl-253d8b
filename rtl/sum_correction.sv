// sum_correction: final sign-magnitude correction.
//
// On an effective subtraction with |N1| <= |N2| (Co = 0) the adders leave
// the magnitude in one's complement form (binary) or as 15 - r per digit
// (BCD). SC = not Co and not EOp flags that case; the magnitude is then
// XORed with SC and the sign becomes N1s xor SC.
//
// The reference text writes SC = Co . EOp with EOp = 1 meaning effective
// addition; the inversion is needed only on effective subtraction without
// a carry-in, so this design uses SC = ~Co & ~EOp. The sign rule is the
// reference design's: equal magnitudes give a zero whose sign is the
// inverse of N1's.
//
// Interface: sigma[WIDTH-1] (uncorrected magnitude), n1s, eop, co,
// sc, result[WIDTH] = {sign, magnitude}. Combinational.
module sum_correction #(
  parameter int unsigned WIDTH = 32
) (
  input  logic [WIDTH-2:0] sigma,
  input  logic             n1s,
  input  logic             eop,
  input  logic             co,
  output logic             sc,
  output logic [WIDTH-1:0] result
);

  logic [WIDTH-2:0] mag;

  assign sc = ~co & ~eop;

  xor_stage #(.WIDTH(WIDTH-1)) u_xor (
    .data_in (sigma),
    .ctrl    (sc),
    .data_out(mag)
  );

  assign result = {n1s ^ sc, mag};

endmodule

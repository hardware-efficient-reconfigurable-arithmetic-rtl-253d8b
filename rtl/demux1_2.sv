// demux1_2: one-bit 1:2 demultiplexer.
//
// Routes demux_in to demux_out1 when demux_select = 0 and to demux_out2 when
// demux_select = 1; the other output is held at 0. In the adder it steers
// the subtraction carry-in (Co and not EOp) into the first carry-propagate
// adder in binary mode and into the second, correcting adder in BCD mode.
// Port names follow the reference block; select polarity and the 0 on the
// idle output are this design's choice. Combinational.
module demux1_2 (
  input  logic demux_in,
  input  logic demux_select,
  output logic demux_out1,
  output logic demux_out2
);

  assign demux_out1 = demux_in & ~demux_select;
  assign demux_out2 = demux_in &  demux_select;

endmodule

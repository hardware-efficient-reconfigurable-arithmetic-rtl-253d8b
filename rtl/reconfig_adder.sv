// reconfig_adder: reconfigurable binary / BCD sign-magnitude adder-subtractor.
//
// One datapath adds or subtracts two sign-magnitude numbers, either as
// binary integers (bin = 1) or as 8421 BCD decimal numbers (bin = 0), and
// returns a sign-magnitude result. The requested operation is first reduced
// to an effective addition or subtraction of the magnitudes (EOp), so the
// adders only ever see |N1| + |N2| or |N1| - |N2|; a parallel magnitude
// comparison (Co) decides whether the difference is formed in two's
// complement (|N1| > |N2|, Co used as carry-in) or left in one's complement
// and inverted at the end (SC), which also flips the sign. No result ever
// needs a second complementing addition.
//
// Subunits, in data-flow order:
//   1  EOp logic, operand XOR (one's complement on effective subtraction),
//      digitwise-6 (nine's complement per BCD digit), MUX1 under DSS
//   2  decimal digit-carry logic (DC) fed through MUX2, correction coder
//   3  carry-propagate adder 1: |N1| + operand (+ carry-in in binary mode)
//   4  carry-propagate adder 2: adds the decimal correction (+ carry-in in
//      BCD mode); bypassed by MUX4 in binary mode
//   5  sum correction: XOR with SC, sign = N1s ^ SC
//   6  Co logic and the carry-in gate Co & ~EOp, steered by DMUX1 under Bin,
//      running in parallel with subunits 1-4
//
// Word format: n[N_BITS-1] is the sign, n[N_BITS-2:0] the magnitude. In BCD
// mode the magnitude holds DIGITS = (N_BITS-1)/4 whole digits in the low
// bits; the spare high magnitude bits are ignored on input and read as zero
// on output. ovf reports a carry out of the magnitude on effective addition
// (the magnitude wraps); effective subtraction cannot overflow. add = 1
// requests N1 + N2, add = 0 requests N1 - N2.
//
// The block structure, EOp, DSS, digitwise-6, the correction values and the
// sign rule follow the reference design; the BCD digit packing, the ovf
// flag, the mux select polarities and SC = ~Co & ~EOp (see sum_correction)
// are this design's choices. The unit is purely combinational: no stage
// registers are defined for it, so a result is valid in the same cycle.
//
// Two internal signals are left unread on purpose: the carry out of adder 2
// (it also sees the spare high magnitude bits, so the top digit carry is
// used for ovf instead) and the SC bit, which acts only inside
// sum_correction.
module reconfig_adder #(
  parameter int unsigned N_BITS = ra_pkg::N_BITS_DEFAULT
) (
  input  logic [N_BITS-1:0] n1,
  input  logic [N_BITS-1:0] n2,
  input  logic              add,
  input  logic              bin,
  output logic [N_BITS-1:0] sum,
  output logic              ovf
);

  localparam int unsigned MW     = N_BITS - 1;              // magnitude bits
  localparam int unsigned DIGITS = ra_pkg::bcd_digits(N_BITS);
  localparam int unsigned DW     = 4 * DIGITS;              // BCD bits used

  // ---- operand magnitudes, spare bits cleared in BCD mode ---------------
  logic [MW-1:0] mag_mask;
  logic [MW-1:0] m1, m2;

  always_comb begin
    mag_mask = '1;
    if (!bin) mag_mask = MW'({DW{1'b1}});
  end

  assign m1 = n1[MW-1:0] & mag_mask;
  assign m2 = n2[MW-1:0] & mag_mask;

  // ---- subunit 1: effective operation, operand complement, MUX1 ---------
  logic          eop, dss;
  logic [MW-1:0] x2;       // N2 or its one's complement
  logic [DW-1:0] nine2;    // nine's complement of the BCD digits of N2
  logic [MW-1:0] opnd;     // second input of adder 1

  eop_logic u_eop (
    .add    (add),
    .n1s    (n1[N_BITS-1]),
    .n2s    (n2[N_BITS-1]),
    .eop_out(eop)
  );

  dss_logic u_dss (
    .dss_in1(eop),
    .dss_in2(bin),
    .dss_out(dss)
  );

  xor_stage #(.WIDTH(MW)) u_xor_in (
    .data_in (m2),
    .ctrl    (~eop),
    .data_out(x2)
  );

  digitwise6 #(.DIGITS(DIGITS)) u_dw6 (
    .x (x2[DW-1:0]),
    .nd(nine2)
  );

  mux2_1 #(.WIDTH(MW)) u_mux1 (
    .mux_in1   (x2),
    .mux_in2   (MW'(nine2)),
    .mux_select(dss),
    .mux_out   (opnd)
  );

  // ---- subunit 6: Co logic and carry-in steering ------------------------
  logic co, cin, cin1, cin2;

  co_logic #(.WIDTH(MW)) u_co (
    .n1  (m1),
    .n2_n(~m2),
    .co  (co)
  );

  assign cin = co & ~eop;

  demux1_2 u_dmux1 (
    .demux_in    (cin),
    .demux_select(bin),
    .demux_out1  (cin2),
    .demux_out2  (cin1)
  );

  // ---- subunit 2: digit carries and decimal correction ------------------
  logic [DW-1:0]     n2_star;
  logic [DIGITS-1:0] dc;
  logic [DW-1:0]     corr;

  mux2_1 #(.WIDTH(DW)) u_mux2 (
    .mux_in1   (m2[DW-1:0]),
    .mux_in2   (nine2),
    .mux_select(dss),
    .mux_out   (n2_star)
  );

  dc_logic #(.DIGITS(DIGITS)) u_dc (
    .a  (m1[DW-1:0]),
    .b  (n2_star),
    .cin(cin),
    .dc (dc)
  );

  dec_corr_coder #(.DIGITS(DIGITS)) u_coder (
    .dc  (dc),
    .bin (bin),
    .eop (eop),
    .co  (co),
    .corr(corr)
  );

  // ---- subunits 3 and 4: the two carry-propagate adders -----------------
  logic [MW-1:0] s1, s2, sigma;
  logic          cout1, cout2;

  carry_propagate_adder #(.WIDTH(MW)) u_cpa1 (
    .cp_in1(m1),
    .cp_in2(opnd),
    .cp_in3(cin1),
    .cp_sum(s1),
    .cp_out(cout1)
  );

  carry_propagate_adder #(.WIDTH(MW)) u_cpa2 (
    .cp_in1(s1),
    .cp_in2(MW'(corr)),
    .cp_in3(cin2),
    .cp_sum(s2),
    .cp_out(cout2)
  );

  mux2_1 #(.WIDTH(MW)) u_mux4 (
    .mux_in1   (s2),
    .mux_in2   (s1),
    .mux_select(bin),
    .mux_out   (sigma)
  );

  // ---- subunit 5: sum correction ----------------------------------------
  logic              sc;
  logic [N_BITS-1:0] corrected;

  sum_correction #(.WIDTH(N_BITS)) u_sc (
    .sigma (sigma),
    .n1s   (n1[N_BITS-1]),
    .eop   (eop),
    .co    (co),
    .sc    (sc),
    .result(corrected)
  );

  assign sum = {corrected[N_BITS-1], corrected[MW-1:0] & mag_mask};

  // In BCD mode the decimal carry out of the top digit is the magnitude
  // carry; cout2 also sees the spare high bits, so it is not used.
  assign ovf = eop & (bin ? cout1 : dc[DIGITS-1]);

endmodule

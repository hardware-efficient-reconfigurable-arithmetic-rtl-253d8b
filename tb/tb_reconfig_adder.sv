// tb_reconfig_adder: end-to-end test of the binary / BCD sign-magnitude
// adder-subtractor at its default 32-bit size.
//
// Operands are random and directed sign-magnitude words in both modes. The
// reference works on integers: the BCD magnitudes are converted to decimal
// values, the signed operation is done on them, and the result is converted
// back. Expected behaviour: effective addition keeps N1's sign and wraps the
// magnitude (ovf = carry out); effective subtraction gives |N1| - |N2| with
// N1's sign when |N1| > |N2|, otherwise |N2| - |N1| with the inverted sign
// (so equal magnitudes give a zero of inverted sign).
//
// Every mechanism of the datapath is counted and must occur: effective
// addition and the three subtraction cases in each mode, the decimal +6
// correction, the +12 correction, overflow in each mode, and a switch of
// mode between consecutive operations. Results must be valid in the same
// cycle the operands are applied (the unit is combinational).
module tb_reconfig_adder;
  localparam int unsigned N      = 32;
  localparam int unsigned MW     = N - 1;
  localparam int unsigned DIGITS = (N - 1) / 4;

  logic clk = 1'b0;
  int   checks = 0, failures = 0;

  logic [N-1:0] n1, n2, sum;
  logic         add, bin, ovf;

  reconfig_adder dut (.n1(n1), .n2(n2), .add(add), .bin(bin), .sum(sum), .ovf(ovf));

  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // mechanism counters
  int n_bin_add, n_bin_sub_gt, n_bin_sub_lt, n_bin_sub_eq, n_bin_ovf;
  int n_dec_add, n_dec_sub_gt, n_dec_sub_lt, n_dec_sub_eq, n_dec_ovf;
  int n_corr6, n_corr12, n_mode_switch;
  logic last_bin = 1'b1;

  function automatic longint unsigned bcd_to_int(input logic [N-1:0] w);
    longint unsigned v = 0;
    for (int i = DIGITS - 1; i >= 0; i--) v = v * 10 + longint'(w[4*i +: 4]);
    return v;
  endfunction

  function automatic logic [N-1:0] int_to_bcd(input longint unsigned v);
    logic [N-1:0] w = '0;
    for (int i = 0; i < DIGITS; i++) begin
      w[4*i +: 4] = 4'(v % 10);
      v = v / 10;
    end
    return w;
  endfunction

  function automatic logic [N-1:0] rand_bcd();
    logic [N-1:0] w = '0;
    int nd = $urandom_range(1, DIGITS);
    for (int i = 0; i < nd; i++) w[4*i +: 4] = 4'($urandom_range(0, 9));
    return w;
  endfunction

  task automatic apply(input logic s1, input logic [N-1:0] m1,
                       input logic s2, input logic [N-1:0] m2,
                       input logic t_add, input logic t_bin);
    longint unsigned a, b, r, modulus;
    logic            exp_sign, exp_ovf, eff_add;
    logic [N-1:0]    exp_sum;

    n1 = {s1, m1[MW-1:0]};
    n2 = {s2, m2[MW-1:0]};
    add = t_add;
    bin = t_bin;

    if (t_bin) begin
      a = longint'(m1[MW-1:0]); b = longint'(m2[MW-1:0]); modulus = 64'd1 << MW;
    end else begin
      a = bcd_to_int(m1); b = bcd_to_int(m2); modulus = 1;
      for (int i = 0; i < DIGITS; i++) modulus = modulus * 10;
    end

    // requested operation on signed values, reduced to magnitudes
    eff_add = (s1 == (s2 ^ !t_add));
    exp_ovf = 1'b0;
    if (eff_add) begin
      r = a + b;
      exp_ovf = (r >= modulus);
      r = r % modulus;
      exp_sign = s1;
    end else if (a > b) begin
      r = a - b; exp_sign = s1;
    end else begin
      r = b - a; exp_sign = ~s1;
    end
    exp_sum = t_bin ? {exp_sign, MW'(r)} : {exp_sign, int_to_bcd(r)[MW-1:0]};

    #1;  // same cycle: combinational result
    checks++;
    if (sum !== exp_sum || ovf !== exp_ovf) begin
      failures++;
      $display("FAIL bin=%b add=%b n1=%h n2=%h sum=%h ovf=%b expected %h %b",
               t_bin, t_add, n1, n2, sum, ovf, exp_sum, exp_ovf);
    end

    // mechanism coverage
    if (t_bin != last_bin) n_mode_switch++;
    last_bin = t_bin;
    if (t_bin) begin
      if (eff_add)     n_bin_add++;
      else if (a > b)  n_bin_sub_gt++;
      else if (a < b)  n_bin_sub_lt++;
      else             n_bin_sub_eq++;
      if (exp_ovf)     n_bin_ovf++;
    end else begin
      if (eff_add)     n_dec_add++;
      else if (a > b)  n_dec_sub_gt++;
      else if (a < b)  n_dec_sub_lt++;
      else             n_dec_sub_eq++;
      if (exp_ovf)     n_dec_ovf++;
      if (dut.corr != '0 && (eff_add || a > b)) n_corr6++;
      for (int i = 0; i < DIGITS; i++)
        if (dut.corr[4*i +: 4] == 4'd12) begin n_corr12++; break; end
    end
    @(posedge clk);
  endtask

  task automatic need(input string what, input int count);
    checks++;
    $display("mechanism %-28s %0d", what, count);
    if (count == 0) begin
      failures++;
      $display("FAIL mechanism never exercised: %s", what);
    end
  endtask

  initial begin
    logic [N-1:0] r1, r2;
    logic         r_bin;
    n1 = '0; n2 = '0; add = 1'b1; bin = 1'b1;
    @(posedge clk);

    // directed binary cases
    apply(0, 32'd100, 0, 32'd25, 1, 1);               // +100 + +25
    apply(0, 32'd100, 0, 32'd25, 0, 1);               // +100 - +25
    apply(0, 32'd25,  0, 32'd100, 0, 1);              // +25 - +100 = -75
    apply(1, 32'd25,  1, 32'd25, 0, 1);               // -25 - -25
    apply(0, 32'h7fff_ffff, 0, 32'd1, 1, 1);          // overflow
    // directed BCD cases
    apply(0, 32'h0000_0958, 0, 32'h0000_0067, 1, 0);  // 958 + 67 = 1025
    apply(0, 32'h0000_0958, 0, 32'h0000_0067, 0, 0);  // 958 - 67 = 891
    apply(0, 32'h0000_0067, 0, 32'h0000_0958, 0, 0);  // 67 - 958 = -891
    apply(1, 32'h0000_1234, 0, 32'h0000_1234, 1, 0);  // -1234 + 1234
    apply(0, 32'h0999_9999, 0, 32'h0000_0001, 1, 0);  // decimal overflow
    apply(0, 32'h0000_0000, 1, 32'h0000_0000, 0, 0);  // 0 - -0

    // random, both modes interleaved
    for (int i = 0; i < 4000; i++) begin
      r_bin = 1'($urandom_range(0, 1));
      if (r_bin) begin
        r1 = $urandom; r2 = $urandom;
        if (i % 7 == 0) r2 = r1;
        if (i % 11 == 0) r2 = r1 ^ (32'd1 << $urandom_range(0, MW - 1));
      end else begin
        r1 = rand_bcd(); r2 = rand_bcd();
        if (i % 7 == 0) r2 = r1;
      end
      apply(1'($urandom_range(0, 1)), r1, 1'($urandom_range(0, 1)), r2,
            1'($urandom_range(0, 1)), r_bin);
    end

    need("binary effective addition", n_bin_add);
    need("binary subtraction |N1|>|N2|", n_bin_sub_gt);
    need("binary subtraction |N1|<|N2|", n_bin_sub_lt);
    need("binary subtraction |N1|=|N2|", n_bin_sub_eq);
    need("binary overflow", n_bin_ovf);
    need("BCD effective addition", n_dec_add);
    need("BCD subtraction |N1|>|N2|", n_dec_sub_gt);
    need("BCD subtraction |N1|<|N2|", n_dec_sub_lt);
    need("BCD subtraction |N1|=|N2|", n_dec_sub_eq);
    need("BCD overflow", n_dec_ovf);
    need("decimal +6 correction", n_corr6);
    need("decimal +12 correction", n_corr12);
    need("binary/BCD mode switch", n_mode_switch);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

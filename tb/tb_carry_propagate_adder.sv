// tb_carry_propagate_adder: random and corner operands (all ones, carry-in
// rippling through the whole word), compared with a 64-bit reference sum.
module tb_carry_propagate_adder;
  localparam int unsigned W = 32;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [W-1:0] a, b, s;
  logic         ci, co;

  carry_propagate_adder #(.WIDTH(W)) dut (
    .cp_in1(a), .cp_in2(b), .cp_in3(ci), .cp_sum(s), .cp_out(co));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_, input logic tc);
    longint unsigned ref_sum;
    a = ta; b = tb_; ci = tc;
    ref_sum = longint'(ta) + longint'(tb_) + longint'(tc);
    @(posedge clk); #1;
    checks++;
    if (s !== ref_sum[W-1:0] || co !== ref_sum[W]) begin
      failures++;
      $display("FAIL %h + %h + %b = %b_%h expected %h", ta, tb_, tc, co, s, ref_sum);
    end
  endtask

  initial begin
    apply('1, '0, 1'b1);
    apply('1, '1, 1'b1);
    apply('0, '0, 1'b0);
    apply(32'h7fff_ffff, 32'h0000_0001, 1'b0);
    for (int i = 0; i < 300; i++) apply($urandom, $urandom, 1'($urandom_range(0, 1)));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

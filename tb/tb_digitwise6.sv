// tb_digitwise6: every nibble of the input is the one's complement of a
// random BCD digit d; every output nibble must be the nine's complement
// 9 - d. All ten digits are also walked through every nibble position.
module tb_digitwise6;
  localparam int unsigned D = 8;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [4*D-1:0] x, nd, expected;

  digitwise6 #(.DIGITS(D)) dut (.x(x), .nd(nd));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [4*D-1:0] digits);
    for (int i = 0; i < D; i++) begin
      x[4*i +: 4]        = 4'd15 - digits[4*i +: 4];
      expected[4*i +: 4] = 4'd9  - digits[4*i +: 4];
    end
    @(posedge clk); #1;
    checks++;
    if (nd !== expected) begin
      failures++;
      $display("FAIL digits=%h nd=%h expected=%h", digits, nd, expected);
    end
  endtask

  initial begin
    logic [4*D-1:0] digits;
    for (int v = 0; v < 10; v++) begin
      for (int i = 0; i < D; i++) digits[4*i +: 4] = 4'((v + i) % 10);
      apply(digits);
    end
    for (int n = 0; n < 200; n++) begin
      for (int i = 0; i < D; i++) digits[4*i +: 4] = 4'($urandom_range(0, 9));
      apply(digits);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

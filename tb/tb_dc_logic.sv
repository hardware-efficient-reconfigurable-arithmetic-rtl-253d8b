// tb_dc_logic: random valid BCD operands and carry-in; the expected digit
// carries come from adding the two numbers digit by digit in decimal
// (carry out when the digit total reaches 10). Long carry chains
// (digit sums of 9 everywhere) are forced regularly.
module tb_dc_logic;
  localparam int unsigned D = 7;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [4*D-1:0] a, b;
  logic           cin;
  logic [D-1:0]   dc;

  dc_logic #(.DIGITS(D)) dut (.a(a), .b(b), .cin(cin), .dc(dc));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [D-1:0] expected;
    int           c, t, da, db;
    for (int n = 0; n < 400; n++) begin
      cin = 1'($urandom_range(0, 1));
      for (int i = 0; i < D; i++) begin
        da = $urandom_range(0, 9);
        db = (n % 4 == 0) ? 9 - da : $urandom_range(0, 9);
        a[4*i +: 4] = 4'(da);
        b[4*i +: 4] = 4'(db);
      end
      c = int'(cin);
      for (int i = 0; i < D; i++) begin
        t = int'(a[4*i +: 4]) + int'(b[4*i +: 4]) + c;
        c = (t >= 10) ? 1 : 0;
        expected[i] = 1'(c);
      end
      @(posedge clk); #1;
      checks++;
      if (dc !== expected) begin
        failures++;
        $display("FAIL a=%h b=%h cin=%b dc=%b expected %b", a, b, cin, dc, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dec_corr_coder: random digit-carry patterns under every combination
// of Bin, EOp and Co. Expected per digit: 0 in binary mode; on addition or
// subtraction with Co = 1, 6 where a carry left the digit; on subtraction
// with Co = 0, 12 where a carry left and 6 elsewhere.
module tb_dec_corr_coder;
  localparam int unsigned D = 7;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [D-1:0]   dc;
  logic           bin, eop, co;
  logic [4*D-1:0] corr;

  dec_corr_coder #(.DIGITS(D)) dut (.dc(dc), .bin(bin), .eop(eop), .co(co), .corr(corr));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [4*D-1:0] expected;
    for (int n = 0; n < 256; n++) begin
      {bin, eop, co} = 3'(n % 8);
      dc = D'($urandom);
      for (int i = 0; i < D; i++) begin
        case ({bin, eop, co})
          3'b000:  expected[4*i +: 4] = dc[i] ? 4'd12 : 4'd6;   // sub, |N1| <= |N2|
          3'b001:  expected[4*i +: 4] = dc[i] ? 4'd6  : 4'd0;   // sub, |N1| >  |N2|
          3'b010,
          3'b011:  expected[4*i +: 4] = dc[i] ? 4'd6  : 4'd0;   // addition
          default: expected[4*i +: 4] = 4'd0;                   // binary mode
        endcase
      end
      @(posedge clk); #1;
      checks++;
      if (corr !== expected) begin
        failures++;
        $display("FAIL bin=%b eop=%b co=%b dc=%b corr=%h expected %h", bin, eop, co, dc, corr, expected);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

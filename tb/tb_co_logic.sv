// tb_co_logic: Co must be 1 exactly when |N1| > |N2|. Operands are random,
// equal, differ in one random bit, or sit at the ends of the range; the
// reference is a plain magnitude comparison.
module tb_co_logic;
  localparam int unsigned W = 31;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [W-1:0] a, b;
  logic         co;

  co_logic #(.WIDTH(W)) dut (.n1(a), .n2_n(~b), .co(co));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic apply(input logic [W-1:0] ta, input logic [W-1:0] tb_);
    a = ta; b = tb_;
    @(posedge clk); #1;
    checks++;
    if (co !== (ta > tb_)) begin
      failures++;
      $display("FAIL a=%h b=%h co=%b", ta, tb_, co);
    end
  endtask

  initial begin
    logic [W-1:0] r;
    apply('0, '0);
    apply('1, '1);
    apply('1, '0);
    apply('0, '1);
    apply(W'(1), '0);
    apply('0, W'(1));
    for (int i = 0; i < 300; i++) begin
      r = W'($urandom);
      case (i % 3)
        0: apply(r, W'($urandom));
        1: apply(r, r);
        default: apply(r, r ^ (W'(1) << $urandom_range(0, W - 1)));
      endcase
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

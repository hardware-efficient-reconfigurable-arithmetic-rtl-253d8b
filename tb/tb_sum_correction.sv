// tb_sum_correction: random magnitudes under all combinations of N1s, EOp
// and Co. Only effective subtraction without carry-in (EOp = 0, Co = 0)
// inverts the magnitude and flips the sign of N1.
module tb_sum_correction;
  localparam int unsigned W = 32;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [W-2:0] sigma;
  logic         n1s, eop, co, sc;
  logic [W-1:0] result;

  sum_correction #(.WIDTH(W)) dut (
    .sigma(sigma), .n1s(n1s), .eop(eop), .co(co), .sc(sc), .result(result));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [W-1:0] expected;
    logic         exp_sc;
    for (int n = 0; n < 200; n++) begin
      {n1s, eop, co} = 3'(n % 8);
      sigma = (W-1)'($urandom);
      exp_sc = (eop == 1'b0 && co == 1'b0);
      expected = exp_sc ? {~n1s, ~sigma} : {n1s, sigma};
      @(posedge clk); #1;
      checks++;
      if (result !== expected || sc !== exp_sc) begin
        failures++;
        $display("FAIL n1s=%b eop=%b co=%b sigma=%h result=%h sc=%b", n1s, eop, co, sigma, result, sc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

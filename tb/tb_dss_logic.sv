// tb_dss_logic: checks the decimal-subtraction select over all four input
// combinations: only EOp = 0 (subtraction) with Bin = 0 (BCD) selects.
module tb_dss_logic;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic eop, bin, dss;

  dss_logic dut (.dss_in1(eop), .dss_in2(bin), .dss_out(dss));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic expected;
    for (int r = 0; r < 4; r++) begin
      eop = r[1]; bin = r[0];
      expected = (r == 0);
      @(posedge clk); #1;
      checks++;
      if (dss !== expected) begin
        failures++;
        $display("FAIL eop=%b bin=%b dss=%b", eop, bin, dss);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_eop_logic: checks the effective-operation logic against the full
// eight-row truth table (operand signs x requested operation), written out
// row by row as expected values rather than recomputed with XOR.
module tb_eop_logic;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic add, n1s, n2s, eop;

  eop_logic dut (.add(add), .n1s(n1s), .n2s(n2s), .eop_out(eop));

  always #5 clk = ~clk;

  // watchdog
  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // {n1s, n2s, op} -> effective addition?  (op = 1 means subtract)
  logic table_eop [8] = '{1'b1, 1'b0, 1'b0, 1'b1, 1'b0, 1'b1, 1'b1, 1'b0};

  initial begin
    for (int r = 0; r < 8; r++) begin
      n1s = r[2]; n2s = r[1]; add = ~r[0];
      @(posedge clk); #1;
      checks++;
      if (eop !== table_eop[r]) begin
        failures++;
        $display("FAIL n1s=%b n2s=%b op=%b eop=%b expected %b", n1s, n2s, r[0], eop, table_eop[r]);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_mux2_1: random inputs with both select values; the output must equal
// the input named by the select (0 -> mux_in1, 1 -> mux_in2).
module tb_mux2_1;
  localparam int unsigned W = 32;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [W-1:0] a, b, y;
  logic         sel;

  mux2_1 #(.WIDTH(W)) dut (.mux_in1(a), .mux_in2(b), .mux_select(sel), .mux_out(y));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      a = $urandom; b = $urandom; sel = $urandom_range(0, 1);
      @(posedge clk); #1;
      checks++;
      if (y !== (sel ? b : a)) begin
        failures++;
        $display("FAIL sel=%b a=%h b=%h y=%h", sel, a, b, y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

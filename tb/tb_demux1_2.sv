// tb_demux1_2: all four input/select combinations; the selected output
// carries the input, the other stays 0.
module tb_demux1_2;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic din, sel, o1, o2;

  demux1_2 dut (.demux_in(din), .demux_select(sel), .demux_out1(o1), .demux_out2(o2));

  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int r = 0; r < 8; r++) begin
      din = r[0]; sel = r[1];
      @(posedge clk); #1;
      checks++;
      if (o1 !== (sel ? 1'b0 : din) || o2 !== (sel ? din : 1'b0)) begin
        failures++;
        $display("FAIL in=%b sel=%b out1=%b out2=%b", din, sel, o1, o2);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

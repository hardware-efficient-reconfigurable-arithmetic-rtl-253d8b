// tb_xor_stage: random words through the conditional inverter, both control
// values; the expected value is formed with the bitwise NOT operator.
module tb_xor_stage;
  localparam int unsigned W = 32;
  logic clk = 1'b0;
  int   checks = 0, failures = 0;
  logic [W-1:0] din, dout;
  logic         ctrl;

  xor_stage #(.WIDTH(W)) dut (.data_in(din), .ctrl(ctrl), .data_out(dout));

  always #5 clk = ~clk;

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      din  = $urandom;
      ctrl = i[0];
      @(posedge clk); #1;
      checks++;
      if (dout !== (ctrl ? ~din : din)) begin
        failures++;
        $display("FAIL din=%h ctrl=%b dout=%h", din, ctrl, dout);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

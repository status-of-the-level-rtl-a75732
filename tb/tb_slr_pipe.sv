// tb_slr_pipe: checks that a three-stage and a zero-stage crossing delay a
// random data stream by exactly three and zero cycles.
module tb_slr_pipe;
  logic clk = 0;
  logic [27:0] d = '0, q3, q0;
  logic [27:0] hist [4];
  int checks = 0, failures = 0;

  slr_pipe #(.WIDTH(28), .STAGES(3)) dut3 (.clk, .d, .q(q3));
  slr_pipe #(.WIDTH(28), .STAGES(0)) dut0 (.clk, .d, .q(q0));
  always #5 clk = ~clk;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int i = 0; i < 200; i++) begin
      @(negedge clk);
      d = 28'($urandom);
      hist[3] = hist[2]; hist[2] = hist[1]; hist[1] = hist[0]; hist[0] = d;
      #1;
      checks++; if (q0 != d) failures++;
      if (i >= 3) begin
        checks++;
        if (q3 != hist[3]) begin failures++; $display("FAIL %0d: %h exp %h", i, q3, hist[3]); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_frame_splitter: loads random 224-bit uplink frames once per 8 cycles and
// checks that the eight 28-bit frames come out in order, one per cycle,
// starting one cycle after the load.
module tb_frame_splitter;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [223:0] in_data = '0;
  logic out_valid;
  logic [27:0] out_frame;
  int checks = 0, failures = 0;

  frame_splitter dut (.*);
  always #1 clk = ~clk;

  initial begin
    #20000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [223:0] f;
    repeat (3) @(posedge clk);
    rst <= 0;
    @(negedge clk);
    checks++; if (out_valid) failures++;
    for (int n = 0; n < 50; n++) begin
      for (int w = 0; w < 7; w++) f[w*32 +: 32] = $urandom;
      in_valid = 1; in_data = f;
      @(negedge clk);
      in_valid = 0;
      for (int k = 0; k < 8; k++) begin
        checks++;
        if (!out_valid || out_frame != f[k*28 +: 28]) begin
          failures++;
          $display("FAIL frame %0d word %0d: %h exp %h", n, k, out_frame, f[k*28 +: 28]);
        end
        if (k < 7) @(negedge clk);
      end
    end
    @(negedge clk);
    checks++; if (out_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bc_timing: checks the BC strobe period (8 cycles), the BCID sequence
// and its wrap after 3564 BCs, and the restart on a bunch-counter reset.
module tb_bc_timing;
  import sl_pkg::*;
  logic clk = 0, rst = 1, bcr = 0;
  logic [2:0] phase;
  logic bc_strobe;
  logic [BCID_W-1:0] bcid;
  int checks = 0, failures = 0;

  bc_timing dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  initial begin
    #200000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int exp_bc, cyc;
    repeat (3) @(posedge clk);
    rst <= 0;
    exp_bc = 0;
    cyc = 0;
    // two full orbits plus a bit
    for (int i = 0; i < 8 * 3564 + 100; i++) begin
      @(negedge clk);
      chk(phase == 3'(cyc % 8), "phase");
      chk(bc_strobe == (cyc % 8 == 7), "strobe");
      chk(bcid == 12'(exp_bc), $sformatf("bcid %0d exp %0d", bcid, exp_bc));
      cyc++;
      if (cyc % 8 == 0) exp_bc = (exp_bc + 1) % 3564;
    end
    // bunch counter reset in the middle of a BC
    @(negedge clk); bcr = 1;
    @(negedge clk); bcr = 0;
    chk(phase == 0 && bcid == 0, "after bcr");
    repeat (8) @(negedge clk);
    chk(bcid == 1 && phase == 0, "one BC after bcr");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

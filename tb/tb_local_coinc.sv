// tb_local_coinc: random layer patterns through a 1-of-2 (doublet) and a
// 2-of-3 (triplet) majority, compared with a count made in the testbench.
module tb_local_coinc;
  logic [1:0][95:0] l2;
  logic [2:0][47:0] l3;
  logic [95:0] h2;
  logic [47:0] h3;
  int checks = 0, failures = 0;

  local_coinc #(.NL(2), .N(96), .MIN(1)) dut2 (.layers(l2), .hits(h2));
  local_coinc #(.NL(3), .N(48), .MIN(2)) dut3 (.layers(l3), .hits(h3));

  initial begin
    for (int n = 0; n < 300; n++) begin
      for (int i = 0; i < 96; i++) begin
        l2[0][i] = ($urandom % 4) == 0;
        l2[1][i] = ($urandom % 4) == 0;
      end
      for (int l = 0; l < 3; l++)
        for (int i = 0; i < 48; i++) l3[l][i] = ($urandom % 2) == 0;
      #1;
      for (int i = 0; i < 96; i++) begin
        checks++;
        if (h2[i] != (l2[0][i] | l2[1][i])) failures++;
      end
      for (int i = 0; i < 48; i++) begin
        int c;
        c = int'(l3[0][i]) + int'(l3[1][i]) + int'(l3[2][i]);
        checks++;
        if (h3[i] != (c >= 2)) begin failures++; $display("FAIL strip %0d", i); end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

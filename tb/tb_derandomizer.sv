// tb_derandomizer: sends random DCT hits whose BCs lie 5..21 BCs in the past
// (out of order, across the orbit wrap), plus some 25 BCs old.  A reference
// map per BC, built in the testbench, must equal the hit map and first-hit
// times released at the end of each BC for the BC 21 BCs back; too-old hits
// must only increment late_cnt.
module tb_derandomizer;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  logic bc_strobe = 0;
  logic [BCID_W-1:0] bcid = 12'd3540;
  dct_frame_t frame = '0;
  logic out_valid;
  logic [BCID_W-1:0] out_bcid;
  logic [287:0] out_hits;
  logic [287:0][7:0] out_time;
  logic [15:0] late_cnt;
  int checks = 0, failures = 0;
  int n_late = 0;

  logic [287:0]      ref_hits [int];
  logic [287:0][7:0] ref_time [int];

  derandomizer #(.STORE_TIME(1'b1)) dut (.*);
  always #1 clk = ~clk;

  function automatic int bsub(input int now, input int age);
    return (now - age + 3564) % 3564;
  endfunction

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int released;
    repeat (3) @(negedge clk);
    rst = 0;
    for (int bc = 0; bc < 120; bc++) begin
      for (int ph = 0; ph < 8; ph++) begin
        int age, ch, b;
        bc_strobe = (ph == 7);
        frame = '0;
        if (($urandom % 4) != 0 && bc < 100) begin
          age = (($urandom % 16) == 0) ? 25 : 5 + int'($urandom % 17);
          ch  = $urandom % 288;
          b   = bsub(int'(bcid), age);
          frame.hit = 1; frame.bcid = 10'(b); frame.chan = 9'(ch); frame.ftime = 8'($urandom);
          if (age <= 21) begin
            if (!ref_hits.exists(b)) begin ref_hits[b] = '0; ref_time[b] = '0; end
            if (!ref_hits[b][ch]) ref_time[b][ch] = frame.ftime;
            ref_hits[b][ch] = 1;
          end else n_late++;
        end
        @(negedge clk);
        if (ph == 7) begin
          released = bsub(int'(bcid), 21);
          checks++;
          if (!out_valid || out_bcid != 12'(released)) begin
            failures++; $display("FAIL release valid/bcid %0d exp %0d", out_bcid, released);
          end
          if (ref_hits.exists(released)) begin
            checks++;
            if (out_hits != ref_hits[released]) begin
              failures++; $display("FAIL hits of BC %0d", released);
            end
            for (int c = 0; c < 288; c++) if (ref_hits[released][c]) begin
              checks++;
              if (out_time[c] != ref_time[released][c]) begin
                failures++; $display("FAIL time BC %0d ch %0d", released, c);
              end
            end
          end else begin
            checks++;
            if (out_hits != '0) begin failures++; $display("FAIL empty BC %0d", released); end
          end
          bcid = (bcid == 12'd3563) ? '0 : bcid + 1'b1;
        end else begin
          checks++;
          if (out_valid) failures++;
        end
      end
    end
    checks++;
    if (int'(late_cnt) != n_late) begin failures++; $display("FAIL late %0d exp %0d", late_cnt, n_late); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

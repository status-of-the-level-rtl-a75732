// tb_mdt_confirm: stores candidates for a few BCs, then answers as the MDT-TP:
// an accepted candidate must reach the MUCTPI with the refined pT one cycle
// later, a rejected one must not, and replies with a wrong BCID or for an
// empty slot are counted as unmatched.
module tb_mdt_confirm;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  logic cand_valid = 0;
  logic [BCID_W-1:0] cand_bcid = '0;
  cand_t [3:0] cand = '0;
  logic to_mdt_valid;
  cand_t [3:0] to_mdt;
  mdt_reply_t reply = '0;
  logic muctpi_valid;
  cand_t muctpi;
  logic [15:0] accept_cnt, reject_cnt, nomatch_cnt;
  int checks = 0, failures = 0;

  mdt_confirm dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic send_reply(input int bc, input int idx, input bit acc, input int pt);
    @(negedge clk);
    reply = '{valid: 1'b1, bcid: 12'(bc), idx: 2'(idx), accept: acc, pt: 8'(pt)};
    @(negedge clk);
    reply = '0;
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // BCs 10..12 with 1..3 candidates
    for (int b = 10; b < 13; b++) begin
      @(negedge clk);
      cand_valid = 1; cand_bcid = 12'(b); cand = '0;
      for (int i = 0; i <= b - 10; i++) begin
        cand[i].valid = 1; cand[i].bcid = 12'(b); cand[i].idx = 2'(i);
        cand[i].eta = 8'(b + i); cand[i].pt = 8'd9;
      end
      @(negedge clk);
      cand_valid = 0;
      chk(to_mdt_valid && to_mdt[0].eta == 8'(b), "forwarded to MDT-TP");
    end
    // accept BC 12 slot 2 with refined pT 33
    send_reply(12, 2, 1, 33);
    chk(muctpi_valid && muctpi.eta == 14 && muctpi.pt == 33 && muctpi.mdt_ok, "accepted to MUCTPI");
    // reject BC 11 slot 0
    send_reply(11, 0, 0, 0);
    chk(!muctpi_valid, "rejected not sent");
    // unmatched: wrong BCID tag (same slot, other orbit position) and empty slot
    send_reply(12 + 512, 0, 1, 1);
    chk(!muctpi_valid, "wrong bcid");
    send_reply(10, 3, 1, 1);
    chk(!muctpi_valid, "empty slot");
    send_reply(10, 0, 1, 7);
    chk(muctpi_valid && muctpi.eta == 10 && muctpi.pt == 7, "accept BC 10");
    chk(accept_cnt == 2 && reject_cnt == 1 && nomatch_cnt == 2, "counters");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

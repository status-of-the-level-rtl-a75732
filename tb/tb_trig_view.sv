// tb_trig_view: directed muon patterns on a 48-bin grid with windows
// {3,2,1,0}: a straight 4-station track, each 3-of-4 combination, a 2-of-4
// pattern that must not fire, the BI-BO coincidence, a bent track whose
// threshold and charge follow from its bend, and a two-strip cluster that
// must give one candidate.
module tb_trig_view;
  logic [47:0] bi, bm1, bm2, bo;
  logic [47:0] cand, bibo, charge;
  logic [47:0][2:0] thr;
  logic [47:0][3:0] st;
  int checks = 0, failures = 0;

  trig_view #(.N(48), .NTHR(4), .WIN('{3, 2, 1, 0})) dut (.*);

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic put(input int b_bi, input int b_bm1, input int b_bm2, input int b_bo);
    bi = '0; bm1 = '0; bm2 = '0; bo = '0;
    if (b_bi  >= 0) bi[b_bi]   = 1;
    if (b_bm1 >= 0) bm1[b_bm1] = 1;
    if (b_bm2 >= 0) bm2[b_bm2] = 1;
    if (b_bo  >= 0) bo[b_bo]   = 1;
    #1;
  endtask

  initial begin
    // straight track, all stations
    put(20, 20, 20, 20);
    chk(cand == (48'd1 << 20), "straight cand");
    chk(thr[20] == 3, "straight thr");
    chk(st[20] == 4'b1111, "straight stations");
    chk(!bibo[20], "straight not bibo");
    // 3-of-4 with BM2
    put(-1, 10, 10, 10);  chk(cand == (48'd1 << 10), "no BI");
    put(10, -1, 10, 10);  chk(cand == (48'd1 << 10), "no BM1");
    put(10, 10, 10, -1);  chk(cand == (48'd1 << 10), "no BO");
    // 3-of-4 without BM2: BO pivot
    put(30, 30, -1, 30);  chk(cand == (48'd1 << 30), "no BM2");
    chk(!bibo[30], "BI+BM1+BO is not bibo");
    // 2 of 4 in the middle: nothing
    put(-1, 5, 5, -1);    chk(cand == '0, "BM1+BM2 only");
    put(5, -1, 5, -1);    chk(cand == '0, "BI+BM2 only");
    // BI-BO coincidence
    put(40, -1, -1, 41);  chk(cand == (48'd1 << 41) && bibo[41], "BI-BO");
    // bent track: BM1, BM2 at 20, BO at 22 -> window 2 -> thr 1, charge 1
    put(-1, 20, 20, 22);  chk(cand[20] && thr[20] == 1 && charge[20], "bent +");
    // bend the other way, BO too far for windows 1 and 0: BI+BM1 still give thr 3
    put(20, 20, 20, 17);  chk(cand[20] && thr[20] == 3 && !charge[20], "bent -");
    // out of every window: only two stations near -> nothing
    put(20, -1, 20, 27);  chk(cand == '0, "too bent");
    // cluster of two pivot strips gives one candidate at the first
    bi = '0; bm1 = '0; bm2 = '0; bo = '0;
    bm2[12] = 1; bm2[13] = 1; bm1[12] = 1; bo[13] = 1; #1;
    chk(cand == (48'd1 << 12), "cluster");
    // edge bin 0
    put(0, 0, 0, 0); chk(cand == 48'd1 && thr[0] == 3, "edge 0");
    put(47, 47, 47, 47); chk(cand == (48'd1 << 47), "edge 47");
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

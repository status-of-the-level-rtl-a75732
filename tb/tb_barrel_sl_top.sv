// tb_barrel_sl_top: end-to-end test of the Sector Logic at its default size
// (50 DCT links, two half-sector triggers, 50 readout memories).
//
// DCT hits are packed into 224-bit lpGBT user frames, eight 28-bit frames per
// BC per link, and arrive 5..20 BCs after their BC in random order.
//   BC 40  muon in the SLR0 half crossing all four stations;
//   BC 45  muon in the SLR2 half seen by BI and BO only (acceptance hole);
//   BC 50  18 hits on one DCT: readout overflow, 16 words kept;
//   a hit 25 BCs late: dropped by trigger and readout.
// The MDT-TP accepts the first candidate and rejects the second.  L0-Accepts
// for BCs 40, 45 and 50 must give FELIX events equal to the ones rebuilt in
// the testbench from the frames sent, with the output ready randomly low; an
// L0-Accept for BC 40 after more than 400 BCs must find its data deleted.
// Each mechanism is counted and must occur at least once.
module tb_barrel_sl_top;
  import sl_pkg::*;
  logic clk = 0, rst = 1, ttc_bcr = 0;
  logic [49:0] uplink_valid = '0;
  logic [49:0][UPLINK_USER_W-1:0] uplink_data = '0;
  logic [1:0][7:0] tile_flags = '0;
  mdt_reply_t [1:0] mdt_reply = '0;
  logic [1:0] to_mdt_valid;
  cand_t [1:0][3:0] to_mdt;
  logic [1:0] muctpi_valid;
  cand_t [1:0] muctpi;
  logic l0a_valid = 0;
  logic [BCID_W-1:0] l0a_bcid = '0;
  logic fx_valid, fx_last, fx_ready = 1;
  logic [31:0] fx_data;
  logic bc_strobe;
  logic [BCID_W-1:0] bcid;
  logic [1:0][15:0] trig_late_cnt;
  logic [15:0] ro_drop_cnt, l0a_drop_cnt, event_cnt;
  int checks = 0, failures = 0;

  barrel_sl_top dut (.*);
  always #5 clk = ~clk;

  typedef struct { int dct; int ch; int t; int bc; int arrive; } hit_t;
  hit_t pend [$];
  dct_frame_t sent [int][50][$];     // frames per BC and DCT in arrival order
  cand_t got [$];
  logic [31:0] fx_words [$];
  int n_outoforder = 0, n_cand = 0, n_bibo = 0, n_acc = 0, n_rej = 0, n_stall = 0;
  int n_ovf = 0, n_events = 0, n_deleted = 0, n_late = 0;
  int cyc = 0, t_release = -1, t_cand = -1;
  int last_arrive [50];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic add(input int dct, input int ch, input int t, input int bc, input int lat);
    hit_t h;
    h.dct = dct; h.ch = ch; h.t = t; h.bc = bc;
    h.arrive = bc + ((lat > 0) ? lat : 5 + int'($urandom % 16));
    pend.push_back(h);
  endtask
  task automatic bmbo_muon(input int first_dct, input int es, input int ps, input int bc);
    int d, s;
    d = first_dct + es / 96; s = es % 96;
    add(d, s, 40, bc, 0); add(d, 144 + s, 40, bc, 0);
    add(d, 96 + ps, 40, bc, 0); add(d, 144 + 96 + ps, 40, bc, 0);
  endtask
  task automatic bi_muon(input int first_dct, input int es, input int dt, input int bc);
    int d, s;
    d = first_dct + es / 48; s = es % 48;
    for (int l = 0; l < 3; l++) begin
      add(d, l*96 + s, 100 + dt, bc, 0);
      add(d, l*96 + 48 + s, 100, bc, 0);
    end
  endtask

  // expected FELIX event of BC b (empty when deleted)
  task automatic expect_event(input int b, input int evno, input bit deleted, ref logic [31:0] q [$]);
    int nw;
    nw = 1;
    q.push_back({4'hE, 4'h0, 12'(evno), 12'(b)});
    if (!deleted && sent.exists(b)) for (int d = 0; d < 50; d++) if (sent[b][d].size() != 0) begin
      int n;
      n = (sent[b][d].size() > 16) ? 16 : sent[b][d].size();
      q.push_back({4'hD, 6'(d), sent[b][d].size() > 16, 5'(n), 16'h0});
      nw++;
      for (int w = 0; w < n; w++) begin
        q.push_back({4'h0, sent[b][d][w]});
        nw++;
      end
    end
    q.push_back({4'hF, 8'h0, 20'(nw + 1)});
  endtask

  always @(posedge clk) begin
    cyc <= cyc + 1;
    fx_ready <= ($urandom % 3) != 0;
    if (fx_valid && !fx_ready) n_stall++;
    if (fx_valid && fx_ready) fx_words.push_back(fx_data);
    for (int s = 0; s < 2; s++) if (to_mdt_valid[s]) begin
      if (t_cand < 0) t_cand = cyc;
      for (int i = 0; i < 4; i++) if (to_mdt[s][i].valid) got.push_back(to_mdt[s][i]);
    end
    for (int s = 0; s < 2; s++) if (muctpi_valid[s]) n_acc++;
  end

  initial begin
    #20000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    logic [31:0] exp_q [$];
    for (int d = 0; d < 50; d++) last_arrive[d] = 0;
    // SLR0 half: BM1 DCTs 0..6, BM2 7..13, BO 14..19, BI 20..24
    bmbo_muon(0, 280, 24, 40); bmbo_muon(7, 280, 24, 40); bmbo_muon(14, 240, 24, 40);
    bi_muon(20, 100, 0, 40);
    // SLR2 half: BO DCTs 44..49, BI 25..29 - BI-BO only
    bmbo_muon(44, 360, 10, 45);
    bi_muon(25, 150, -43, 45);      // BI phi bin 7, BO phi strip 10
    // single-station noise on a BM1 DCT: reordered by the derandomizer, no trigger
    for (int i = 0; i < 40; i++) add(5, 96 * 0 + (i % 90), 0, 10 + i / 2, 0);
    // overflow: 18 hits of BC 50 on DCT 33
    for (int i = 0; i < 18; i++) add(33, 200 + i, i, 50, 6 + i / 8);
    // a hit 25 BCs late on DCT 2
    add(2, 5, 0, 52, 25);
    n_late = 1;

    repeat (3) @(negedge clk);
    rst = 0;
    for (int n = 0; n < 520; n++) begin
      // wait for the first cycle of a BC
      do @(negedge clk); while (!bc_strobe);
      @(negedge clk);
      // pack the frames that arrive in this BC
      uplink_valid = '1;
      uplink_data = '0;
      for (int d = 0; d < 50; d++) begin
        int k;
        k = 0;
        for (int i = 0; i < pend.size() && k < 8; i++) if (pend[i].dct == d && pend[i].arrive <= int'(bcid)) begin
          dct_frame_t f;
          f.hit = 1; f.bcid = 10'(pend[i].bc); f.chan = 9'(pend[i].ch); f.ftime = 8'(pend[i].t);
          uplink_data[d][k*28 +: 28] = f;
          if (pend[i].bc < last_arrive[d]) n_outoforder++;
          last_arrive[d] = pend[i].bc;
          if (int'(bcid) - pend[i].bc <= 20) sent[pend[i].bc][d].push_back(f);
          pend.delete(i);
          i--;
          k++;
        end
      end
      tile_flags = (int'(bcid) == 40 + 21 || int'(bcid) == 40 + 22) ? 16'h0008 : '0;
      if (int'(bcid) == 40 + 21) t_release = cyc + 6;   // strobe of BC 61 is 7 cycles on
      // MDT-TP replies once the candidates are out
      if (int'(bcid) == 70) begin
        mdt_reply[0] = '{valid: 1'b1, bcid: 12'd40, idx: 2'd0, accept: 1'b1, pt: 8'd50};
        mdt_reply[1] = '{valid: 1'b1, bcid: 12'd45, idx: 2'd0, accept: 1'b0, pt: 8'd0};
        n_rej++;
      end
      // L0-Accepts
      if (int'(bcid) == 80)  begin l0a_valid = 1; l0a_bcid = 12'd40; expect_event(40, 0, 0, exp_q); end
      if (int'(bcid) == 90)  begin l0a_valid = 1; l0a_bcid = 12'd45; expect_event(45, 1, 0, exp_q); end
      if (int'(bcid) == 100) begin l0a_valid = 1; l0a_bcid = 12'd50; expect_event(50, 2, 0, exp_q); end
      if (int'(bcid) == 445) begin l0a_valid = 1; l0a_bcid = 12'd40; expect_event(40, 3, 1, exp_q); n_deleted++; end
      @(negedge clk);
      uplink_valid = '0;
      l0a_valid = 0;
      mdt_reply = '0;
    end
    repeat (200) @(negedge clk);

    // trigger results
    chk(pend.size() == 0, "all hits sent");
    chk(got.size() == 2, $sformatf("two candidates, got %0d", got.size()));
    if (got.size() == 2) begin
      n_cand++;
      chk(got[0].side == 0 && got[0].bcid == 40 && got[0].eta == 20 && got[0].phi == 24
          && got[0].thr == 3 && got[0].eta_st == 4'b1111 && got[0].tile, "candidate of BC 40");
      chk(got[1].side == 1 && got[1].bcid == 45 && got[1].eta == 30 && got[1].bibo, "BI-BO candidate of BC 45");
      if (got[1].bibo) n_bibo++;
    end
    chk(t_cand - t_release >= 0 && t_cand - t_release <= 124,
        $sformatf("candidate %0d cycles after release, limit 124 (390 ns)", t_cand - t_release));
    chk(n_acc == 1, "one candidate confirmed to the MUCTPI");
    chk(trig_late_cnt[0] == 1 && ro_drop_cnt >= 3, "late hit and overflow drops counted");
    // readout results
    if (sent.exists(50) && sent[50][33].size() > 16) n_ovf++;
    chk(event_cnt == 4 && l0a_drop_cnt == 0, "four events");
    n_events = int'(event_cnt);
    chk(fx_words.size() == exp_q.size(), $sformatf("FELIX words %0d exp %0d", fx_words.size(), exp_q.size()));
    for (int i = 0; i < exp_q.size() && i < fx_words.size(); i++)
      chk(fx_words[i] == exp_q[i], $sformatf("FELIX word %0d: %h exp %h", i, fx_words[i], exp_q[i]));
    // every mechanism happened
    chk(n_outoforder > 0, "hits out of BC order");
    chk(n_late > 0, "late hit");
    chk(n_cand > 0, "3-of-4 candidate");
    chk(n_bibo > 0, "BI-BO candidate");
    chk(n_acc > 0 && n_rej > 0, "MDT-TP accept and reject");
    chk(n_ovf > 0, "readout overflow");
    chk(n_events > 0, "L0-Accept events");
    chk(n_deleted > 0, "deleted data");
    chk(n_stall > 0, "FELIX back-pressure");
    $display("mechanisms: out-of-order %0d late %0d cand %0d bibo %0d accept %0d reject %0d overflow %0d events %0d deleted %0d stalls %0d",
             n_outoforder, n_late, n_cand, n_bibo, n_acc, n_rej, n_ovf, n_events, n_deleted, n_stall);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_half_sector_trigger: full trigger chain of one half sector at its default
// size (20 BM/BO DCTs, 5 BI DCTs).  DCT hit frames of two muons are sent with
// random 5..20 BC latencies:
//   BC 40: a muon crossing all four stations at eta bin 20, phi bin 24
//          (BI phi from equal end times), Tile flag set in its region;
//   BC 45: a muon seen only in BI and BO at eta bin 30, phi bin 10 (BI-BO
//          coincidence of the acceptance holes).
// The candidates must reach the MDT-TP output 4 cycles after the BC is
// released (well inside 390 ns = 124 cycles), with the expected fields, and
// an accepted MDT-TP reply must send the candidate on to the MUCTPI.
module tb_half_sector_trigger;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  logic bc_strobe = 0;
  logic [BCID_W-1:0] bcid = '0;
  dct_frame_t [19:0] bmbo_frames = '0;
  dct_frame_t [4:0]  bi_frames = '0;
  logic [7:0] tile = '0;
  logic to_mdt_valid;
  cand_t [3:0] to_mdt;
  mdt_reply_t reply = '0;
  logic muctpi_valid;
  cand_t muctpi;
  logic [15:0] late_cnt;
  int checks = 0, failures = 0;

  half_sector_trigger dut (.*);
  always #5 clk = ~clk;

  typedef struct { int bi; int dct; int ch; int t; int bc; int arrive; } hit_t;
  hit_t hits [$];

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic add(input int bi, input int dct, input int ch, input int t, input int bc);
    hit_t h;
    h.bi = bi; h.dct = dct; h.ch = ch; h.t = t; h.bc = bc;
    h.arrive = bc + 5 + int'($urandom % 16);
    hits.push_back(h);
  endtask

  // muon on BM/BO: eta strip es of the station, phi strip ps; both layers
  task automatic bmbo_muon(input int first_dct, input int es, input int ps, input int bc);
    int d, s;
    d = first_dct + es / 96; s = es % 96;
    add(0, d, s, 40, bc); add(0, d, 144 + s, 40, bc);
    add(0, d, 96 + ps, 40, bc); add(0, d, 144 + 96 + ps, 40, bc);
  endtask
  // muon on BI: eta strip es, both ends of all three layers, end A later by dt
  task automatic bi_muon(input int es, input int dt, input int bc);
    int d, s;
    d = es / 48; s = es % 48;
    for (int l = 0; l < 3; l++) begin
      add(1, d, l*96 + s, 100 + dt, bc);
      add(1, d, l*96 + 48 + s, 100, bc);
    end
  endtask

  int t_release = -1, t_cand = -1, n_cand = 0, cyc = 0;
  cand_t got [$];

  initial begin
    #3000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  always @(posedge clk) begin
    cyc <= cyc + 1;
    if (to_mdt_valid) begin
      for (int i = 0; i < 4; i++) if (to_mdt[i].valid) got.push_back(to_mdt[i]);
      if (t_cand < 0) t_cand = cyc;
    end
  end

  initial begin
    // muon 1: eta bin 20 -> BM strip 280, BO strip 240, BI strip 100; phi 24
    bmbo_muon(0, 280, 24, 40);  bmbo_muon(7, 280, 24, 40);  bmbo_muon(14, 240, 24, 40);
    bi_muon(100, 0, 40);
    // muon 2: eta bin 30 -> BO strip 360, BI strip 150; phi 10
    bmbo_muon(14, 360, 10, 45);
    bi_muon(150, -43, 45);     // (-43 + 64) * 48 / 128 = 7.875 -> bin 7 in BI
    repeat (3) @(negedge clk);
    rst = 0;
    for (int bc = 0; bc < 80; bc++) begin
      tile = (bc == 40 + 22) ? 8'b0000_1000 : '0;   // eta bin 20 -> region 3
      for (int ph = 0; ph < 8; ph++) begin
        bc_strobe = (ph == 7);
        bmbo_frames = '0; bi_frames = '0;
        for (int i = 0; i < hits.size(); i++) begin
          if (hits[i].arrive <= bc &&
              (hits[i].bi ? !bi_frames[hits[i].dct].hit : !bmbo_frames[hits[i].dct].hit)) begin
            dct_frame_t f;
            f.hit = 1; f.bcid = 10'(hits[i].bc); f.chan = 9'(hits[i].ch); f.ftime = 8'(hits[i].t);
            if (hits[i].bi) bi_frames[hits[i].dct] = f; else bmbo_frames[hits[i].dct] = f;
            hits.delete(i);
            i--;
          end
        end
        if (ph == 7 && bc == 40 + 21) t_release = cyc;
        @(negedge clk);
        if (ph == 7) bcid++;
      end
    end
    chk(hits.size() == 0, "all hits sent");
    chk(late_cnt == 0, "no late hits");
    chk(got.size() == 2, $sformatf("two candidates, got %0d", got.size()));
    chk(t_cand - t_release == 4, $sformatf("latency %0d cycles", t_cand - t_release));
    chk(t_cand - t_release <= 124, "within 390 ns");
    if (got.size() == 2) begin
      chk(got[0].bcid == 40 && got[0].eta == 20 && got[0].phi == 24, "muon 1 position");
      chk(got[0].thr == 3 && got[0].eta_st == 4'b1111 && got[0].phi_st == 4'b1111, "muon 1 stations");
      chk(got[0].tile && !got[0].bibo, "muon 1 tile, not bibo");
      chk(got[1].bcid == 45 && got[1].eta == 30, "muon 2 position");
      chk(got[1].bibo && got[1].eta_st == 4'b1001, "muon 2 BI-BO");
      // MDT-TP confirms muon 1
      @(negedge clk);
      reply = '{valid: 1'b1, bcid: 12'd40, idx: 2'd0, accept: 1'b1, pt: 8'd77};
      @(negedge clk);
      reply = '0;
      chk(muctpi_valid && muctpi.eta == 20 && muctpi.pt == 77 && muctpi.mdt_ok, "MUCTPI output");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_trigger_logic: drives station maps for one BC at a time and checks the
// 128-bit candidates: eta-phi AND (an eta track alone gives nothing), the
// fields of a single candidate, the limit of four candidates per BC with
// lowest eta first, the threshold as the lower of the two views, the Tile
// flag of the candidate's region and the two-cycle latency.
module tb_trigger_logic;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  logic in_valid = 0;
  logic [BCID_W-1:0] in_bcid = '0;
  logic [3:0][47:0] eta_st = '0, phi_st = '0;
  logic [7:0] tile = '0;
  logic out_valid;
  logic [BCID_W-1:0] out_bcid;
  cand_t [3:0] out_cand;
  int checks = 0, failures = 0;

  trigger_logic #(.SIDE(1'b1)) dut (.*);
  always #1 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  task automatic eta_track(input int b, input int bo_b);
    eta_st[0][b] = 1; eta_st[1][b] = 1; eta_st[2][b] = 1; eta_st[3][bo_b] = 1;
  endtask
  task automatic phi_track(input int b);
    for (int s = 0; s < 4; s++) phi_st[s][b] = 1;
  endtask

  // present one BC, wait for the result (exactly 2 cycles later)
  task automatic run_bc(input int bc);
    @(negedge clk);
    in_valid = 1; in_bcid = 12'(bc);
    @(negedge clk);
    in_valid = 0; eta_st = '0; phi_st = '0;
    chk(!out_valid, "no output after 1 cycle");
    @(negedge clk);
    chk(out_valid && out_bcid == 12'(bc), "output after 2 cycles");
  endtask

  initial begin
    repeat (3) @(posedge clk);
    rst = 0;
    // eta only: AND gives nothing
    eta_track(10, 10);
    run_bc(100);
    chk(out_cand[0].valid == 0, "eta without phi");
    // one muon
    eta_st[0][29] = 1; eta_st[1][30] = 1; eta_st[2][30] = 1; eta_st[3][31] = 1;
    phi_track(7); tile = 8'b0010_0000;   // region 30*8/48 = 5
    run_bc(101);
    chk(out_cand[0].valid && !out_cand[1].valid, "one candidate");
    chk(out_cand[0].eta == 30 && out_cand[0].phi == 7, "coordinates");
    chk(out_cand[0].thr == 2 && out_cand[0].pt == 1, "threshold from eta (window 1)");
    chk(out_cand[0].charge == 1, "charge");
    chk(out_cand[0].tile == 1 && out_cand[0].side == 1, "tile flag, side");
    chk(out_cand[0].bcid == 101 && out_cand[0].eta_st == 4'b1111, "bcid, stations");
    // five muons in eta: only the four lowest are kept
    tile = '0;
    eta_track(40, 40); eta_track(5, 5); eta_track(20, 20); eta_track(15, 15); eta_track(45, 45);
    phi_st[0][3] = 1; phi_st[2][3] = 1; phi_st[3][5] = 1;   // phi: BO 2 bins off -> thr 1
    run_bc(102);
    chk(out_cand[0].eta == 5 && out_cand[1].eta == 15 && out_cand[2].eta == 20
        && out_cand[3].eta == 40, "four lowest");
    for (int i = 0; i < 4; i++) begin
      chk(out_cand[i].valid && out_cand[i].idx == 2'(i), "slot index");
      chk(out_cand[i].thr == 1, "threshold is the lower of eta and phi");
    end
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

// trigger_logic: L0 barrel muon trigger of one half sector.
//
// Once per BC it receives the station hit maps (BI, BM1, BM2, BO) on the eta
// and the phi grids.  Two trig_view instances find the 3-out-of-4 (and BI-BO)
// coincidences independently in eta and in phi.  The eta and phi results are
// then ANDed: a BC gives candidates only if both views have at least one.
// Up to NCAND = 4 eta candidates (lowest eta bins first) are each paired with
// the best phi candidate (highest threshold, then lowest bin); the candidate
// threshold is the lower of the two views' thresholds.  Each candidate is
// packed into a 128-bit cand_t frame with eta and phi bins, pT code, charge,
// highest threshold, station patterns and the Tile energy flag of its eta
// region (tile region = eta * NTILE / NETA).
//
// Timing: two register stages.  in_valid -> out_valid is 2 cycles.
// The 3-of-4 requirement per view, the eta-phi AND, four candidates per BC
// and the 128-bit frame follow the system description; the pairing rule,
// field layout, pT code (half-width of the narrowest window passed, lower
// means higher pT) and the use of the Tile flag as a field are this design's
// choices.
module trigger_logic
  import sl_pkg::*;
#(
  parameter int unsigned NETA  = 48,
  parameter int unsigned NPHI  = 48,
  parameter int unsigned NTHR  = 4,
  parameter int unsigned WIN [NTHR] = '{3, 2, 1, 0},
  parameter int unsigned NCAND = 4,
  parameter int unsigned NTILE = 8,
  parameter bit          SIDE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              in_valid,
  input  logic [BCID_W-1:0] in_bcid,
  input  logic [3:0][NETA-1:0] eta_st,   // [0]=BI [1]=BM1 [2]=BM2 [3]=BO
  input  logic [3:0][NPHI-1:0] phi_st,
  input  logic [NTILE-1:0]  tile,
  output logic              out_valid,
  output logic [BCID_W-1:0] out_bcid,
  output cand_t [NCAND-1:0] out_cand
);
  logic [NETA-1:0]      e_c, e_bibo, e_q;
  logic [NETA-1:0][2:0] e_t;
  logic [NETA-1:0][3:0] e_s;
  logic [NPHI-1:0]      p_c, p_bibo, p_q;
  logic [NPHI-1:0][2:0] p_t;
  logic [NPHI-1:0][3:0] p_s;

  trig_view #(.N(NETA), .NTHR(NTHR), .WIN(WIN)) u_eta (
    .bi(eta_st[0]), .bm1(eta_st[1]), .bm2(eta_st[2]), .bo(eta_st[3]),
    .cand(e_c), .thr(e_t), .st(e_s), .bibo(e_bibo), .charge(e_q));
  trig_view #(.N(NPHI), .NTHR(NTHR), .WIN(WIN)) u_phi (
    .bi(phi_st[0]), .bm1(phi_st[1]), .bm2(phi_st[2]), .bo(phi_st[3]),
    .cand(p_c), .thr(p_t), .st(p_s), .bibo(p_bibo), .charge(p_q));

  // stage 1: register the per-bin view results
  logic                 s1_valid;
  logic [BCID_W-1:0]    s1_bcid;
  logic [NTILE-1:0]     s1_tile;
  logic [NETA-1:0]      r_e_c, r_e_bibo, r_e_q;
  logic [NETA-1:0][2:0] r_e_t;
  logic [NETA-1:0][3:0] r_e_s;
  logic [NPHI-1:0]      r_p_c;
  logic [NPHI-1:0][2:0] r_p_t;
  logic [NPHI-1:0][3:0] r_p_s;

  always_ff @(posedge clk) begin
    if (rst) s1_valid <= 1'b0;
    else     s1_valid <= in_valid;
    s1_bcid  <= in_bcid;
    s1_tile  <= tile;
    r_e_c    <= in_valid ? e_c : '0;
    r_e_bibo <= e_bibo;
    r_e_q    <= e_q;
    r_e_t    <= e_t;
    r_e_s    <= e_s;
    r_p_c    <= in_valid ? p_c : '0;
    r_p_t    <= p_t;
    r_p_s    <= p_s;
  end

  // stage 2: eta-phi AND and selection of up to NCAND candidates
  cand_t [NCAND-1:0] sel;
  always_comb begin
    int   n, best;
    logic have_phi;
    have_phi = 1'b0;
    best = 0;
    for (int p = 0; p < int'(NPHI); p++)
      if (r_p_c[p] && (!have_phi || r_p_t[p] > r_p_t[best])) begin
        have_phi = 1'b1;
        best = p;
      end
    sel = '0;
    n = 0;
    for (int e = 0; e < int'(NETA); e++) begin
      if (have_phi && r_e_c[e] && n < int'(NCAND)) begin
        sel[n].valid  = 1'b1;
        sel[n].bcid   = s1_bcid;
        sel[n].side   = SIDE;
        sel[n].idx    = 2'(n);
        sel[n].eta    = 8'(e);
        sel[n].phi    = 8'(best);
        sel[n].thr    = (r_e_t[e] < r_p_t[best]) ? r_e_t[e] : r_p_t[best];
        sel[n].pt     = 8'(WIN[int'(sel[n].thr)]);
        sel[n].charge = r_e_q[e];
        sel[n].eta_st = r_e_s[e];
        sel[n].phi_st = r_p_s[best];
        sel[n].bibo   = r_e_bibo[e];
        sel[n].tile   = s1_tile[(e * int'(NTILE)) / int'(NETA)];
        n++;
      end
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      out_valid <= 1'b0;
      out_bcid  <= '0;
      out_cand  <= '0;
    end else begin
      out_valid <= s1_valid;
      out_bcid  <= s1_bcid;
      out_cand  <= s1_valid ? sel : '0;
    end
  end
endmodule

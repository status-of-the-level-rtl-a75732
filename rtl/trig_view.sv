// trig_view: station coincidence of the L0 barrel trigger in one view.
//
// Inputs are the local-coincidence hit maps of the four RPC stations (BI,
// BM1, BM2, BO) on a common grid of N bins, for either the eta or the phi
// strips.  A station is "present" around bin b for threshold k when it has a
// hit in [b - WIN[k], b + WIN[k]]; WIN is ordered from the widest (lowest pT
// threshold, k = 0) to the narrowest (highest threshold).
//   path A: BM2 (pivot) hit at b, and at least two of BI, BM1, BO present:
//           every 3-out-of-4 combination that includes BM2;
//   path B: BO hit at b, BI present and BM2 absent: BI+BM1+BO, or the BI-BO
//           coincidence that covers the acceptance holes of the middle
//           stations.
// Only the first strip of a cluster of pivot hits (pivot[b-1] = 0) starts a
// candidate.  For each bin the block gives: cand (threshold 0 passed), thr
// (highest threshold passed), st (stations present at threshold 0), bibo
// (BI-BO only, no BM station) and charge (1 when the bend points to higher
// bins: for path A a BO hit above the pivot, for path B no BI hit above it).  Combinational.
// The 3-of-4 rule and the BI-BO coincidence follow the system description;
// the pivot choice, windows, cluster rule and charge estimate are this
// design's choices.
module trig_view #(
  parameter int unsigned N    = 48,
  parameter int unsigned NTHR = 4,
  parameter int unsigned WIN [NTHR] = '{3, 2, 1, 0}
) (
  input  logic [N-1:0]       bi,
  input  logic [N-1:0]       bm1,
  input  logic [N-1:0]       bm2,
  input  logic [N-1:0]       bo,
  output logic [N-1:0]       cand,
  output logic [N-1:0][2:0]  thr,
  output logic [N-1:0][3:0]  st,
  output logic [N-1:0]       bibo,
  output logic [N-1:0]       charge
);
  // presence of each station in the window of each threshold, and hits of
  // the outer (BO) and inner (BI) station above the pivot bin
  logic [NTHR-1:0][N-1:0] p_bi, p_bm1, p_bm2, p_bo;
  logic [N-1:0]           bo_above, bi_above;

  for (genvar b = 0; b < N; b++) begin : g_bin
    for (genvar k = 0; k < NTHR; k++) begin : g_thr
      localparam int LO = (b >= int'(WIN[k])) ? b - int'(WIN[k]) : 0;
      localparam int HI = (b + int'(WIN[k]) <= int'(N) - 1) ? b + int'(WIN[k]) : int'(N) - 1;
      assign p_bi[k][b]  = |bi[HI:LO];
      assign p_bm1[k][b] = |bm1[HI:LO];
      assign p_bm2[k][b] = |bm2[HI:LO];
      assign p_bo[k][b]  = |bo[HI:LO];
    end
    localparam int AHI = (b + int'(WIN[0]) <= int'(N) - 1) ? b + int'(WIN[0]) : int'(N) - 1;
    if (b < int'(N) - 1) begin : g_above
      assign bo_above[b] = |bo[AHI:b+1];
      assign bi_above[b] = |bi[AHI:b+1];
    end else begin : g_top
      assign bo_above[b] = 1'b0;
      assign bi_above[b] = 1'b0;
    end
  end

  always_comb begin
    for (int b = 0; b < int'(N); b++) begin
      logic lead_a, lead_b, pa, pb;
      lead_a = bm2[b] && (b == 0 || !bm2[(b == 0) ? 0 : b-1]);
      lead_b = bo[b]  && (b == 0 || !bo[(b == 0) ? 0 : b-1]);
      cand[b]   = 1'b0;
      thr[b]    = '0;
      st[b]     = '0;
      bibo[b]   = 1'b0;
      charge[b] = 1'b0;
      for (int k = 0; k < int'(NTHR); k++) begin
        pa = lead_a && ((int'(p_bi[k][b]) + int'(p_bm1[k][b]) + int'(p_bo[k][b])) >= 2);
        pb = lead_b && p_bi[k][b] && !p_bm2[k][b];
        if (k == 0) begin
          cand[b]   = pa || pb;
          st[b]     = {p_bo[0][b], p_bm2[0][b], p_bm1[0][b], p_bi[0][b]};
          bibo[b]   = !pa && pb && !p_bm1[0][b];
          charge[b] = pa ? bo_above[b] : !bi_above[b];
        end
        if ((pa || pb) && cand[b]) thr[b] = 3'(k);
      end
    end
  end
endmodule

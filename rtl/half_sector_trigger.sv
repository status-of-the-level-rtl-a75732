// half_sector_trigger: the trigger chain of one half barrel sector, i.e. the
// contents of one of the two trigger SLRs (SLR0 or SLR2).
//
// Inputs are the 28-bit DCT frames of the N_BMBO BM/BO DCTs of the half sector
// (BM1 DCTs first, then BM2, then BO) and of the N_BI BI DCTs that cover it,
// plus the Tile calorimeter energy flags of the BC.  Per DCT a derandomizer
// rebuilds the hit map of each BC.
//   BM/BO DCT (doublet): channel = layer*144 + strip, strips 0..95 eta and
//     96..143 phi; local coincidence 1 of 2 layers.
//   BI DCT (triplet, eta strips read at both ends): channel = layer*96 +
//     end*48 + strip; phi is computed from the two ends' times
//     (bi_phi_timing), then local coincidence 2 of 3 layers in eta and phi.
// The eta strips of a station's DCTs are laid side by side and mapped onto
// NETA trigger bins; the phi strips (or BI phi bins) of a station's DCTs are
// ORed and mapped onto NPHI bins.  trigger_logic finds up to four candidates,
// which go to the MDT-TP, and mdt_confirm sends the confirmed ones to the
// MUCTPI.
//
// Timing: a BC is released by the derandomizers MAX_AGE = 21 BCs after it
// happened; candidates reach to_mdt 4 cycles after that release (derandomizer
// output register, two trigger stages, the MDT-TP output register).
// The chain (derandomizer, local coincidence, 3-of-4 trigger, MDT-TP, MUCTPI)
// follows the system description; the channel maps, the station split of the
// DCTs and the bin grid are this design's own choices.
module half_sector_trigger
  import sl_pkg::*;
#(
  parameter int unsigned N_BM1 = 7,
  parameter int unsigned N_BM2 = 7,
  parameter int unsigned N_BO  = 6,
  parameter int unsigned N_BI  = 5,
  parameter int unsigned NETA  = 48,
  parameter int unsigned NPHI  = 48,
  parameter int unsigned NTILE = 8,
  parameter int unsigned DEPTH = 32,
  parameter bit          SIDE  = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              bc_strobe,
  input  logic [BCID_W-1:0] bcid,
  input  dct_frame_t [N_BM1+N_BM2+N_BO-1:0] bmbo_frames,
  input  dct_frame_t [N_BI-1:0]             bi_frames,
  input  logic [NTILE-1:0]  tile,
  output logic              to_mdt_valid,
  output cand_t [3:0]       to_mdt,
  input  mdt_reply_t        reply,
  output logic              muctpi_valid,
  output cand_t             muctpi,
  output logic [15:0]       late_cnt
);
  localparam int unsigned NBB = N_BM1 + N_BM2 + N_BO;
  localparam int unsigned BB_ETA = 96, BB_PHI = 48, BI_STRIP = 48;

  // ---- BM/BO DCTs ----
  logic [NBB-1:0]                 bb_valid;
  logic [NBB-1:0][BCID_W-1:0]     bb_bcid;
  logic [NBB-1:0][BB_ETA-1:0]     bb_eta;
  logic [NBB-1:0][BB_PHI-1:0]     bb_phi;
  logic [NBB-1:0][15:0]           bb_late;

  for (genvar d = 0; d < NBB; d++) begin : g_bb
    logic [DCT_CHANNELS-1:0]      hits;
    logic [DCT_CHANNELS-1:0][7:0] tm;
    derandomizer #(.DEPTH(DEPTH), .STORE_TIME(1'b0)) u_der (
      .clk, .rst, .bc_strobe, .bcid, .frame(bmbo_frames[d]),
      .out_valid(bb_valid[d]), .out_bcid(bb_bcid[d]), .out_hits(hits),
      .out_time(tm), .late_cnt(bb_late[d]));
    local_coinc #(.NL(2), .N(BB_ETA), .MIN(1)) u_lc_eta (
      .layers({hits[144 +: BB_ETA], hits[0 +: BB_ETA]}), .hits(bb_eta[d]));
    local_coinc #(.NL(2), .N(BB_PHI), .MIN(1)) u_lc_phi (
      .layers({hits[144 + BB_ETA +: BB_PHI], hits[BB_ETA +: BB_PHI]}), .hits(bb_phi[d]));
  end

  // ---- BI DCTs ----
  logic [N_BI-1:0][BI_STRIP-1:0] bi_eta, bi_phi;
  logic [N_BI-1:0][15:0]         bi_late;

  for (genvar d = 0; d < N_BI; d++) begin : g_bi
    logic [DCT_CHANNELS-1:0]      hits;
    logic [DCT_CHANNELS-1:0][7:0] tm;
    logic [2:0][BI_STRIP-1:0]     l_eta, l_phi;
    logic                         v;
    logic [BCID_W-1:0]            b;
    derandomizer #(.DEPTH(DEPTH), .STORE_TIME(1'b1)) u_der (
      .clk, .rst, .bc_strobe, .bcid, .frame(bi_frames[d]),
      .out_valid(v), .out_bcid(b), .out_hits(hits), .out_time(tm),
      .late_cnt(bi_late[d]));
    for (genvar l = 0; l < 3; l++) begin : g_layer
      bi_phi_timing #(.NSTRIP(BI_STRIP), .NPHI(BI_STRIP)) u_phi (
        .hit_a(hits[l*96 +: BI_STRIP]), .hit_b(hits[l*96 + 48 +: BI_STRIP]),
        .time_a(tm[l*96 +: BI_STRIP]),  .time_b(tm[l*96 + 48 +: BI_STRIP]),
        .eta_hits(l_eta[l]), .phi_bins(l_phi[l]));
    end
    local_coinc #(.NL(3), .N(BI_STRIP), .MIN(2)) u_lc_eta (.layers(l_eta), .hits(bi_eta[d]));
    local_coinc #(.NL(3), .N(BI_STRIP), .MIN(2)) u_lc_phi (.layers(l_phi), .hits(bi_phi[d]));
  end

  // ---- stations on the trigger grid ----
  logic [N_BM1*BB_ETA-1:0] bm1_strips;
  logic [N_BM2*BB_ETA-1:0] bm2_strips;
  logic [N_BO*BB_ETA-1:0]  bo_strips;
  logic [N_BI*BI_STRIP-1:0] bi_strips;
  logic [BB_PHI-1:0] bm1_phi, bm2_phi, bo_phi;
  logic [BI_STRIP-1:0] bi_phi_or;

  always_comb begin
    bm1_phi = '0; bm2_phi = '0; bo_phi = '0; bi_phi_or = '0;
    for (int d = 0; d < int'(N_BM1); d++) begin
      bm1_strips[d*BB_ETA +: BB_ETA] = bb_eta[d];
      bm1_phi |= bb_phi[d];
    end
    for (int d = 0; d < int'(N_BM2); d++) begin
      bm2_strips[d*BB_ETA +: BB_ETA] = bb_eta[N_BM1 + d];
      bm2_phi |= bb_phi[N_BM1 + d];
    end
    for (int d = 0; d < int'(N_BO); d++) begin
      bo_strips[d*BB_ETA +: BB_ETA] = bb_eta[N_BM1 + N_BM2 + d];
      bo_phi |= bb_phi[N_BM1 + N_BM2 + d];
    end
    for (int d = 0; d < int'(N_BI); d++) begin
      bi_strips[d*BI_STRIP +: BI_STRIP] = bi_eta[d];
      bi_phi_or |= bi_phi[d];
    end
  end

  logic [3:0][NETA-1:0] eta_st;
  logic [3:0][NPHI-1:0] phi_st;

  strip_bins #(.NIN(N_BI*BI_STRIP), .NOUT(NETA)) u_be0 (.strips(bi_strips),  .grid(eta_st[0]));
  strip_bins #(.NIN(N_BM1*BB_ETA),  .NOUT(NETA)) u_be1 (.strips(bm1_strips), .grid(eta_st[1]));
  strip_bins #(.NIN(N_BM2*BB_ETA),  .NOUT(NETA)) u_be2 (.strips(bm2_strips), .grid(eta_st[2]));
  strip_bins #(.NIN(N_BO*BB_ETA),   .NOUT(NETA)) u_be3 (.strips(bo_strips),  .grid(eta_st[3]));
  strip_bins #(.NIN(BI_STRIP), .NOUT(NPHI)) u_bp0 (.strips(bi_phi_or), .grid(phi_st[0]));
  strip_bins #(.NIN(BB_PHI),   .NOUT(NPHI)) u_bp1 (.strips(bm1_phi),   .grid(phi_st[1]));
  strip_bins #(.NIN(BB_PHI),   .NOUT(NPHI)) u_bp2 (.strips(bm2_phi),   .grid(phi_st[2]));
  strip_bins #(.NIN(BB_PHI),   .NOUT(NPHI)) u_bp3 (.strips(bo_phi),    .grid(phi_st[3]));

  // ---- trigger and MDT-TP confirmation ----
  logic              tl_valid;
  logic [BCID_W-1:0] tl_bcid;
  cand_t [3:0]       tl_cand;

  trigger_logic #(.NETA(NETA), .NPHI(NPHI), .NTILE(NTILE), .SIDE(SIDE)) u_trig (
    .clk, .rst, .in_valid(bb_valid[0]), .in_bcid(bb_bcid[0]),
    .eta_st, .phi_st, .tile, .out_valid(tl_valid), .out_bcid(tl_bcid),
    .out_cand(tl_cand));

  logic [15:0] acc_cnt, rej_cnt, nom_cnt;
  mdt_confirm #(.NCAND(4)) u_mdt (
    .clk, .rst, .cand_valid(tl_valid), .cand_bcid(tl_bcid), .cand(tl_cand),
    .to_mdt_valid, .to_mdt, .reply, .muctpi_valid, .muctpi,
    .accept_cnt(acc_cnt), .reject_cnt(rej_cnt), .nomatch_cnt(nom_cnt));

  always_comb begin
    late_cnt = '0;
    for (int d = 0; d < int'(NBB); d++) late_cnt += bb_late[d];
    for (int d = 0; d < int'(N_BI); d++) late_cnt += bi_late[d];
  end
endmodule

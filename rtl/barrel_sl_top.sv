// barrel_sl_top: firmware of the barrel Sector Logic FPGA for the Level-0
// RPC muon trigger of one ATLAS barrel sector.
//
// The FPGA has four dies (SLR0..SLR3) and the logic is split along them:
//   SLR0, SLR2  each take the 20 BM/BO DCT links of one half sector and run
//               the trigger chain (half_sector_trigger), sending candidates
//               to the MDT-TP and confirmed ones to the MUCTPI;
//   SLR1        takes the 10 BI DCT links, the Tile calorimeter flags and the
//               TTC signals (BC timing) and passes the BI and Tile data to
//               SLR0 and SLR2;
//   SLR3        stores every DCT's data in one readout RAM per DCT (50 in
//               all) and, on L0-Accept, sends the BC's data to FELIX.
// Every DCT link enters as the 224-bit user frame of its lpGBT uplink (one per
// BC); a frame_splitter per link turns it into 28-bit DCT frames at 320 MHz.
// Signals crossing dies go through one register per crossing: BI data
// SLR1->SLR0/SLR2 one, SLR2->SLR3 one, BI SLR1->SLR3 two, SLR0->SLR3 three.
//
// DCT link index: 0..19 SLR0 BM/BO (BM1 0..6, BM2 7..13, BO 14..19),
// 20..24 BI of the SLR0 half, 25..29 BI of the SLR2 half, 30..49 SLR2 BM/BO.
// The Tile flags of BC n are sampled, one crossing register late, in the first
// cycle of BC n+22 (right after the derandomizers release BC n): drive them
// from the last cycle of BC n+21 into BC n+22.
// The lpGBT decoders, transceivers, downlink encoders and the clock generator
// are outside this module: bcid and bc_strobe are brought out for them.
//
// The die split, link counts, 50 readout RAMs and crossing registers follow
// the system description; the link numbering, station assignment of the DCTs
// and the Tile flag format are this design's choices.
module barrel_sl_top
  import sl_pkg::*;
#(
  parameter int unsigned NTILE = 8
) (
  input  logic              clk,          // 320 MHz
  input  logic              rst,
  input  logic              ttc_bcr,
  input  logic [49:0]       uplink_valid,
  input  logic [49:0][UPLINK_USER_W-1:0] uplink_data,
  input  logic [1:0][NTILE-1:0] tile_flags,
  input  mdt_reply_t [1:0]  mdt_reply,
  output logic [1:0]        to_mdt_valid,
  output cand_t [1:0][3:0]  to_mdt,
  output logic [1:0]        muctpi_valid,
  output cand_t [1:0]       muctpi,
  input  logic              l0a_valid,
  input  logic [BCID_W-1:0] l0a_bcid,
  output logic              fx_valid,
  output logic [31:0]       fx_data,
  output logic              fx_last,
  input  logic              fx_ready,
  output logic              bc_strobe,
  output logic [BCID_W-1:0] bcid,
  output logic [1:0][15:0]  trig_late_cnt,
  output logic [15:0]       ro_drop_cnt,
  output logic [15:0]       l0a_drop_cnt,
  output logic [15:0]       event_cnt
);
  localparam int unsigned NDCT = 50;
  localparam int unsigned SLOTS = 512, WPB = 16;

  logic [2:0] phase;
  bc_timing u_bc (.clk, .rst, .bcr(ttc_bcr), .phase, .bc_strobe, .bcid);

  // ---- uplink frame splitting (one per DCT link) ----
  dct_frame_t [NDCT-1:0] frames;
  for (genvar d = 0; d < NDCT; d++) begin : g_split
    logic v;
    logic [DCT_FRAME_W-1:0] f;
    frame_splitter u_split (.clk, .rst, .in_valid(uplink_valid[d]),
                            .in_data(uplink_data[d]), .out_valid(v), .out_frame(f));
    assign frames[d] = v ? dct_frame_t'(f) : '0;
  end

  // ---- SLR1 -> SLR0 / SLR2: BI frames and Tile flags, one crossing ----
  dct_frame_t [4:0] bi0, bi1;
  logic [1:0][NTILE-1:0] tile_q;
  slr_pipe #(.WIDTH(5*DCT_FRAME_W), .STAGES(1)) u_x_bi0 (.clk, .d(frames[24:20]), .q(bi0));
  slr_pipe #(.WIDTH(5*DCT_FRAME_W), .STAGES(1)) u_x_bi1 (.clk, .d(frames[29:25]), .q(bi1));
  slr_pipe #(.WIDTH(2*NTILE), .STAGES(1)) u_x_tile (.clk, .d(tile_flags), .q(tile_q));

  // ---- SLR0 and SLR2: half-sector trigger ----
  half_sector_trigger #(.NTILE(NTILE), .SIDE(1'b0)) u_trig0 (
    .clk, .rst, .bc_strobe, .bcid, .bmbo_frames(frames[19:0]), .bi_frames(bi0),
    .tile(tile_q[0]), .to_mdt_valid(to_mdt_valid[0]), .to_mdt(to_mdt[0]),
    .reply(mdt_reply[0]), .muctpi_valid(muctpi_valid[0]), .muctpi(muctpi[0]),
    .late_cnt(trig_late_cnt[0]));
  half_sector_trigger #(.NTILE(NTILE), .SIDE(1'b1)) u_trig1 (
    .clk, .rst, .bc_strobe, .bcid, .bmbo_frames(frames[49:30]), .bi_frames(bi1),
    .tile(tile_q[1]), .to_mdt_valid(to_mdt_valid[1]), .to_mdt(to_mdt[1]),
    .reply(mdt_reply[1]), .muctpi_valid(muctpi_valid[1]), .muctpi(muctpi[1]),
    .late_cnt(trig_late_cnt[1]));

  // ---- crossings to SLR3: SLR0 three, SLR1 two, SLR2 one ----
  dct_frame_t [NDCT-1:0] ro_frames;
  slr_pipe #(.WIDTH(20*DCT_FRAME_W), .STAGES(3)) u_x_ro0 (.clk, .d(frames[19:0]),  .q(ro_frames[19:0]));
  slr_pipe #(.WIDTH(10*DCT_FRAME_W), .STAGES(2)) u_x_ro1 (.clk, .d(frames[29:20]), .q(ro_frames[29:20]));
  slr_pipe #(.WIDTH(20*DCT_FRAME_W), .STAGES(1)) u_x_ro2 (.clk, .d(frames[49:30]), .q(ro_frames[49:30]));

  // ---- SLR3: readout ----
  logic [$clog2(SLOTS)-1:0]       rd_slot;
  logic [$clog2(WPB)-1:0]         rd_word;
  logic [NDCT-1:0][$clog2(WPB):0] rd_count;
  logic [NDCT-1:0]                rd_ovf;
  logic [NDCT-1:0][31:0]          rd_data;
  logic [NDCT-1:0][15:0]          drops;

  for (genvar d = 0; d < NDCT; d++) begin : g_ro
    readout_buffer #(.SLOTS(SLOTS), .WPB(WPB)) u_buf (
      .clk, .rst, .bc_strobe, .bcid, .frame(ro_frames[d]),
      .rd_slot, .rd_word, .rd_count(rd_count[d]), .rd_ovf(rd_ovf[d]),
      .rd_data(rd_data[d]), .drop_cnt(drops[d]));
  end

  readout_builder #(.NDCT(NDCT), .SLOTS(SLOTS), .WPB(WPB)) u_rob (
    .clk, .rst, .l0a_valid, .l0a_bcid, .rd_slot, .rd_word, .rd_count, .rd_ovf,
    .rd_data, .fx_valid, .fx_data, .fx_last, .fx_ready, .l0a_drop_cnt, .event_cnt);

  always_comb begin
    ro_drop_cnt = '0;
    for (int d = 0; d < int'(NDCT); d++) ro_drop_cnt += drops[d];
  end
endmodule

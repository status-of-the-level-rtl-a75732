// derandomizer: reorders the hits of one DCT by bunch crossing.
//
// DCT hits reach the SL between 5 and 20 BCs after the BC they occurred in,
// in no fixed order.  Each hit frame carries the low bits of its BCID; the
// block turns them into an age (BCs before the current one) and sets the
// channel's bit in a per-BC hit map held in a ring of DEPTH slots.  The ring
// is indexed by the BC counter, so the slot of a hit is (current slot - age).
// At the end of every BC (bc_strobe) the oldest BC that can still receive
// hits, MAX_AGE BCs back, is released on the output and its slot cleared.
// A frame whose age is above MAX_AGE is dropped and counted in late_cnt.
// With STORE_TIME = 1 the fine time of the first hit of each channel in the
// BC is kept too (the BI chambers need it to compute phi).  With the default
// STORE_TIME = 0 no time storage is built and out_time stays at zero, so those
// outputs are constant on purpose; BM/BO instances leave them unconnected.
//
// Timing: out_valid pulses one cycle after bc_strobe, with the hit map of BC
// out_bcid.  A hit written in the strobe cycle itself into the slot being
// released is still included.
//
// The reordering by BC and the 5..20 BC latency follow the system
// description.  MAX_AGE = 21 (one BC of margin for frames that straddle a BC
// boundary or cross an SLR register) and the ring depth are this design's
// choices.
module derandomizer
  import sl_pkg::*;
#(
  parameter int unsigned CH         = DCT_CHANNELS,
  parameter int unsigned DEPTH      = 32,
  parameter int unsigned MAX_AGE    = MAX_LAT_BC + 1,
  parameter bit          STORE_TIME = 1'b0
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              bc_strobe,
  input  logic [BCID_W-1:0] bcid,
  input  dct_frame_t        frame,
  output logic              out_valid,
  output logic [BCID_W-1:0] out_bcid,
  output logic [CH-1:0]     out_hits,
  output logic [CH-1:0][7:0] out_time,
  output logic [15:0]       late_cnt
);
  localparam int unsigned SW = $clog2(DEPTH);

  logic [SW-1:0]      cur_slot;

  logic [FBCID_W-1:0] age;
  logic               wr_ok;
  logic [SW-1:0]      wslot, rslot;

  assign age   = bc_age(bcid, frame.bcid);
  assign wr_ok = frame.hit && (age <= FBCID_W'(MAX_AGE)) && (frame.chan < 9'(CH));
  assign wslot = cur_slot - SW'(age);
  assign rslot = cur_slot - SW'(MAX_AGE);

  initial assert (DEPTH > MAX_AGE && (1 << SW) == DEPTH)
    else $error("derandomizer: DEPTH must be a power of two above MAX_AGE");

  // per channel: one hit bit per slot and (optionally) the time of the first
  // hit; hits_rd / time_rd are the contents of the slot being released, with
  // a hit written in the same cycle merged in
  logic [CH-1:0]      hits_rd;
  logic [CH-1:0][7:0] time_rd;

  for (genvar c = 0; c < CH; c++) begin : g_ch
    logic [DEPTH-1:0] hv;
    logic             we;
    assign we = wr_ok && (frame.chan == 9'(c));
    always_ff @(posedge clk) begin
      if (rst) hv <= '0;
      else begin
        if (we) hv[wslot] <= 1'b1;
        if (bc_strobe) hv[rslot] <= 1'b0;
      end
    end
    assign hits_rd[c] = hv[rslot] || (we && wslot == rslot);
    if (STORE_TIME) begin : g_time
      logic [7:0] tv [DEPTH];
      always_ff @(posedge clk)
        if (we && !hv[wslot]) tv[wslot] <= frame.ftime;
      assign time_rd[c] = hv[rslot] ? tv[rslot] : frame.ftime;
    end else begin : g_notime
      assign time_rd[c] = '0;
    end
  end

  // release of the oldest BC
  always_ff @(posedge clk) begin
    if (rst) begin
      cur_slot  <= '0;
      out_valid <= 1'b0;
      out_bcid  <= '0;
      out_hits  <= '0;
      out_time  <= '0;
      late_cnt  <= '0;
    end else begin
      out_valid <= bc_strobe;
      if (frame.hit && !wr_ok) late_cnt <= late_cnt + 1'b1;
      if (bc_strobe) begin
        cur_slot <= cur_slot + 1'b1;
        out_bcid <= bc_sub(bcid, BCID_W'(MAX_AGE));
        out_hits <= hits_rd;
        out_time <= time_rd;
      end
    end
  end
endmodule

// readout_buffer: readout memory of one DCT, ordered by bunch crossing.
//
// Every DCT frame that arrives (one 32-bit word per 320 MHz cycle, i.e.
// 10.24 Gb/s) is written into a RAM of SLOTS x WPB words: WPB = 16 words per
// BC for SLOTS = 512 BCs, 8192 x 32 bits.  The slot is the low 9 bits of the
// frame's full BCID (recovered from the frame's BCID bits and the current
// BC); inside a slot words go in arrival order and a per-slot count remembers
// how many there are.  A seventeenth word for a BC is dropped and sets the
// slot's overflow flag.  Frames older than MAX_AGE BCs are dropped.  At the end
// of each BC the slot of the BC DELETE_BC (400 BCs = 10 us) back is emptied,
// so data not read by then are deleted.  Since 400 < 512 and the orbit wrap
// moves no two live BCs onto one slot, slots never alias.
//
// Stored word: {4'h0, 28-bit DCT frame}.
// Read port: rd_slot selects a BC; rd_count / rd_ovf give its word count and
// overflow flag combinationally; rd_data = word rd_word of that slot, one
// cycle after the address (synchronous RAM read).
//
// Memory size, words per BC, write rate and the 10 us deletion follow the
// system description; the word format, overflow rule and MAX_AGE margin are
// this design's choices.
module readout_buffer
  import sl_pkg::*;
#(
  parameter int unsigned SLOTS     = 512,
  parameter int unsigned WPB       = 16,
  parameter int unsigned DELETE_BC = 400,
  parameter int unsigned MAX_AGE   = MAX_LAT_BC + 4
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              bc_strobe,
  input  logic [BCID_W-1:0] bcid,
  input  dct_frame_t        frame,
  input  logic [$clog2(SLOTS)-1:0] rd_slot,
  input  logic [$clog2(WPB)-1:0]   rd_word,
  output logic [$clog2(WPB):0]     rd_count,
  output logic              rd_ovf,
  output logic [31:0]       rd_data,
  output logic [15:0]       drop_cnt
);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned WW = $clog2(WPB);

  logic [31:0]  ram [SLOTS*WPB];
  logic [WW:0]  cnt [SLOTS];
  logic         ovf [SLOTS];

  logic [FBCID_W-1:0] age;
  logic [SW-1:0]      wslot, dslot;
  logic               fresh, wr, full;

  assign age   = bc_age(bcid, frame.bcid);
  assign fresh = frame.hit && (age <= FBCID_W'(MAX_AGE));
  assign wslot = SW'(bc_sub(bcid, BCID_W'(age)));
  assign dslot = SW'(bc_sub(bcid, BCID_W'(DELETE_BC)));
  assign full  = (cnt[wslot] == (WW+1)'(WPB));
  assign wr    = fresh && !full;

  initial assert (DELETE_BC + MAX_AGE < SLOTS) else $error("readout_buffer: SLOTS too small");

  always_ff @(posedge clk)
    if (wr) ram[{wslot, cnt[wslot][WW-1:0]}] <= {4'h0, frame};

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int s = 0; s < SLOTS; s++) begin
        cnt[s] <= '0;
        ovf[s] <= 1'b0;
      end
      drop_cnt <= '0;
    end else begin
      if (wr) cnt[wslot] <= cnt[wslot] + 1'b1;
      if (fresh && full) ovf[wslot] <= 1'b1;
      if (frame.hit && !wr) drop_cnt <= drop_cnt + 1'b1;
      if (bc_strobe) begin
        cnt[dslot] <= '0;
        ovf[dslot] <= 1'b0;
      end
    end
  end

  assign rd_count = cnt[rd_slot];
  assign rd_ovf   = ovf[rd_slot];

  always_ff @(posedge clk) rd_data <= ram[{rd_slot, rd_word}];
endmodule

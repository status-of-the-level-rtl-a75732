// sl_pkg: types and constants shared by the barrel Sector Logic (SL) firmware.
//
// The SL runs on a 320 MHz clock derived from the 40 MHz LHC bunch-crossing
// (BC) clock, so one BC lasts CLK_PER_BC = 8 cycles.  Each DCT (on-detector
// Data Collector and Transmitter) uplink carries 8.96 Gb/s of user data, which
// is 224 bits per BC, i.e. eight 28-bit DCT frames per BC or one per clock.
//
// The 28-bit DCT frame layout, the 128-bit trigger candidate layout and the
// MDT Trigger Processor reply format are this design's own choices; only the
// widths (28 and 128 bits) follow the system description.
package sl_pkg;

  localparam int unsigned CLK_PER_BC    = 8;     // 320 MHz / 40 MHz
  localparam int unsigned BC_PER_ORBIT  = 3564;  // LHC bunch slots per orbit
  localparam int unsigned BCID_W        = 12;
  localparam int unsigned DCT_FRAME_W   = 28;
  localparam int unsigned UPLINK_USER_W = 224;   // 8.96 Gb/s / 40 MHz
  localparam int unsigned DCT_CHANNELS  = 288;   // front-end channels per DCT
  localparam int unsigned MAX_LAT_BC    = 20;
  localparam int unsigned FBCID_W       = 10;    // BCID bits carried in a frame

  // One zero-suppressed DCT hit.  hit = 0 marks an idle frame.
  // ftime is the hit time inside its BC in units of 25 ns / 256.
  typedef struct packed {
    logic                hit;
    logic [FBCID_W-1:0]  bcid;   // low bits of the BC the hit occurred in
    logic [8:0]          chan;   // 0..287
    logic [7:0]          ftime;
  } dct_frame_t;

  // 128-bit trigger candidate sent to the MDT-TP and to the MUCTPI.
  typedef struct packed {
    logic              valid;
    logic [BCID_W-1:0] bcid;
    logic              side;       // half sector: 0 = SLR0, 1 = SLR2
    logic [1:0]        idx;        // candidate slot 0..3 within the BC
    logic [7:0]        eta;        // eta bin of the pivot hit
    logic [7:0]        phi;        // phi bin of the pivot hit
    logic [7:0]        pt;         // transverse-momentum code
    logic [2:0]        thr;        // highest pT threshold satisfied
    logic              charge;
    logic [3:0]        eta_st;     // stations seen in eta: {BO,BM2,BM1,BI}
    logic [3:0]        phi_st;     // stations seen in phi
    logic              bibo;       // BI-BO coincidence (acceptance holes)
    logic              tile;       // Tile calorimeter energy flag
    logic              mdt_ok;     // confirmed by the MDT-TP
    logic [72:0]       reserved;
  } cand_t;

  // Reply of the MDT-TP for one candidate.
  typedef struct packed {
    logic              valid;
    logic [BCID_W-1:0] bcid;
    logic [1:0]        idx;
    logic              accept;
    logic [7:0]        pt;         // refined pT code
  } mdt_reply_t;

  // Number of BCs between the BC a frame carries (low FBCID_W bits) and the
  // current BC, correct across the orbit wrap at BC_PER_ORBIT.
  function automatic logic [FBCID_W-1:0] bc_age(input logic [BCID_W-1:0] now,
                                                input logic [FBCID_W-1:0] fbc);
    logic [FBCID_W-1:0] d0, d1;
    d0 = FBCID_W'(now) - fbc;
    d1 = FBCID_W'(now + BCID_W'(BC_PER_ORBIT)) - fbc;
    if (d0 > FBCID_W'(MAX_LAT_BC) && now <= BCID_W'(MAX_LAT_BC)) return d1;
    return d0;
  endfunction

  // Full BCID of a BC that is age BCs older than now.
  function automatic logic [BCID_W-1:0] bc_sub(input logic [BCID_W-1:0] now,
                                               input logic [BCID_W-1:0] age);
    if (now >= age) return now - age;
    return now + BCID_W'(BC_PER_ORBIT) - age;
  endfunction

endpackage

// bc_timing: bunch-crossing timing for the 320 MHz Sector Logic clock domain.
//
// The SL logic runs at 320 MHz, eight cycles per 40 MHz LHC bunch crossing.
// A 3-bit phase counter marks the cycles of a BC; bc_strobe is high in the last
// cycle (phase 7) of every BC, and bcid counts BCs from 0 to BC_PER_ORBIT-1.
// A bunch-counter-reset pulse (bcr, from the TTC link) restarts both counters:
// the cycle after bcr is phase 0 of BC 0.  Counters are reset synchronously.
// The 320 MHz / 40 MHz ratio follows the system description; the orbit length
// (3564 bunch slots) and the BCR behaviour are this design's choices.
module bc_timing
  import sl_pkg::*;
#(
  parameter int unsigned PHASES = CLK_PER_BC,
  parameter int unsigned ORBIT  = BC_PER_ORBIT
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              bcr,
  output logic [$clog2(PHASES)-1:0] phase,
  output logic              bc_strobe,
  output logic [BCID_W-1:0] bcid
);
  assign bc_strobe = (phase == ($clog2(PHASES))'(PHASES - 1));

  always_ff @(posedge clk) begin
    if (rst || bcr) begin
      phase <= '0;
      bcid  <= '0;
    end else begin
      phase <= bc_strobe ? '0 : phase + 1'b1;
      if (bc_strobe) bcid <= (bcid == BCID_W'(ORBIT - 1)) ? '0 : bcid + 1'b1;
    end
  end
endmodule

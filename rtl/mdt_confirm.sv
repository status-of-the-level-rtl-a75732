// mdt_confirm: holds the candidates sent to the MDT Trigger Processor and
// forwards those it confirms to the MUCTPI.
//
// Every BC (cand_valid, BC cand_bcid) the trigger logic gives up to NCAND
// candidates; the table row of that BC is overwritten even when there are none.  They go out to the
// MDT-TP at once (to_mdt_*) and are also stored in a table indexed by the low
// bits of their BCID (DEPTH BCs of history).  The MDT-TP answers with one
// reply per candidate (BCID, slot, accept, refined pT).  A reply that finds a
// valid stored candidate with the same BCID sends it to the MUCTPI, with the
// refined pT and mdt_ok set, if accepted; otherwise it is dropped.  Replies
// that match no stored candidate are counted in nomatch_cnt.
//
// Timing: to_mdt_* is registered (1 cycle after cand_valid); a reply gives
// muctpi_valid 1 cycle later.  One reply per cycle.
// Sending candidates to the MDT-TP and the final ones to the MUCTPI follows the
// system description; the reply format, table and matching are this design's
// choices.
module mdt_confirm
  import sl_pkg::*;
#(
  parameter int unsigned NCAND = 4,
  parameter int unsigned DEPTH = 512
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              cand_valid,
  input  logic [BCID_W-1:0] cand_bcid,
  input  cand_t [NCAND-1:0] cand,
  output logic              to_mdt_valid,
  output cand_t [NCAND-1:0] to_mdt,
  input  mdt_reply_t        reply,
  output logic              muctpi_valid,
  output cand_t             muctpi,
  output logic [15:0]       accept_cnt,
  output logic [15:0]       reject_cnt,
  output logic [15:0]       nomatch_cnt
);
  localparam int unsigned AW = $clog2(DEPTH);

  cand_t [NCAND-1:0] table_q [DEPTH];
  cand_t             hit;
  logic              match;

  initial assert ((1 << AW) == DEPTH) else $error("mdt_confirm: DEPTH must be a power of two");

  assign hit   = table_q[reply.bcid[AW-1:0]][reply.idx];
  assign match = reply.valid && hit.valid && (hit.bcid == reply.bcid)
                 && (32'(reply.idx) < NCAND);

  always_ff @(posedge clk) begin
    if (rst) begin
      for (int i = 0; i < DEPTH; i++) table_q[i] <= '0;
    end else if (cand_valid) begin
      table_q[cand_bcid[AW-1:0]] <= cand;
    end
  end

  always_ff @(posedge clk) begin
    if (rst) begin
      to_mdt_valid <= 1'b0;
      to_mdt       <= '0;
      muctpi_valid <= 1'b0;
      muctpi       <= '0;
      accept_cnt   <= '0;
      reject_cnt   <= '0;
      nomatch_cnt  <= '0;
    end else begin
      to_mdt_valid <= cand_valid && cand[0].valid;
      to_mdt       <= cand;
      muctpi_valid <= match && reply.accept;
      muctpi       <= hit;
      muctpi.pt    <= reply.pt;
      muctpi.mdt_ok <= 1'b1;
      if (match && reply.accept)  accept_cnt  <= accept_cnt + 1'b1;
      if (match && !reply.accept) reject_cnt  <= reject_cnt + 1'b1;
      if (reply.valid && !match)  nomatch_cnt <= nomatch_cnt + 1'b1;
    end
  end
endmodule

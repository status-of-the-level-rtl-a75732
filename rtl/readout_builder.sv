// readout_builder: builds the readout event of an L0-Accepted BC for FELIX.
//
// L0-Accept requests (BCID) are queued in a FIFO of QDEPTH entries; a request
// that finds the FIFO full is dropped and counted.  For each request the block
// scans the NDCT readout buffers for that BC and sends on a 32-bit
// valid/ready stream:
//   header       {4'hE, 4'h0, event counter[11:0], BCID[11:0]}
//   per DCT with data:
//     DCT header {4'hD, DCT index[5:0], overflow, count[4:0], 16'h0}
//     its words in the order they arrived (each {4'h0, DCT frame})
//   trailer      {4'hF, 8'h0, number of words in the event incl. header and
//                 trailer[19:0]}, with fx_last set.
// DCTs without data for the BC cost one idle cycle each and send nothing.
//
// Timing: the buffers' read is synchronous; the word fetched in one cycle is
// in the output register the next.  The stream sustains one word per cycle
// while fx_ready is high and holds its output while it is low (the address to
// the buffers is held too, so the fetched word stays valid).
// Reading the accepted BC from every DCT memory in arrival order follows the
// system description; the FIFO, the event format and the single output stream
// are this design's choices.
module readout_builder
  import sl_pkg::*;
#(
  parameter int unsigned NDCT   = 50,
  parameter int unsigned SLOTS  = 512,
  parameter int unsigned WPB    = 16,
  parameter int unsigned QDEPTH = 16
) (
  input  logic              clk,
  input  logic              rst,
  input  logic              l0a_valid,
  input  logic [BCID_W-1:0] l0a_bcid,
  // readout buffer read port, shared by all buffers
  output logic [$clog2(SLOTS)-1:0]          rd_slot,
  output logic [$clog2(WPB)-1:0]            rd_word,
  input  logic [NDCT-1:0][$clog2(WPB):0]    rd_count,
  input  logic [NDCT-1:0]                   rd_ovf,
  input  logic [NDCT-1:0][31:0]             rd_data,
  // FELIX stream
  output logic              fx_valid,
  output logic [31:0]       fx_data,
  output logic              fx_last,
  input  logic              fx_ready,
  output logic [15:0]       l0a_drop_cnt,
  output logic [15:0]       event_cnt
);
  localparam int unsigned SW = $clog2(SLOTS);
  localparam int unsigned WW = $clog2(WPB);
  localparam int unsigned QW = $clog2(QDEPTH);
  localparam int unsigned DW = $clog2(NDCT);

  typedef enum logic [2:0] {S_IDLE, S_HDR, S_SCAN, S_WORDS, S_TRL} state_t;
  typedef enum logic [1:0] {K_FIXED, K_DATA} kind_t;

  // L0-Accept FIFO
  logic [BCID_W-1:0] q_mem [QDEPTH];
  logic [QW:0]       q_wp, q_rp;
  logic              q_empty, q_full;
  assign q_empty = (q_wp == q_rp);
  assign q_full  = (q_wp[QW-1:0] == q_rp[QW-1:0]) && (q_wp[QW] != q_rp[QW]);

  always_ff @(posedge clk) begin
    if (rst) begin
      q_wp <= '0;
      l0a_drop_cnt <= '0;
    end else if (l0a_valid) begin
      if (q_full) l0a_drop_cnt <= l0a_drop_cnt + 1'b1;
      else begin
        q_mem[q_wp[QW-1:0]] <= l0a_bcid;
        q_wp <= q_wp + 1'b1;
      end
    end
  end

  // issue stage: decides the next word; s1 holds the word whose RAM data
  // arrives this cycle; out holds the word on the stream
  state_t            state;
  logic [BCID_W-1:0] ev_bcid;
  logic [DW-1:0]     dct;
  logic [WW:0]       widx;
  logic [19:0]       nwords;

  logic        s1_valid, s1_last;
  kind_t       s1_kind;
  logic [31:0] s1_fixed;
  logic [DW-1:0] s1_dct;
  logic [WW-1:0] s1_word;

  logic        adv;           // output register can take the s1 word
  logic        iss;           // the issue stage produces a word this cycle
  kind_t       i_kind;
  logic [31:0] i_fixed;
  logic        i_last;
  logic [WW-1:0] i_word;

  assign adv = !fx_valid || fx_ready;

  always_comb begin
    iss     = 1'b0;
    i_kind  = K_FIXED;
    i_fixed = '0;
    i_last  = 1'b0;
    i_word  = '0;
    unique case (state)
      S_IDLE: ;
      S_HDR: begin
        iss     = 1'b1;
        i_fixed = {4'hE, 4'h0, event_cnt[11:0], ev_bcid};
      end
      S_SCAN: if (rd_count[dct] != '0) begin
        iss     = 1'b1;
        i_fixed = {4'hD, 6'(dct), rd_ovf[dct], 5'(rd_count[dct]), 16'h0};
      end
      S_WORDS: begin
        iss    = 1'b1;
        i_kind = K_DATA;
        i_word = widx[WW-1:0];
      end
      S_TRL: begin
        iss     = 1'b1;
        i_last  = 1'b1;
        i_fixed = {4'hF, 8'h0, nwords + 20'd1};
      end
      default: ;
    endcase
  end

  // address to the buffers: the next word when advancing, else the held one
  assign rd_slot = SW'(ev_bcid);
  assign rd_word = (adv && i_kind == K_DATA) ? i_word : s1_word;

  always_ff @(posedge clk) begin
    if (rst) begin
      state    <= S_IDLE;
      q_rp     <= '0;
      ev_bcid  <= '0;
      dct      <= '0;
      widx     <= '0;
      nwords   <= '0;
      s1_valid <= 1'b0;
      s1_kind  <= K_FIXED;
      s1_fixed <= '0;
      s1_last  <= 1'b0;
      s1_dct   <= '0;
      s1_word  <= '0;
      fx_valid <= 1'b0;
      fx_data  <= '0;
      fx_last  <= 1'b0;
      event_cnt <= '0;
    end else begin
      if (adv) begin
        // output register
        fx_valid <= s1_valid;
        fx_last  <= s1_last;
        fx_data  <= (s1_kind == K_DATA) ? rd_data[s1_dct] : s1_fixed;
        // s1 register
        s1_valid <= iss;
        s1_kind  <= i_kind;
        s1_fixed <= i_fixed;
        s1_last  <= i_last;
        s1_dct   <= dct;
        s1_word  <= i_word;
        if (iss) nwords <= nwords + 1'b1;
        // issue state machine
        unique case (state)
          S_IDLE: if (!q_empty) begin
            ev_bcid <= q_mem[q_rp[QW-1:0]];
            q_rp    <= q_rp + 1'b1;
            dct     <= '0;
            nwords  <= '0;
            state   <= S_HDR;
          end
          S_HDR: state <= S_SCAN;
          S_SCAN: begin
            widx <= '0;
            if (rd_count[dct] != '0) state <= S_WORDS;
            else if (dct == DW'(NDCT - 1)) state <= S_TRL;
            else dct <= dct + 1'b1;
          end
          S_WORDS: begin
            if (widx + 1'b1 == rd_count[dct]) begin
              if (dct == DW'(NDCT - 1)) state <= S_TRL;
              else begin
                dct   <= dct + 1'b1;
                state <= S_SCAN;
              end
            end
            widx <= widx + 1'b1;
          end
          S_TRL: begin
            state     <= S_IDLE;
            event_cnt <= event_cnt + 1'b1;
          end
          default: state <= S_IDLE;
        endcase
      end
    end
  end
endmodule

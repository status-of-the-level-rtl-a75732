// tb_readout_builder: four modelled readout memories (synchronous read, as the
// real buffer) hold random data for a few BCs.  Six L0-Accepts arrive back to
// back into a 4-deep queue: the sixth must be dropped and the other five must
// come out as events (header, per-DCT header and words in order, trailer with
// the word count) on a stream whose ready is randomly deasserted.
module tb_readout_builder;
  import sl_pkg::*;
  localparam int ND = 4;
  logic clk = 0, rst = 1;
  logic l0a_valid = 0;
  logic [BCID_W-1:0] l0a_bcid = '0;
  logic [8:0] rd_slot;
  logic [3:0] rd_word;
  logic [ND-1:0][4:0] rd_count;
  logic [ND-1:0] rd_ovf;
  logic [ND-1:0][31:0] rd_data;
  logic fx_valid, fx_last, fx_ready = 1;
  logic [31:0] fx_data;
  logic [15:0] l0a_drop_cnt, event_cnt;
  int checks = 0, failures = 0;

  logic [4:0]  cnt [ND][512];
  logic [31:0] mem [ND][512][16];
  logic [31:0] exp_q [$];
  int n_stall = 0;

  readout_builder #(.NDCT(ND), .QDEPTH(4)) dut (.*);
  always #1 clk = ~clk;

  for (genvar d = 0; d < ND; d++) begin : g_m
    assign rd_count[d] = cnt[d][rd_slot];
    assign rd_ovf[d]   = (cnt[d][rd_slot] == 16);
    always_ff @(posedge clk) rd_data[d] <= mem[d][rd_slot][rd_word];
  end

  always_ff @(posedge clk) fx_ready <= ($urandom % 4) != 0;

  // compare the stream with the expected words
  always @(posedge clk) if (!rst && fx_valid && fx_ready) begin
    checks++;
    if (exp_q.size() == 0) begin failures++; $display("FAIL unexpected word %h", fx_data); end
    else begin
      logic [31:0] e;
      e = exp_q.pop_front();
      if (fx_data != e) begin failures++; $display("FAIL word %h exp %h", fx_data, e); end
      checks++;
      if (fx_last != (e[31:28] == 4'hF)) failures++;
    end
  end
  always @(posedge clk) if (fx_valid && !fx_ready) n_stall++;

  initial begin
    #50000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int bcs [6] = '{100, 101, 612, 300, 101, 5};
    for (int d = 0; d < ND; d++) for (int s = 0; s < 512; s++) cnt[d][s] = 0;
    // data: BC 100 in DCTs 0 and 3, BC 101 in DCT 1 (full, 16 words),
    // BC 612 (slot 100 of a later pass) nothing else, BC 300 empty everywhere
    for (int d = 0; d < ND; d++) begin
      int s, n;
      for (int k = 0; k < 2; k++) begin
        s = (k == 0) ? 100 : 101;
        n = 0;
        if (k == 0 && (d == 0 || d == 3)) n = 1 + d;
        if (k == 1 && d == 1) n = 16;
        cnt[d][s] = 5'(n);
        for (int w = 0; w < 16; w++) mem[d][s][w] = {4'h0, 28'($urandom)};
      end
    end
    // expected stream of the first five accepts
    for (int e = 0; e < 5; e++) begin
      int s, nw;
      s = bcs[e] % 512;
      nw = 1;
      exp_q.push_back({4'hE, 4'h0, 12'(e), 12'(bcs[e])});
      for (int d = 0; d < ND; d++) if (cnt[d][s] != 0) begin
        exp_q.push_back({4'hD, 6'(d), cnt[d][s] == 16, cnt[d][s], 16'h0});
        nw++;
        for (int w = 0; w < int'(cnt[d][s]); w++) begin
          exp_q.push_back(mem[d][s][w]);
          nw++;
        end
      end
      exp_q.push_back({4'hF, 8'h0, 20'(nw + 1)});
    end
    repeat (3) @(negedge clk);
    rst = 0;
    for (int e = 0; e < 6; e++) begin
      l0a_valid = 1; l0a_bcid = 12'(bcs[e]);
      @(negedge clk);
    end
    l0a_valid = 0;
    while (exp_q.size() != 0) @(negedge clk);
    repeat (20) @(negedge clk);
    checks++; if (l0a_drop_cnt != 1) begin failures++; $display("FAIL drops %0d", l0a_drop_cnt); end
    checks++; if (event_cnt != 5) begin failures++; $display("FAIL events %0d", event_cnt); end
    checks++; if (n_stall == 0) begin failures++; $display("FAIL no back-pressure seen"); end
    checks++; if (fx_valid) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

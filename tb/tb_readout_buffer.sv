// tb_readout_buffer: writes DCT frames for BCs 5..20 BCs in the past (across
// the orbit wrap) and reads every BC back: word count, words in arrival
// order (one-cycle read latency), overflow flag for a BC sent 18 frames
// (16 kept), and deletion of a BC's data exactly 400 BCs (10 us) after it.
module tb_readout_buffer;
  import sl_pkg::*;
  logic clk = 0, rst = 1;
  logic bc_strobe = 0;
  logic [BCID_W-1:0] bcid = 12'd3530;
  dct_frame_t frame = '0;
  logic [8:0] rd_slot = '0;
  logic [3:0] rd_word = '0;
  logic [4:0] rd_count;
  logic rd_ovf;
  logic [31:0] rd_data;
  logic [15:0] drop_cnt;
  int checks = 0, failures = 0;

  dct_frame_t ref_q [int][$];

  readout_buffer dut (.*);
  always #5 clk = ~clk;

  task automatic chk(input bit ok, input string msg);
    checks++;
    if (!ok) begin failures++; $display("FAIL: %s", msg); end
  endtask

  function automatic int bsub(input int now, input int age);
    return (now - age + 3564) % 3564;
  endfunction

  // one BC; with fill = 1 a random frame is sent in most cycles
  task automatic tick_bc(input bit fill, input int burst_bc);
    for (int ph = 0; ph < 8; ph++) begin
      int age, b;
      bc_strobe = (ph == 7);
      frame = '0;
      if (fill && !(burst_bc >= 0 && ph < 6) && ($urandom % 3) != 0) begin
        age = 5 + int'($urandom % 16);
        b = bsub(int'(bcid), age);
        if (ref_q[b].size() < 14) begin
          frame.hit = 1; frame.bcid = 10'(b); frame.chan = 9'($urandom % 288);
          frame.ftime = 8'($urandom);
          ref_q[b].push_back(frame);
        end
      end
      if (burst_bc >= 0 && ph < 6) begin   // 6 frames per BC into one BC
        frame.hit = 1; frame.bcid = 10'(burst_bc); frame.chan = 9'(ph); frame.ftime = 8'(ph);
        ref_q[burst_bc].push_back(frame);
      end
      @(negedge clk);
      if (ph == 7) bcid = (bcid == 12'd3563) ? '0 : bcid + 1'b1;
    end
    bc_strobe = 0;
    frame = '0;
  endtask

  task automatic check_bc(input int b);
    int n;
    n = ref_q.exists(b) ? ref_q[b].size() : 0;
    rd_slot = 9'(b % 512);
    rd_word = 0;
    @(negedge clk);
    chk(int'(rd_count) == (n > 16 ? 16 : n), $sformatf("count of BC %0d: %0d exp %0d", b, rd_count, n));
    chk(rd_ovf == (n > 16), "overflow flag");
    for (int w = 0; w < n && w < 16; w++) begin
      rd_word = 4'(w);
      @(negedge clk);
      chk(rd_data == {4'h0, ref_q[b][w]}, $sformatf("BC %0d word %0d got %h exp %h", b, w, rd_data, ref_q[b][w]));
    end
  endtask

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    int first;
    repeat (3) @(negedge clk);
    rst = 0;
    first = 3530;
    for (int i = 0; i < 50; i++)
      tick_bc(1, (i >= 20 && i < 23) ? bsub(int'(bcid), 10) - (i - 20) : -1);
    // burst BC: bcid at i=20 minus 10 received 6+6+6 = 18 burst frames (plus
    // random ones): at least two are dropped
    for (int k = 0; k < 40; k++) begin
      int b;
      b = (first + k) % 3564;
      if (ref_q.exists(b) && ref_q[b].size() > 16) chk(1'b1, "overflow case present");
      check_bc(b);
    end
    chk(drop_cnt >= 2, "dropped words counted");
    // deletion: BC 'first' is cleared by the strobe of BC first+400
    while (bcid != 12'((first + 400) % 3564)) tick_bc(0, -1);
    rd_slot = 9'(first % 512);
    #1;
    chk(rd_count != 0 || !ref_q.exists(first), "data kept for 400 BCs");
    tick_bc(0, -1);
    #1;
    chk(rd_count == 0, "data deleted after 400 BCs");
    rd_slot = 9'((first + 1) % 512);
    #1;
    chk(rd_count != 0 || !ref_q.exists(first + 1), "next BC still kept");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

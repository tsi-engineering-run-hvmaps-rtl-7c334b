// tb_readout_fsm: self-checking test of the RCU readout state machine.
// A behavioural EoC model in the test holds a queue of hit words: prio is
// "queue not empty", the front word is on rd_bus while rd_col is high and
// is removed when rd_col falls. The test checks
//  - Sync length ((resetckdivend+1) periods) and pd/ld_col/ld_pix lengths
//    for timerend = 0 and 1 (a period is 10 clk cycles times timerend+1),
//  - the frames pushed for LdCol2, LdPix2 with hits, RdCol2 and RdCol4 and
//    that hits are read in order and at most maxcycend per load cycle,
//  - at least 20 cycles between pushes,
//  - the send counter frame, and counting mode (no LdPix while hits wait).
module tb_readout_fsm;
  import hvmaps_pkg::*;
  logic clk = 0, rst_n = 0, ce;
  rcu_cfg_t cfg;
  logic prio;
  eoc_word_t rd_bus;
  logic [15:0] ts_bin;
  logic [7:0] ts_gray;
  logic pd, ld_col, ld_pix, rd_col, push;
  frame_t frame;
  int checks = 0, failures = 0;
  int cyc = 0;
  logic [3:0] c10 = 0;

  readout_fsm dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) begin cyc++; c10 <= (c10 == 9) ? 0 : c10 + 1; end
  assign ce = (c10 == 9);
  assign ts_bin = 16'(cyc * 3);
  assign ts_gray = 8'(cyc) ^ 8'(cyc >> 1);

  initial begin
    repeat (40000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // behavioural EoC buffers
  eoc_word_t q [$];
  logic rd_col_q = 0;
  assign prio = q.size() > 0;
  assign rd_bus = (rd_col && q.size() > 0) ? q[0] : '0;
  always @(posedge clk) begin
    rd_col_q <= rd_col;
    if (rd_col_q && !rd_col && q.size() > 0) void'(q.pop_front());
  end

  // pulse length monitor
  int pd_len, lc_len, lp_len, pd_start, lc_start, lp_start;
  int n_pd = 0, n_lc = 0, n_lp = 0, first_pd = -1;
  logic pd_q = 0, lc_q = 0, lp_q = 0;
  always @(posedge clk) if (rst_n) begin
    if (pd && !pd_q) begin pd_start = cyc; if (first_pd < 0) first_pd = cyc; end
    if (!pd && pd_q) begin pd_len = cyc - pd_start; n_pd++; end
    if (ld_col && !lc_q) lc_start = cyc;
    if (!ld_col && lc_q) begin lc_len = cyc - lc_start; n_lc++; end
    if (ld_pix && !lp_q) lp_start = cyc;
    if (!ld_pix && lp_q) begin lp_len = cyc - lp_start; n_lp++; end
    pd_q <= pd; lc_q <= ld_col; lp_q <= ld_pix;
  end

  // pushed frames
  frame_t fr [$];
  int last_push = -100;
  always @(posedge clk) if (rst_n && push) begin
    check(cyc - last_push >= 20, "pushes at least 20 cycles apart");
    last_push = cyc;
    fr.push_back(frame);
  end

  function automatic eoc_word_t mkhit(input int i);
    eoc_word_t w;
    w.col = 5'(i * 7);
    w.hit.row = 10'(i * 13 % 124);
    w.hit.ts  = 20'(i * 4099);
    w.hit.ts2 = 10'(i * 37);
    w.hit.ts3 = 7'(i * 5);
    return w;
  endfunction

  task automatic wait_lc_frames(input int n);
    int seen;
    seen = 0;
    while (seen < n) begin
      @(posedge clk);
      if (push && frame.comma == 4'b1010) seen++;
    end
    #1;
  endtask

  eoc_word_t h;
  int nhit_frames;
  initial begin
    cfg = '0;
    cfg.timerend = 0; cfg.slowdownend = 2; cfg.maxcycend = 3; cfg.resetckdivend = 4;
    repeat (3) @(negedge clk); rst_n = 1;
    wait_lc_frames(2);
    // Sync: 5 periods of 10 cycles before PD1 (first ce may come up to 10 cycles after reset)
    check(first_pd >= 44 && first_pd <= 56, $sformatf("Sync length (pd at %0d)", first_pd));
    check(pd_len == 10, "pd lasts one period");
    check(lc_len == 30, "ld_col lasts slowdownend+1 periods");
    check(lp_len == 10, "ld_pix lasts one period");
    check(fr.size() == 2 && fr[0] == '{data: {K28_0, D10_5, K28_0, D10_5}, comma: 4'b1010},
          $sformatf("LdCol2 frame and no other frame without hits (%0d frames)", fr.size()));
    fr.delete();
    // five hits: three in the first cycle, two in the next
    for (int i = 1; i <= 5; i++) q.push_back(mkhit(i));
    wait_lc_frames(1);   // LdCol2 of the cycle that sees the hits
    wait_lc_frames(2);
    nhit_frames = 0;
    for (int i = 0; i < fr.size(); i++) if (fr[i].comma == 4'b0000 && fr[i].data[31:24] == HDR_HIT) nhit_frames++;
    check(nhit_frames == 5, $sformatf("five hit frames (%0d)", nhit_frames));
    check(q.size() == 0, "all hits read");
    // frame order of the first loop with hits: LdCol2, LdPix2(C0), 3 x (C1, ts)
    begin
      int k; k = -1;
      while (k + 1 < fr.size() && !(fr[k+1].comma == 0 && fr[k+1].data[31:24] == HDR_COUNTER)) k++;
      check(fr[k+1].data[31:24] == HDR_COUNTER && fr[k+1].comma == 0, "LdPix2 counter frame");
      for (int i = 1; i <= 3; i++) begin
        h = mkhit(i);
        check(fr[k+2*i].data == {HDR_HIT, 2'd0, h.col, h.hit.row, h.hit.ts3}, $sformatf("RdCol2 frame hit %0d", i));
        check(fr[k+2*i+1].data == {2'd0, h.hit.ts, h.hit.ts2}, $sformatf("RdCol4 frame hit %0d", i));
      end
      check(fr[k+8].comma == 4'b1010, "maxcycend hits per cycle, then a new load");
    end
    // timerend = 1 doubles every state
    cfg.timerend = 1;
    wait_lc_frames(2);
    check(pd_len == 20 && lc_len == 60 && lp_len == 20, "timerend=1 doubles the periods");
    cfg.timerend = 0;
    // send counter
    fr.delete();
    cfg.sendcounter = 1;
    wait_lc_frames(3);
    begin
      bit found; found = 0;
      foreach (fr[i]) if (fr[i].comma == 4'b1000 && fr[i].data[31:24] == K28_1 && fr[i].data[7:0] == 0) found = 1;
      check(found, "send counter frame");
    end
    cfg.sendcounter = 0;
    // counting mode: with hits waiting, no LdPix
    cfg.countsheeps = 1;
    cfg.maxcycend = 1;
    wait_lc_frames(1);
    @(negedge ld_pix);
    @(posedge clk); #1;
    for (int i = 6; i <= 9; i++) q.push_back(mkhit(i));
    begin
      int lp0; lp0 = n_lp;
      while (q.size() > 0) @(posedge clk);
      check(n_lp == lp0, "counting mode: no LdPix while hits wait");
      wait_lc_frames(2);
      check(n_lp > lp0, "counting mode: LdPix once all are read");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

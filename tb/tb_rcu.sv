// tb_rcu: self-checking test of the readout control unit.
// The 57-bit configuration is shifted in through the chain (and checked on
// sout_config); a behavioural EoC model holds a queue of hit words. The
// serial output is cut into frames at frame_start and decoded with a table
// built from the encoder. Checks: decoded hit frames carry the queued hits in
// order; a C0 time stamp frame precedes each burst; hit frames of one burst
// follow each other every 40 clk_800p cycles (64 bits + coding in 50 ns at
// 1.6 Gbit/s) with the time stamp frame 20 cycles after the address frame;
// the send counter frame appears when enabled; clk_4n has a period of five
// clk_800p cycles; SRExtraBits reach cfg_extra; TS advances every
// ckdivend+1 tsck periods.
module tb_rcu;
  import hvmaps_pkg::*;
  logic clk_800p = 0, res_n = 0, sync_res = 1;
  logic ck1 = 0, ck2 = 0, cfg_ld = 0, rb = 0, sin = 0, sout_config;
  logic [15:0] cfg_extra;
  logic prio_from_det;
  eoc_word_t data_from_det;
  logic pull_dn, ld_col, ld_pix, rd_col;
  logic [TS_W-1:0] ts_to_det;
  logic [TS2_W-1:0] ts2_to_det;
  logic [TS3_W-1:0] ts3_to_det;
  logic [1:0] bit_data_out;
  logic frame_start, clk_4n;
  logic tsck;
  int checks = 0, failures = 0, cyc = 0;

  assign tsck = clk_800p;
  rcu dut (.*);
  always #5 clk_800p = ~clk_800p;
  always @(posedge clk_800p) cyc++;

  logic [9:0] lut [1024];
  logic lut_ready;
  dec_8b10b_lut u_lut (.lut(lut), .ready(lut_ready));

  initial begin
    repeat (30000) @(posedge clk_800p);
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
  assign prio_from_det = q.size() > 0;
  assign data_from_det = (rd_col && q.size() > 0) ? q[0] : '0;
  always @(posedge clk_800p) begin
    rd_col_q <= rd_col;
    if (rd_col_q && !rd_col && q.size() > 0) void'(q.pop_front());
  end

  // receiver
  typedef struct { logic [31:0] data; logic [3:0] k; logic ok; int cyc; } rxf_t;
  rxf_t rxq [$];
  logic [39:0] sh;
  int nb = -1, fcyc;
  always @(posedge clk_800p) if (res_n) begin
    #1;
    if (frame_start) begin nb = 0; fcyc = cyc; end
    if (nb >= 0) begin
      sh = {sh[37:0], bit_data_out}; nb += 2;
      if (nb == 40) begin
        rxf_t f;
        f.ok = 1; f.cyc = fcyc;
        for (int i = 0; i < 4; i++) begin
          logic [9:0] e;
          e = lut[sh[10*i +: 10]];
          f.ok &= e[9]; f.k[i] = e[8]; f.data[8*i +: 8] = e[7:0];
        end
        rxq.push_back(f);
        nb = -1;
      end
    end
  end

  function automatic eoc_word_t mkhit(input int i);
    eoc_word_t w;
    w.col = 5'(i * 7 + 1); w.hit.row = 10'(i * 13 % 124);
    w.hit.ts = 20'(i * 40961 + 3); w.hit.ts2 = 10'(i * 37); w.hit.ts3 = 7'(i * 5);
    return w;
  endfunction

  logic [56:0] cfgv;
  logic [56:0] outv;
  int n4_rise = 0, last4 = 0, per4 = 0;
  logic c4q = 0;
  always @(posedge clk_800p) begin
    if (clk_4n && !c4q) begin per4 = cyc - last4; last4 = cyc; n4_rise++; end
    c4q <= clk_4n;
  end

  initial begin
    cfgv = '0;
    cfgv[5:0] = 6'd1;        // ckdivend
    cfgv[15:12] = 4'd0;      // timerend
    cfgv[19:16] = 4'd7;      // slowdownend (recommended)
    cfgv[27:20] = 8'd2;      // maxcycend
    cfgv[31:28] = 4'd1;      // resetckdivend
    cfgv[32] = 1'b1;         // sendcounter
    cfgv[56:41] = 16'h0019;  // PLL enable, invert, TS clock = clk_800p
    wait (lut_ready);
    #5 rb = 1;
    for (int p = 56; p >= 0; p--) begin sin = cfgv[p]; #2 ck1 = 1; #2 ck1 = 0; #2 ck2 = 1; #2 ck2 = 0; #2; end
    #2 cfg_ld = 1; #2 cfg_ld = 0; #2;
    check(cfg_extra == 16'h0019, "SRExtraBits decoded");
    // shift once more: sout_config returns the configuration, QConfig[56] first
    for (int p = 0; p < 57; p++) begin outv[56-p] = sout_config; sin = 0; #2 ck1 = 1; #2 ck1 = 0; #2 ck2 = 1; #2 ck2 = 0; #2; end
    check(outv == cfgv, "configuration passes through to sout_config");
    check(cfg_extra == 16'h0019, "shifting does not disturb the loaded values");
    @(negedge clk_800p); res_n = 1;
    repeat (3) @(negedge clk_800p); sync_res = 0;
    begin
      logic [15:0] t0;
      repeat (5) @(posedge clk_800p);
      #1 t0 = dut.ts_bin;
      repeat (40) @(posedge clk_800p);
      #1 check(dut.ts_bin - t0 == 16'd20, "TS advances every ckdivend+1 = 2 tsck periods");
    end
    repeat (400) @(posedge clk_800p);
    for (int i = 1; i <= 5; i++) q.push_back(mkhit(i));
    repeat (2500) @(posedge clk_800p);
    check(q.size() == 0, "all hits taken");
    check(per4 == 5 && n4_rise > 100, "clk_4n is clk_800p / 5");
    // analyse frames
    begin
      int nh; bit sc; int hit_cyc [$]; bit c0_before;
      nh = 0; sc = 0; c0_before = 0;
      for (int i = 0; i < rxq.size(); i++) begin
        check(rxq[i].ok, $sformatf("frame %0d decodes", i));
        if (rxq[i].k == 4'b1000 && rxq[i].data[31:24] == K28_1) sc = 1;
        if (rxq[i].k == 0 && rxq[i].data[31:24] == HDR_COUNTER && nh == 0) c0_before = 1;
        if (rxq[i].k == 0 && rxq[i].data[31:24] == HDR_HIT) begin
          eoc_word_t h;
          nh++;
          h = mkhit(nh);
          check(rxq[i].data[23:0] == {2'd0, h.col, h.hit.row, h.hit.ts3}, $sformatf("hit %0d address frame", nh));
          check(i + 1 < rxq.size() && rxq[i+1].k == 0 && rxq[i+1].data == {2'd0, h.hit.ts, h.hit.ts2},
                $sformatf("hit %0d time stamp frame", nh));
          check(rxq[i+1].cyc - rxq[i].cyc == 20, "time stamp frame follows after 20 cycles");
          hit_cyc.push_back(rxq[i].cyc);
        end
      end
      check(nh == 5, $sformatf("five hits received (%0d)", nh));
      check(c0_before, "time stamp frame before the first hit");
      check(sc, "send counter frame");
      // hits 1,2 form one burst (maxcycend = 2)
      check(hit_cyc.size() >= 2 && hit_cyc[1] - hit_cyc[0] == 40, "one hit per 40 cycles (50 ns at 800 MHz)");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

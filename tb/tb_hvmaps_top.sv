// tb_hvmaps_top: end-to-end test of the chip's digital part with all 29
// columns and 16 rows per column (a full 124-row column is tested in tb_hv_column).
//
// The whole 992-bit configuration chain (RCU, DAC, 29 pixel registers) is
// shifted in and read back through cfg_sout. A first load writes the
// hit-buffer RAM of row 12 (masking the cell in column 5), a second load
// removes the write line. Hits are then applied as comparator pulses to
// random cells in two phases, and the serial line (data_out_p, sampled in
// both clock phases) is decoded. Every hit must come out exactly once with
// its column, row and the three time stamps that were on the time stamp bus
// at its edges; the masked cell must produce nothing.
//  Phase A: normal mode, maxcycend = 4, time stamp clock = clk_800p.
//  Phase B: reloaded chain: counting mode, send counter, maxcycend = 1,
//           time stamp clock = clk_4n.
// Mechanisms counted, each must occur: PullDN, LdCol, LdPix, RdCol pulses,
// two requests in one column (priority), a load refused by a full EoC
// buffer, a read cycle cut by maxcycend, the masked cell, hit bus activity,
// counting mode (LdCol straight to RdCol), the send counter frame and the
// time stamp clock switch. Rate: hit frames of a burst are 40 clk_800p
// cycles apart (one 64-bit hit per 50 ns at 800 MHz).
module tb_hvmaps_top;
  import hvmaps_pkg::*;
  localparam int NC = NCOL, NR = 16, PR = NR - NR/2;
  localparam int CHAIN = RCU_CFG_W + DAC_CFG_W + NC * PIX_CFG_W;

  logic clk_800p = 0, res_n = 0, sync_res = 1;
  logic cfg_ck1 = 0, cfg_ck2 = 0, cfg_ld = 0, cfg_rb = 0, cfg_sin = 0, cfg_sout;
  logic [NR-1:0] comp_in [NC];
  logic [1:0] bit_data_out;
  logic data_out_p, data_out_n, clk_4n;
  logic [3:0] pll_ctrl;
  logic [5:0] dac_ctrl;
  logic [DAC_W-1:0] dac [NDAC];
  logic [2:0] hb_tdac [NC][NR];
  logic [2:0] pix_tdac [NC][PR];
  logic [NR-1:0] inj_en [NC];
  logic [NC-1:0] ampout_en;
  logic hitbus;
  int checks = 0, failures = 0, cyc = 0;

  hvmaps_top #(.ROWS(NR)) dut (.*);
  always #5 clk_800p = ~clk_800p;
  always @(posedge clk_800p) cyc++;

  logic [9:0] lut [1024];
  logic lut_ready;
  dec_8b10b_lut u_lut (.lut(lut), .ready(lut_ready));

  initial begin
    repeat (60000) @(posedge clk_800p);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  // ------------------------------------------------------------ chain
  logic [CHAIN-1:0] chainv;
  task automatic shift_bit(input logic b);
    cfg_sin = b; #1 cfg_ck1 = 1; #1 cfg_ck1 = 0; #1 cfg_ck2 = 1; #1 cfg_ck2 = 0; #1;
  endtask
  task automatic load_chain();
    for (int p = CHAIN-1; p >= 0; p--) shift_bit(chainv[p]);
    #1 cfg_ld = 1; #1 cfg_ld = 0; #1;
  endtask
  function automatic int pix_pos(input int c, input int b);
    return RCU_CFG_W + DAC_CFG_W + PIX_CFG_W * c + b;
  endfunction
  localparam int REC [NDAC] = '{5,5,20,10,5,5,10,5,0,0,30,0,10,5,
                                16,16,32,32,32,32,32,32,32,32,16,0,16,
                                5,30,10,10,0,5,5};
  task automatic build_chain(input bit phase_b, input bit write_row12);
    chainv = '0;
    // RCU
    chainv[5:0]   = 0;                       // ckdivend
    chainv[11:6]  = 0;                       // ckdivend2
    chainv[15:12] = 0;                       // timerend
    chainv[19:16] = 7;                       // slowdownend
    chainv[27:20] = phase_b ? 8'd1 : 8'd4;   // maxcycend
    chainv[31:28] = 2;                       // resetckdivend
    chainv[32]    = phase_b;                 // sendcounter
    chainv[38:33] = 0;                       // ckdivend3
    chainv[40]    = phase_b;                 // countsheeps
    chainv[41+3]  = 1;                       // PLL enable
    chainv[41+4]  = !phase_b;                // TS clock: clk_800p in phase A
    // DAC: q00 q01 qon0..3 = 0 0 0 1 0 1, recommended codes
    chainv[RCU_CFG_W +: 6] = 6'b101000;
    for (int d = 0; d < NDAC; d++)
      for (int b = 0; b < 6; b++) chainv[RCU_CFG_W + 6 + 6*d + b] = REC[d][5-b];
    // pixel registers: hit bus enabled (bit 22 = 0), amp out in column 0
    chainv[pix_pos(0, 23)] = 1;
    if (write_row12) begin
      chainv[pix_pos(5, 3)] = 1;             // enB for column 5
      chainv[pix_pos(5, 0)] = 1;             // tune bits 101
      chainv[pix_pos(5, 2)] = 1;
      chainv[pix_pos(2, 5 + 2)] = 1;         // column 2 (even): row 10 + 2
    end
  endtask

  // ------------------------------------------------------------ receiver
  typedef struct { logic [31:0] data; logic [3:0] k; logic ok; int cyc; } rxf_t;
  rxf_t rxq [$];
  logic [39:0] sh;
  int nb = -1, fcyc;
  always @(posedge clk_800p) if (res_n) begin
    #2;
    if (dut.frame_start) begin nb = 0; fcyc = cyc; end
    if (nb >= 0) begin sh = {sh[38:0], data_out_p}; nb++; end
  end
  always @(negedge clk_800p) if (res_n) begin
    #2;
    if (nb >= 0) begin
      sh = {sh[38:0], data_out_p}; nb++;
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

  // ------------------------------------------------------------ hits
  typedef struct { int c; int r; logic [19:0] ts; logic [9:0] ts2; logic [6:0] ts3; bit found; } hit_t;
  hit_t hits [$];
  logic [19:0] cap_ts; logic [9:0] cap_ts2; logic [6:0] cap_ts3;
  // values on the time stamp bus as the cells see them at this edge
  always @(posedge clk_800p) begin
    cap_ts  = dut.ts; cap_ts2 = dut.ts2; cap_ts3 = dut.ts3;
  end

  int busy [NC][NR];
  task automatic apply_hit(input int c, input int r, input bit expect_out);
    hit_t h;
    @(negedge clk_800p);
    comp_in[c][r] = 1;
    @(posedge clk_800p); #1;
    h.c = c; h.r = r; h.ts = cap_ts; h.ts3 = cap_ts3; h.found = 0;
    repeat ($urandom_range(1, 6)) @(negedge clk_800p);
    comp_in[c][r] = 0;
    @(posedge clk_800p); #1;
    h.ts2 = cap_ts2;
    if (expect_out) hits.push_back(h);
  endtask

  // ------------------------------------------------------------ mechanisms
  int n_pd = 0, n_ldcol = 0, n_ldpix = 0, n_rdcol = 0, n_two_req = 0, n_refused = 0;
  int n_maxcyc = 0, n_masked = 0, n_hitbus = 0, n_countmode = 0, n_sendcnt = 0, n_tsclk = 0;
  logic pd_q = 0, lc_q = 0, lp_q = 0, rc_q = 0, hb_q = 0;
  int last_strobe = 0;   // 1: LdCol, 2: LdPix, 3: RdCol
  logic [NC-1:0] col_full, col_req, col_multi;
  for (genvar c = 0; c < NC; c++) begin : g_mon
    assign col_full[c]  = dut.g_col[c].u_col.eoc_full;
    assign col_req[c]   = dut.g_col[c].u_col.prio[0];
    logic [NR-1:0] h2;
    for (genvar r = 0; r < NR; r++) begin : g_r
      assign h2[r] = dut.g_col[c].u_col.g_row[r].u_hb.h2;
    end
    assign col_multi[c] = $countones(h2) > 1;
  end
  always @(posedge clk_800p) if (res_n) begin
    if (dut.pull_dn && !pd_q) begin
      n_pd++;
      if (dut.prio_from_det) n_maxcyc++;   // reading stopped with hits left
    end
    if (!dut.ld_col && lc_q) begin
      n_ldcol++;
      if (|(col_full & col_req)) n_refused++;
      last_strobe = 1;
    end
    if (dut.ld_col && !lc_q && |col_multi) n_two_req++;
    if (dut.ld_pix && !lp_q) begin n_ldpix++; last_strobe = 2; end
    if (dut.rd_col && !rc_q) begin
      n_rdcol++;
      if (last_strobe == 1) n_countmode++;   // LdCol straight to RdCol
      last_strobe = 3;
    end
    if (hitbus && !hb_q) n_hitbus++;
    pd_q <= dut.pull_dn; lc_q <= dut.ld_col; lp_q <= dut.ld_pix; rc_q <= dut.rd_col; hb_q <= hitbus;
  end

  // ------------------------------------------------------------ checking
  task automatic match_hits(input string tag, input int from);
    int burst_ok, burst_pairs;
    burst_ok = 0; burst_pairs = 0;
    for (int i = from; i < rxq.size(); i++) begin
      check(rxq[i].ok, $sformatf("%s frame %0d decodes", tag, i));
      if (rxq[i].k == 4'b1000 && rxq[i].data[31:24] == K28_1) n_sendcnt++;
      if (rxq[i].k == 0 && rxq[i].data[31:24] == HDR_HIT && i + 1 < rxq.size()) begin
        int c, r, idx;
        logic [6:0] t3;
        c = int'(rxq[i].data[21:17]); r = int'(rxq[i].data[16:7]); t3 = rxq[i].data[6:0];
        idx = -1;
        foreach (hits[j]) if (idx < 0 && hits[j].c == c && hits[j].r == r && !hits[j].found) idx = j;
        check(idx >= 0, $sformatf("%s: hit at column %0d row %0d was applied", tag, c, r));
        if (idx >= 0) begin
          hits[idx].found = 1;
          check(t3 == hits[idx].ts3, $sformatf("%s: TS3 of %0d/%0d", tag, c, r));
          check(rxq[i+1].data == {2'd0, hits[idx].ts, hits[idx].ts2},
                $sformatf("%s: TS/TS2 of %0d/%0d got %h exp %h", tag, c, r, rxq[i+1].data[29:0],
                          {hits[idx].ts, hits[idx].ts2}));
        end
        if (i >= 2 && rxq[i-2].k == 0 && rxq[i-2].data[31:24] == HDR_HIT) begin
          burst_pairs++;
          if (rxq[i].cyc - rxq[i-2].cyc == 40) burst_ok++;
        end
      end
    end
    foreach (hits[j]) check(hits[j].found, $sformatf("%s: hit %0d/%0d read out", tag, hits[j].c, hits[j].r));
    if (burst_pairs > 0) check(burst_ok == burst_pairs, $sformatf("%s: 40 cycles per hit in bursts", tag));
  endtask

  initial begin
    for (int c = 0; c < NC; c++) comp_in[c] = '0;
    wait (lut_ready);
    #3 cfg_rb = 1;
    // ---- configuration, with the row-12 RAM write
    build_chain(0, 1);
    load_chain();
    @(negedge clk_800p); res_n = 1;
    repeat (4) @(negedge clk_800p);
    check(hb_tdac[5][12] == 3'b101 && hb_tdac[4][12] == 3'b000 && hb_tdac[5][11] == 3'b000,
          "hit-buffer RAM of row 12 written from the column registers");
    build_chain(0, 0);
    load_chain();
    // read the chain back through cfg_sout
    begin
      logic [CHAIN-1:0] back;
      for (int p = 0; p < CHAIN; p++) begin back[CHAIN-1-p] = cfg_sout; shift_bit(chainv[CHAIN-1-p]); end
      check(back == chainv, "992-bit chain reads back through cfg_sout");
    end
    check(dac[2] == 6'd20 && dac[33] == 6'd5 && dac_ctrl == 6'b101000, "DAC codes loaded");
    check(pll_ctrl == 4'b1000 && ampout_en == 29'd1, "PLL controls and amp out enable");
    repeat (3) @(negedge clk_800p); sync_res = 0;
    repeat (200) @(negedge clk_800p);

    // ---- phase A
    apply_hit(5, 12, 0); n_masked++;           // masked cell: must not appear
    for (int w = 0; w < 3; w++) begin
      apply_hit(7, NR - 3, 1); apply_hit(7, 2, 1);  // two in one column
      for (int n = 0; n < 10; n++) begin
        int c, r;
        c = $urandom_range(0, NC-1); r = $urandom_range(0, NR-1);
        if ((c == 5 && r == 12) || c == 7) continue;
        apply_hit(c, r, 1);
        repeat ($urandom_range(0, 30)) @(negedge clk_800p);
      end
      repeat (1500) @(negedge clk_800p);
    end
    repeat (3000) @(negedge clk_800p);
    check(!dut.prio_from_det, "phase A: EoC buffers empty");
    match_hits("A", 0);
    begin
      int from_b;
      from_b = rxq.size();
      hits.delete();
      // ---- phase B: counting mode, send counter, maxcycend = 1, TS on clk_4n
      build_chain(1, 0);
      @(negedge clk_800p); sync_res = 1;
      load_chain();
      repeat (20) @(negedge clk_800p); sync_res = 0;
      begin
        logic [15:0] t0;
        repeat (10) @(posedge clk_800p);
        t0 = dut.u_rcu.ts_bin;
        repeat (100) @(posedge clk_800p);
        check(dut.u_rcu.ts_bin - t0 == 16'd20, "TS on clk_4n: one count per 5 clk_800p cycles");
        n_tsclk++;
      end
      for (int n = 0; n < 12; n++) begin
        apply_hit(n % 3 + 10, (5 * n + 1) % NR, 1);
      end
      repeat (6000) @(negedge clk_800p);
      check(!dut.prio_from_det, "phase B: EoC buffers empty");
      match_hits("B", from_b);
    end
    check(n_pd > 0,        "mechanism: PullDN");
    check(n_ldcol > 0,     "mechanism: LdCol");
    check(n_ldpix > 0,     "mechanism: LdPix");
    check(n_rdcol > 0,     "mechanism: RdCol");
    check(n_two_req > 0,   "mechanism: two requests in one column");
    check(n_refused > 0,   "mechanism: load refused by a full EoC buffer");
    check(n_maxcyc > 0,    "mechanism: reading cut by maxcycend");
    check(n_masked > 0,    "mechanism: masked cell");
    check(n_hitbus > 0,    "mechanism: hit bus");
    check(n_countmode > 0, "mechanism: counting mode");
    check(n_sendcnt > 0,   "mechanism: send counter frame");
    check(n_tsclk > 0,     "mechanism: time stamp clock switch");
    $display("mechanisms: pd=%0d ldcol=%0d ldpix=%0d rdcol=%0d two_req=%0d refused=%0d maxcyc=%0d masked=%0d hitbus=%0d countmode=%0d sendcnt=%0d tsclk=%0d",
             n_pd, n_ldcol, n_ldpix, n_rdcol, n_two_req, n_refused, n_maxcyc, n_masked, n_hitbus, n_countmode, n_sendcnt, n_tsclk);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

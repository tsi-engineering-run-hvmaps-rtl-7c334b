// tb_hv_column: self-checking test of one full-size column (124 rows) at an
// odd column address (3), so that the descending line order is exercised.
//  - configuration: 25 bits shifted in; checks the write/injection line
//    order, amp out enable, injection enables and the hit bus enable;
//  - hit-buffer RAM and in-pixel RAM writes through the row-wide lines;
//    a masked cell produces no hit;
//  - readout: hits in rows 10, 90 and 40 with distinct time stamps come out
//    of the EoC buffer highest row first, one per pd/ld_col/rd_col round,
//    with the right stamps and column address; a second ld_col into a full
//    EoC buffer moves nothing and deletes nothing.
module tb_hv_column;
  import hvmaps_pkg::*;
  localparam int ROWS = NROW;
  localparam int PR = ROWS - ROWS/2;
  logic clk = 0, rst_n = 0;
  logic [ROWS-1:0] comp_in = '0;
  logic [TS_W-1:0] ts_in = 0;
  logic [TS2_W-1:0] ts2_in = 0;
  logic [TS3_W-1:0] ts3_in = 0;
  logic pd = 0, ld_pix = 0, ld_col = 0, rd_col = 0, prio_in = 0;
  logic prio_out;
  eoc_word_t rd_bus;
  logic ck1 = 0, ck2 = 0, cfg_ld = 0, rb = 0, sin = 0, sout;
  logic [HB_WR_PER_COL-1:0] hb_wr_lines;
  logic [PIX_WR_PER_COL-1:0] pix_wr_lines;
  logic [INJ_PER_COL-1:0] inj_lines;
  logic [ROWS-1:0] hb_wr_row = '0;
  logic [3*PR-1:0] pix_wr = '0;
  logic [ROWS-1:0] inj_row = '0;
  logic [2:0] hb_tdac [ROWS];
  logic [2:0] pix_tdac [PR];
  logic [ROWS-1:0] inj_en;
  logic ampout_en, hitbus;
  int checks = 0, failures = 0;

  hv_column #(.COL(3), .ROWS(ROWS)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic load_cfg(input logic [24:0] v);
    for (int p = 24; p >= 0; p--) begin
      sin = v[p]; #2 ck1 = 1; #2 ck1 = 0; #2 ck2 = 1; #2 ck2 = 0; #2;
    end
    #2 cfg_ld = 1; #2 cfg_ld = 0; #2;
  endtask
  task automatic hit(input int row, input int t);
    @(negedge clk);
    ts_in = 20'(t * 1000 + 7); ts3_in = 7'(t * 3 + 1);
    comp_in[row] = 1;
    repeat (3) @(negedge clk);
    ts2_in = 10'(t * 11 + 2);
    comp_in[row] = 0;
    repeat (2) @(negedge clk);
  endtask
  task automatic pulse(ref logic s, input int n);
    @(negedge clk); s = 1; repeat (n) @(negedge clk); s = 0; @(negedge clk);
  endtask
  task automatic read_expect(input int row, input int t, input string tag);
    pulse(pd, 2);
    pulse(ld_col, 4);
    @(negedge clk);
    check(prio_out == 1, {tag, ": EoC holds a hit"});
    rd_col = 1; #1;
    check(rd_bus.col == 5'd3 && rd_bus.hit.row == 10'(row), $sformatf("%s: row %0d (got %0d)", tag, row, rd_bus.hit.row));
    check(rd_bus.hit.ts == 20'(t * 1000 + 7) && rd_bus.hit.ts3 == 7'(t * 3 + 1) &&
          rd_bus.hit.ts2 == 10'(t * 11 + 2), {tag, ": time stamps"});
    @(negedge clk); rd_col = 0; @(negedge clk);
    check(prio_out == 0, {tag, ": EoC empty after rd_col"});
  endtask

  initial begin
    repeat (2) @(negedge clk); rst_n = 1; rb = 1;
    // q[3:0] = 1011, q[4] = 1, q[9:5] = 11001, q[16:10] = 1000000, q[21:17] = 00011, q[24:22] = 110
    load_cfg(25'b1_1_0_00011_1000000_11001_1_1011);
    check(hb_wr_lines == 5'b10011, "odd column: hit-buffer write lines descending");
    check(pix_wr_lines == 7'b0000001, "odd column: pixel write lines descending");
    check(inj_lines == 5'b11000, "odd column: injection lines descending");
    check(ampout_en == 1, "amp out enable");
    inj_row[17] = 1; #1;
    check(inj_en[17] == 1 && $countones(inj_en) == 1, "injection enable = row line and column bit");
    // RAM write: {enB, tune} = 1011 into row 50
    @(negedge clk); hb_wr_row[50] = 1; @(negedge clk); hb_wr_row[50] = 0;
    check(hb_tdac[50] == 3'b011 && hb_tdac[49] == 3'b000, "hit-buffer RAM written in row 50 only");
    @(negedge clk); pix_wr[3*5+1] = 1; @(negedge clk); pix_wr[3*5+1] = 0;
    check(pix_tdac[5] == 3'b010, "in-pixel RAM bit 1 of row 67 written");
    // hit bus
    comp_in[7] = 1; #1;
    check(hitbus == 1, "hit bus on");
    comp_in[7] = 0; comp_in[50] = 1; #1;
    check(hitbus == 0, "masked cell stays off the hit bus");
    comp_in[50] = 0;
    @(negedge clk);
    // hits
    hit(10, 1); hit(90, 2); hit(40, 3); hit(50, 4);
    pulse(ld_pix, 1);
    read_expect(90, 2, "first");
    // EoC full: second load must not move or delete anything
    pulse(pd, 1); pulse(ld_col, 2);
    check(prio_out == 1, "refill refused while full");
    read_expect(40, 3, "second");
    // a hit after ld_pix is not read before the next ld_pix
    hit(100, 5);
    read_expect(10, 1, "third");
    pulse(pd, 1); pulse(ld_col, 2); @(negedge clk);
    check(prio_out == 0, "nothing left before the next ld_pix");
    pulse(ld_pix, 1);
    read_expect(100, 5, "fourth");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

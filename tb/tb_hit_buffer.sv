// tb_hit_buffer: self-checking test of one hit-buffer cell (row 77).
// A comparator pulse is applied while the time stamp inputs count; the test
// checks that the leading edge stores TS and TS3, the trailing edge TS2, that
// nothing is granted before ld_pix, that the word appears on the bus only
// during ld_col and without a request from above, that clr deletes the hit,
// that a second pulse while busy is ignored, and that the RAM's enB bit
// masks the comparator and its tune bits reach tdac.
module tb_hit_buffer;
  import hvmaps_pkg::*;
  logic clk = 0, rst_n = 0;
  logic comp_in = 0, ld_pix = 0, ld_col = 0, clr = 0, prio_in = 0, ram_wr = 0;
  logic [3:0] ram_in = 0;
  logic [TS_W-1:0] ts_in = 0;
  logic [TS2_W-1:0] ts2_in = 0;
  logic [TS3_W-1:0] ts3_in = 0;
  logic prio_out, grant, hit_or;
  logic [2:0] tdac;
  hit_word_t bus_out;
  int checks = 0, failures = 0;
  int cyc = 0;

  hit_buffer #(.ROW(77)) dut (.*);

  always #5 clk = ~clk;
  always @(posedge clk) begin
    cyc++;
    ts_in  <= ts_in + 1;
    ts2_in <= ts2_in + 3;
    ts3_in <= ts3_in + 5;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s (cycle %0d)", msg, cyc); end
  endtask

  logic [TS_W-1:0] e_ts; logic [TS2_W-1:0] e_ts2; logic [TS3_W-1:0] e_ts3;

  initial begin
    repeat (3) @(posedge clk);
    rst_n = 1;
    repeat (3) @(posedge clk);
    // hit: rising edge
    @(negedge clk) comp_in = 1;
    @(posedge clk); #1;   // sampled here: values of this edge were stored
    @(negedge clk);
    // the cell stores the stamps present at the edge where it saw comp_in=1
    repeat (4) @(negedge clk);
    comp_in = 0;
    repeat (3) @(negedge clk);
    check(grant == 0 && prio_out == 0, "no request before ld_pix");
    ld_pix = 1; @(negedge clk); ld_pix = 0;
    check(grant == 1 && prio_out == 1, "request after ld_pix");
    check(bus_out == '0, "bus idle without ld_col");
    prio_in = 1; #1;
    check(grant == 0 && prio_out == 1, "no grant with request above");
    prio_in = 0;
    ld_col = 1; #1;
    check(bus_out.row == 10'd77, "row address ROM");
    check(bus_out.ts == e_ts && bus_out.ts3 == e_ts3, "leading-edge stamps TS, TS3");
    check(bus_out.ts2 == e_ts2, "trailing-edge stamp TS2");
    @(negedge clk);
    // second pulse while busy: ignored
    comp_in = 1; repeat (2) @(negedge clk); comp_in = 0; repeat (2) @(negedge clk);
    check(bus_out.ts == e_ts, "busy cell keeps its first hit");
    ld_col = 0; clr = 1; @(negedge clk); clr = 0; #1;
    check(grant == 0 && prio_out == 0, "clr deletes the hit");
    ld_pix = 1; @(negedge clk); ld_pix = 0; #1;
    check(grant == 0, "no hit left after clr");
    // masking through the RAM
    ram_in = 4'b1101; ram_wr = 1; @(negedge clk); ram_wr = 0; #1;
    check(tdac == 3'b101, "tune bits written");
    comp_in = 1; #1;
    check(hit_or == 0, "hit bus masked by enB");
    repeat (2) @(negedge clk); comp_in = 0; repeat (2) @(negedge clk);
    ld_pix = 1; @(negedge clk); ld_pix = 0; #1;
    check(grant == 0, "masked cell takes no hit");
    ram_in = 4'b0010; ram_wr = 1; @(negedge clk); ram_wr = 0;
    comp_in = 1; #1;
    check(hit_or == 1, "hit bus after unmask");
    @(negedge clk); comp_in = 0; @(negedge clk);
    ld_pix = 1; @(negedge clk); ld_pix = 0; #1;
    check(grant == 1, "unmasked cell takes a hit");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  // reference: record the stamps at the clock edges where the cell sees the edges
  logic comp_seen = 0;
  bit   got_rise = 0, got_fall = 0;
  always @(posedge clk) if (rst_n) begin
    if (comp_in && !comp_seen && !got_rise) begin e_ts <= ts_in; e_ts3 <= ts3_in; got_rise = 1; end
    if (!comp_in && comp_seen && got_rise && !got_fall) begin e_ts2 <= ts2_in; got_fall = 1; end
    comp_seen <= comp_in;
  end
endmodule

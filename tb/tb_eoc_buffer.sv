// tb_eoc_buffer: self-checking test of the end-of-column buffer (column 19).
// Loads a word, checks the full flag and scan-out chain, that the word with
// its column address is driven only during rd_col and only without a full
// buffer earlier in the chain, that the falling edge of rd_col empties the
// buffer, and that a load into a full buffer is refused.
module tb_eoc_buffer;
  import hvmaps_pkg::*;
  logic clk = 0, rst_n = 0;
  hit_word_t col_bus = '0;
  logic load = 0, rd_col = 0, prio_in = 0;
  logic prio_out, full;
  eoc_word_t rd_bus;
  int checks = 0, failures = 0;

  eoc_buffer #(.COL(19)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (1000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  hit_word_t w1, w2;
  initial begin
    w1 = '{ts: 20'hABCDE, ts2: 10'h155, ts3: 7'h2A, row: 10'd99};
    w2 = '{ts: 20'h12345, ts2: 10'h0F0, ts3: 7'h11, row: 10'd3};
    repeat (2) @(negedge clk); rst_n = 1; @(negedge clk);
    check(!full && !prio_out, "empty after reset");
    col_bus = w1; load = 1; @(negedge clk); load = 0; col_bus = '0;
    check(full && prio_out, "full after load");
    check(rd_bus == '0, "no drive without rd_col");
    col_bus = w2; load = 1; @(negedge clk); load = 0; col_bus = '0;
    prio_in = 1; rd_col = 1; #1;
    check(rd_bus == '0, "no drive with a full buffer earlier in the chain");
    check(prio_out, "scan out passes the chain");
    @(negedge clk); rd_col = 0; @(negedge clk);
    check(full, "not granted, not cleared");
    prio_in = 0; rd_col = 1; #1;
    check(rd_bus.col == 5'd19 && rd_bus.hit == w1, "word and column address (load into full buffer refused)");
    @(negedge clk); rd_col = 0; @(negedge clk);
    check(!full && !prio_out, "rd_col falling edge empties the buffer");
    rd_col = 1; #1;
    check(rd_bus == '0, "empty buffer does not drive");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_ts_counters: self-checking test of the time stamp counters with the
// dividers ckdivend=2, ckdivend2=0, ckdivend3=1. A reference model counts
// tsck edges since sync_res; the test checks the binary TS value, the Gray
// code of both 10-bit halves (upper half equal to the lower one after the
// falling edge), TS2 and TS3 rates, single-bit Gray steps, and that
// sync_res restarts everything.
module tb_ts_counters;
  import hvmaps_pkg::*;
  logic tsck = 0, sync_res = 1;
  logic [5:0] ckdivend = 2, ckdivend2 = 0, ckdivend3 = 1;
  logic [15:0] ts_bin;
  logic [TS_W-1:0] ts_to_det;
  logic [TS2_W-1:0] ts2_to_det;
  logic [TS3_W-1:0] ts3_to_det;
  int checks = 0, failures = 0;
  int n;            // rising edges since sync_res released
  logic [9:0] prev_lo;

  ts_counters dut (.*);
  always #5 tsck = ~tsck;

  initial begin
    #50000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s n=%0d", msg, n); end
  endtask
  function automatic logic [9:0] g(input int v);
    logic [9:0] b; b = 10'(v); return b ^ (b >> 1);
  endfunction

  initial begin
    repeat (3) @(posedge tsck);
    @(negedge tsck) sync_res = 0;
    n = 0; prev_lo = 0;
    repeat (700) begin
      @(posedge tsck); n++;
      #1;
      check(ts_bin == 16'(n / 3), "TS binary");
      // Gray output lags the binary counter by one edge
      check(ts_to_det[9:0] == g((n-1) / 3), "TS Gray low half");
      check(ts2_to_det == g(n - 1), "TS2 Gray");
      check(ts3_to_det == 7'(g(((n-1) / 2) % 128)), "TS3 Gray");
      check($countones(ts_to_det[9:0] ^ prev_lo) <= 1, "single-bit Gray step");
      prev_lo = ts_to_det[9:0];
      @(negedge tsck); #1;
      check(ts_to_det[19:10] == ts_to_det[9:0], "upper half follows on falling edge");
    end
    @(negedge tsck) sync_res = 1;
    @(posedge tsck); #1;
    check(ts_bin == 0 && ts_to_det[9:0] == 0 && ts2_to_det == 0, "sync_res clears");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

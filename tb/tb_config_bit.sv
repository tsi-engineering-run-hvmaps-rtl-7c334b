// tb_config_bit: self-checking test of one configuration bit: a ck1/ck2
// pair moves sin to sout, q changes only on ld, and rb clears q.
module tb_config_bit;
  logic ck1 = 0, ck2 = 0, ld = 0, rb = 0, sin = 0;
  logic sout, q;
  int checks = 0, failures = 0;
  config_bit dut (.*);

  initial begin
    #10000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic check(input bit cond, input string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask
  task automatic shift(input logic b);
    sin = b; #5 ck1 = 1; #5 ck1 = 0; #5 ck2 = 1; #5 ck2 = 0; #5;
  endtask
  task automatic load();
    #5 ld = 1; #5 ld = 0; #5;
  endtask

  initial begin
    #5 rb = 1;
    check(q == 0, "q cleared by rb");
    shift(1);
    check(sout == 1, "shift moves 1 to sout");
    check(q == 0, "q unchanged without ld");
    load();
    check(q == 1, "ld copies the shifted value");
    sin = 0; #5 ck1 = 1; #5 ck1 = 0; #5;
    check(sout == 1, "ck1 alone does not change sout");
    #5 ck2 = 1; #5 ck2 = 0; #5;
    check(sout == 0 && q == 1, "ck2 completes the shift; q holds");
    rb = 0; #5;
    check(q == 0, "rb clears q");
    rb = 1; shift(1); load();
    check(q == 1, "load after reset");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_config_chain: self-checking test of a 57-bit configuration chain.
// Shifts a random pattern in, loads it, and checks every q bit (the bit
// shifted in last sits in q[0]), then checks that shifting a second pattern
// pushes the first one out of sout in order.
module tb_config_chain;
  localparam int N = 57;
  logic ck1 = 0, ck2 = 0, ld = 0, rb = 0, sin = 0;
  logic sout;
  logic [N-1:0] q;
  logic [N-1:0] pat, pat2, outbits;
  int checks = 0, failures = 0;
  config_chain #(.N(N)) dut (.*);

  initial begin
    #100000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic shift(input logic b);
    sin = b; #5 ck1 = 1; #5 ck1 = 0; #5 ck2 = 1; #5 ck2 = 0; #5;
  endtask

  initial begin
    pat  = {$urandom, $urandom};
    pat2 = {$urandom, $urandom};
    #5 rb = 1;
    // shift pat[N-1] first, so that pat[i] ends in q[i]
    for (int i = N-1; i >= 0; i--) shift(pat[i]);
    #5 ld = 1; #5 ld = 0; #5;
    for (int i = 0; i < N; i++) begin
      checks++;
      if (q[i] !== pat[i]) begin failures++; $display("FAIL q[%0d]", i); end
    end
    for (int i = N-1; i >= 0; i--) begin
      outbits[N-1-i] = sout;   // sout shows the last bit position first
      shift(pat2[i]);
    end
    checks++;
    if (outbits !== {<<{pat}}) begin
      // outbits[j] = bit leaving j-th = q position N-1-j
      failures++; $display("FAIL sout order %h", outbits);
    end
    checks++;
    if (q !== pat) begin failures++; $display("FAIL q changed without ld"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dac_register: self-checking test of the bias DAC register. Random
// control bits and 34 random 6-bit codes are placed in chain order (controls
// first, each code MSB first), shifted in and loaded; every code and the
// control bits are compared with what was sent. The recommended settings
// (IBLRes 5, VN 20, INFB 10, ...) are then loaded the same way.
module tb_dac_register;
  import hvmaps_pkg::*;
  localparam int N = DAC_CFG_W;
  logic ck1 = 0, ck2 = 0, cfg_ld = 0, rb = 0, sin = 0;
  logic sout;
  logic [5:0] ctrl;
  logic [DAC_W-1:0] dac [NDAC];
  int checks = 0, failures = 0;
  dac_register dut (.*);

  initial begin
    #1000000; failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
  task automatic shift(input logic b);
    sin = b; #5 ck1 = 1; #5 ck1 = 0; #5 ck2 = 1; #5 ck2 = 0; #5;
  endtask

  logic [5:0] e_ctrl;
  logic [5:0] e_dac [NDAC];
  logic [N-1:0] v;

  task automatic load_and_check();
    v[5:0] = e_ctrl;
    for (int d = 0; d < NDAC; d++)
      for (int b = 0; b < 6; b++) v[6 + 6*d + b] = e_dac[d][5-b];
    for (int p = N-1; p >= 0; p--) shift(v[p]);
    #5 cfg_ld = 1; #5 cfg_ld = 0; #5;
    checks++;
    if (ctrl !== e_ctrl) begin failures++; $display("FAIL ctrl"); end
    for (int d = 0; d < NDAC; d++) begin
      checks++;
      if (dac[d] !== e_dac[d]) begin failures++; $display("FAIL dac %0d: %0d vs %0d", d, dac[d], e_dac[d]); end
    end
  endtask

  // recommended values in chain order: anadac0..13, digdac0..12, anadac14..20
  localparam int REC [NDAC] = '{5,5,20,10,5,5,10,5,0,0,30,0,10,5,
                                16,16,32,32,32,32,32,32,32,32,16,0,16,
                                5,30,10,10,0,5,5};
  initial begin
    #5 rb = 1;
    e_ctrl = 6'($urandom);
    for (int d = 0; d < NDAC; d++) e_dac[d] = 6'($urandom);
    load_and_check();
    e_ctrl = 6'b101000;  // q00=0, q01=0, qon0=0, qon1=1, qon2=0, qon3=1
    for (int d = 0; d < NDAC; d++) e_dac[d] = 6'(REC[d]);
    load_and_check();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

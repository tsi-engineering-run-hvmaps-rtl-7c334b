// dac_register: configuration register of the bias DAC block.
//
// Second part of the configuration chain (after the RCU register). Chain
// order from its input: six control bits q00, q01, qon0..qon3, then 34 six-bit
// DAC codes, each entered MSB first (sin -> DAC5 ... DAC0 -> sout). The codes
// come in the order anadac0..13, digdac0..12, anadac14..20; dac[i] is the i-th
// code in that order. The codes drive analog current and voltage DACs, which
// are outside this RTL. Layout and order follow the chip description.
module dac_register
  import hvmaps_pkg::*;
(
  input  logic             ck1,
  input  logic             ck2,
  input  logic             cfg_ld,
  input  logic             rb,
  input  logic             sin,
  output logic             sout,
  output logic [5:0]       ctrl,         // {qon3, qon2, qon1, qon0, q01, q00}
  output logic [DAC_W-1:0] dac [NDAC]
);
  logic [DAC_CFG_W-1:0] q;

  config_chain #(.N(DAC_CFG_W)) u_cfg (
    .ck1 (ck1), .ck2 (ck2), .ld (cfg_ld), .rb (rb),
    .sin (sin), .sout (sout), .q (q)
  );

  assign ctrl = q[5:0];

  always_comb begin
    for (int d = 0; d < NDAC; d++)
      for (int b = 0; b < DAC_W; b++)
        dac[d][DAC_W-1-b] = q[6 + DAC_W*d + b];
  end
endmodule

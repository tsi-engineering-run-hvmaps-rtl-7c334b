// config_chain: N configuration bits in series, sin -> bit 0 -> ... -> bit
// N-1 -> sout. The bit shifted in last ends in position 0. All bits share
// ck1/ck2 (two-phase shift), ld (parallel load of q) and rb (clear of q).
// The chip joins three such parts (RCU register, DAC register, pixel
// register) into one long chain; each part instantiates this module.
module config_chain #(
  parameter int unsigned N = 57
) (
  input  logic         ck1,
  input  logic         ck2,
  input  logic         ld,
  input  logic         rb,
  input  logic         sin,
  output logic         sout,
  output logic [N-1:0] q
);
  logic [N:0] link;
  assign link[0] = sin;

  for (genvar i = 0; i < N; i++) begin : g_bit
    config_bit u_bit (
      .ck1 (ck1), .ck2 (ck2), .ld (ld), .rb (rb),
      .sin (link[i]), .sout (link[i+1]), .q (q[i])
    );
  end

  assign sout = link[N];
endmodule

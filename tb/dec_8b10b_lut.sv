// dec_8b10b_lut: test helper that builds a 10b -> 8b decode table by
// running every byte, K flag and disparity through an 8b/10b encoder at the
// start of simulation. lut[code] = {valid, k, byte}; ready rises when done.
// Codes that no input produces stay invalid.
module dec_8b10b_lut (
  output logic [9:0] lut [1024],
  output logic       ready
);
  logic [7:0] din;
  logic       k, rd_in, rd_out;
  logic [9:0] code;
  enc_8b10b u_enc (.din(din), .k(k), .rd_in(rd_in), .code(code), .rd_out(rd_out));

  initial begin
    ready = 0;
    for (int i = 0; i < 1024; i++) lut[i] = '0;
    for (int kk = 0; kk < 2; kk++)
      for (int rd = 0; rd < 2; rd++)
        for (int b = 0; b < 256; b++) begin
          din = 8'(b); k = kk[0]; rd_in = rd[0];
          #0.001;
          // a K byte that is not a valid K code comes out as data: keep data
          if (!(kk == 1 && lut[code][9] && !lut[code][8])) lut[code] = {1'b1, kk[0], 8'(b)};
        end
    ready = 1;
  end
endmodule

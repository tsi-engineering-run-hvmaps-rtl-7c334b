// enc_8b10b: combinational 8b/10b encoder with running disparity.
//
// The byte HGF EDCBA is coded as a 6-bit block abcdei (from EDCBA) and a
// 4-bit block fghj (from HGF). Each table entry below is the code used when
// the running disparity before that block is negative; an unbalanced block,
// and the balanced-but-alternating codes D.07 and D.x.3, are inverted when it
// is positive. D.x.7 uses the alternate code A7 where P7 would give a run of
// five equal bits. With k set, K28.y is sent (its 10 bits are inverted as a
// whole at positive disparity) and K23.7, K27.7, K29.7, K30.7 use the data
// 6-bit code with A7; other bytes with k set are sent as data.
// code[9] is bit a, the first bit on the line. rd_in/rd_out: 0 = negative,
// 1 = positive running disparity; rd_out flips when the code is unbalanced.
// The chip uses a custom 8b/10b encoder whose insides are not described;
// this is the standard code, which the comma words it sends presuppose.
module enc_8b10b (
  input  logic [7:0] din,
  input  logic       k,
  input  logic       rd_in,
  output logic [9:0] code,
  output logic       rd_out
);
  logic [5:0] t6;     // abcdei for negative disparity
  logic       alt6;   // block inverts at positive disparity
  logic [3:0] t4;
  logic       alt4;
  logic       rd_mid;
  logic [5:0] c6;
  logic [3:0] c4;
  logic [4:0] x;
  logic [2:0] y;
  logic       use_a7;
  logic       k28;
  logic       kx7;

  assign x = din[4:0];
  assign y = din[7:5];
  assign k28 = k && (x == 5'd28);
  assign kx7 = k && (y == 3'd7) && (x == 5'd23 || x == 5'd27 || x == 5'd29 || x == 5'd30);

  always_comb begin
    alt6 = 1'b1;
    unique case (x)
      5'd0:  t6 = 6'b100111;
      5'd1:  t6 = 6'b011101;
      5'd2:  t6 = 6'b101101;
      5'd3:  begin t6 = 6'b110001; alt6 = 1'b0; end
      5'd4:  t6 = 6'b110101;
      5'd5:  begin t6 = 6'b101001; alt6 = 1'b0; end
      5'd6:  begin t6 = 6'b011001; alt6 = 1'b0; end
      5'd7:  t6 = 6'b111000;
      5'd8:  t6 = 6'b111001;
      5'd9:  begin t6 = 6'b100101; alt6 = 1'b0; end
      5'd10: begin t6 = 6'b010101; alt6 = 1'b0; end
      5'd11: begin t6 = 6'b110100; alt6 = 1'b0; end
      5'd12: begin t6 = 6'b001101; alt6 = 1'b0; end
      5'd13: begin t6 = 6'b101100; alt6 = 1'b0; end
      5'd14: begin t6 = 6'b011100; alt6 = 1'b0; end
      5'd15: t6 = 6'b010111;
      5'd16: t6 = 6'b011011;
      5'd17: begin t6 = 6'b100011; alt6 = 1'b0; end
      5'd18: begin t6 = 6'b010011; alt6 = 1'b0; end
      5'd19: begin t6 = 6'b110010; alt6 = 1'b0; end
      5'd20: begin t6 = 6'b001011; alt6 = 1'b0; end
      5'd21: begin t6 = 6'b101010; alt6 = 1'b0; end
      5'd22: begin t6 = 6'b011010; alt6 = 1'b0; end
      5'd23: t6 = 6'b111010;
      5'd24: t6 = 6'b110011;
      5'd25: begin t6 = 6'b100110; alt6 = 1'b0; end
      5'd26: begin t6 = 6'b010110; alt6 = 1'b0; end
      5'd27: t6 = 6'b110110;
      5'd28: begin t6 = 6'b001110; alt6 = 1'b0; end
      5'd29: t6 = 6'b101110;
      5'd30: t6 = 6'b011110;
      default: t6 = 6'b101011;   // 31
    endcase
    if (k28) begin
      t6   = 6'b001111;
      alt6 = 1'b1;
    end
  end

  assign c6     = (alt6 && rd_in) ? ~t6 : t6;
  // disparity after the 6-bit block: unbalanced blocks flip it
  assign rd_mid = (t6 == 6'b111000 || !alt6) ? rd_in : ~rd_in;

  always_comb begin
    use_a7 = kx7 ||
             (!rd_mid && (x == 5'd17 || x == 5'd18 || x == 5'd20)) ||
             ( rd_mid && (x == 5'd11 || x == 5'd13 || x == 5'd14));
    alt4 = 1'b1;
    unique case (y)
      3'd0: t4 = 4'b1011;
      3'd1: begin t4 = 4'b1001; alt4 = 1'b0; end
      3'd2: begin t4 = 4'b0101; alt4 = 1'b0; end
      3'd3: t4 = 4'b1100;
      3'd4: t4 = 4'b1101;
      3'd5: begin t4 = 4'b1010; alt4 = 1'b0; end
      3'd6: begin t4 = 4'b0110; alt4 = 1'b0; end
      default: t4 = use_a7 ? 4'b0111 : 4'b1110;
    endcase
  end

  assign c4 = (alt4 && rd_mid) ? ~t4 : t4;

  // K28.y as a whole: 001111 followed by the 4-bit code for positive
  // disparity of D.x.y (neutral codes unchanged), inverted at RD+.
  logic [3:0] k4;
  always_comb begin
    unique case (y)
      3'd0: k4 = 4'b0100;
      3'd1: k4 = 4'b1001;
      3'd2: k4 = 4'b0101;
      3'd3: k4 = 4'b0011;
      3'd4: k4 = 4'b0010;
      3'd5: k4 = 4'b1010;
      3'd6: k4 = 4'b0110;
      default: k4 = 4'b1000;
    endcase
  end

  assign code = k28 ? (rd_in ? ~{6'b001111, k4} : {6'b001111, k4}) : {c6, c4};

  // the new running disparity: flips when the 10-bit code is unbalanced
  always_comb begin
    int ones;
    ones = 0;
    for (int i = 0; i < 10; i++) ones += int'(code[i]);
    rd_out = (ones != 5) ? ~rd_in : rd_in;
  end

endmodule

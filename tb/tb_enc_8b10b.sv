// tb_enc_8b10b: self-checking test of the 8b/10b encoder.
// Checks published code words (D.0.0, D.3.0, D.7.7, D.17.7, D.10.5, D.21.5,
// K28.0, K28.1, K28.5 at both disparities) and, for all 256 data bytes at
// both running disparities, the code's properties: 4 to 6 ones, disparity
// bookkeeping, and that no two bytes share a code (decodability). A random
// stream is checked for runs of at most five equal bits and for the comma
// sequence appearing only inside K28.5 symbols.
module tb_enc_8b10b;
  logic [7:0] din;
  logic       k, rd_in, rd_out;
  logic [9:0] code;
  int checks = 0, failures = 0;

  enc_8b10b dut (.din(din), .k(k), .rd_in(rd_in), .code(code), .rd_out(rd_out));

  task automatic expect_code(input logic [7:0] d, input logic kk, input logic rd,
                             input logic [9:0] exp);
    din = d; k = kk; rd_in = rd; #1;
    checks++;
    if (code !== exp) begin
      failures++;
      $display("FAIL %s%0d.%0d rd=%0d: got %b expected %b", kk ? "K" : "D",
               d[4:0], d[7:5], rd, code, exp);
    end
  endtask

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  int owner [1024];
  int ones;
  logic [9:0] seen_code;
  logic [19:0] hist;
  int run, maxrun;
  logic prev;
  logic rd_s;

  initial begin
    expect_code(8'h00, 0, 0, 10'b100111_0100);
    expect_code(8'h00, 0, 1, 10'b011000_1011);
    expect_code(8'h03, 0, 0, 10'b110001_1011);
    expect_code(8'h03, 0, 1, 10'b110001_0100);
    expect_code(8'hE7, 0, 0, 10'b111000_1110);
    expect_code(8'hE7, 0, 1, 10'b000111_0001);
    expect_code(8'hF1, 0, 0, 10'b100011_0111);
    expect_code(8'hAA, 0, 0, 10'b010101_1010);
    expect_code(8'hAA, 0, 1, 10'b010101_1010);
    expect_code(8'hB5, 0, 0, 10'b101010_1010);
    expect_code(8'h1C, 1, 0, 10'b001111_0100);
    expect_code(8'h1C, 1, 1, 10'b110000_1011);
    expect_code(8'h3C, 1, 0, 10'b001111_1001);
    expect_code(8'h3C, 1, 1, 10'b110000_0110);
    expect_code(8'hBC, 1, 0, 10'b001111_1010);
    expect_code(8'hBC, 1, 1, 10'b110000_0101);

    for (int i = 0; i < 1024; i++) owner[i] = -1;
    for (int rd = 0; rd < 2; rd++)
      for (int b = 0; b < 256; b++) begin
        din = 8'(b); k = 0; rd_in = rd[0]; #1;
        ones = $countones(code);
        checks++;
        if (!(ones == 5 || (ones == 6 && rd == 0) || (ones == 4 && rd == 1))) begin
          failures++; $display("FAIL disparity D%0d rd=%0d code=%b", b, rd, code);
        end
        checks++;
        if (rd_out !== ((ones == 5) ? rd[0] : ~rd[0])) begin
          failures++; $display("FAIL rd_out D%0d rd=%0d", b, rd);
        end
        checks++;
        if (owner[code] != -1 && owner[code] != b) begin
          failures++; $display("FAIL code %b used by %0d and %0d", code, owner[code], b);
        end
        owner[code] = b;
      end

    // random stream: run length and comma position
    rd_s = 0; run = 0; maxrun = 0; prev = 0; hist = '0;
    for (int n = 0; n < 4000; n++) begin
      if ($urandom_range(0, 7) == 0) begin din = 8'hBC; k = 1; end
      else begin din = 8'($urandom); k = 0; end
      rd_in = rd_s; #1;
      for (int i = 9; i >= 0; i--) begin
        if (n > 0 && code[i] == prev) run++; else run = 1;
        prev = code[i];
        if (run > maxrun) maxrun = run;
        hist = {hist[18:0], code[i]};
        if (n > 0 && !(i == 3 && k) && (hist[6:0] == 7'b0011111 || hist[6:0] == 7'b1100000)) begin
          checks++; failures++;
          $display("FAIL comma outside K28.5 at symbol %0d", n);
        end
      end
      rd_s = rd_out;
    end
    checks++;
    if (maxrun > 5) begin failures++; $display("FAIL run length %0d", maxrun); end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

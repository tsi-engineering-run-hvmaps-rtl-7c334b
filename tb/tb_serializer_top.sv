// tb_serializer_top: self-checking test of 8b/10b encoding and serialization.
// Frames built from bytes with published codes (K28.0, K28.1, K28.5, D10.5,
// D21.5) are pushed at random spacings of at least 20 cycles. The test
// rebuilds each 40-bit frame from the two-bit output, compares it with the
// expected code words (tracking running disparity itself), checks that
// idle frames are four K28.5, that the pushed frames arrive in order and
// complete, and that each starts within 20 cycles of its push.
module tb_serializer_top;
  import hvmaps_pkg::*;
  logic clk = 0, rst_n = 0, push = 0;
  frame_t frame_in = IDLE_FRAME;
  logic [1:0] bit_data_out;
  logic frame_start;
  int checks = 0, failures = 0;
  int cyc = 0;

  serializer_top dut (.*);
  always #5 clk = ~clk;
  always @(posedge clk) cyc++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++; $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic [9:0] sym(input logic [7:0] b, input logic k, input logic rd);
    unique case ({k, b})
      {1'b1, 8'hBC}: return rd ? 10'b1100000101 : 10'b0011111010;
      {1'b1, 8'h1C}: return rd ? 10'b1100001011 : 10'b0011110100;
      {1'b1, 8'h3C}: return rd ? 10'b1100000110 : 10'b0011111001;
      {1'b0, 8'hAA}: return 10'b0101011010;
      {1'b0, 8'hB5}: return 10'b1010101010;
      default:       return 10'bx;
    endcase
  endfunction

  frame_t pushed [$];
  int     push_cyc [$];
  logic   rd_ref = 0;
  int     nframes = 0, ndata = 0;

  // frames from the byte set above
  function automatic frame_t rand_frame();
    frame_t f;
    for (int i = 0; i < 4; i++) begin
      int sel;
      sel = $urandom_range(0, 3);
      unique case (sel)
        0: begin f.data[8*i +: 8] = 8'h1C; f.comma[i] = 1; end
        1: begin f.data[8*i +: 8] = 8'h3C; f.comma[i] = 1; end
        2: begin f.data[8*i +: 8] = 8'hAA; f.comma[i] = 0; end
        default: begin f.data[8*i +: 8] = 8'hB5; f.comma[i] = 0; end
      endcase
    end
    return f;
  endfunction

  // receiver: collect 40 bits per frame
  logic [39:0] rx;
  int          nbits = -1;
  int          start_cyc;
  always @(posedge clk) if (rst_n) begin
    #1;
    if (frame_start) begin nbits = 0; start_cyc = cyc; end
    if (nbits >= 0) begin
      rx = {rx[37:0], bit_data_out};
      nbits += 2;
      if (nbits == 40) begin
        frame_t exp_f;
        logic [39:0] exp;
        bit is_data;
        is_data = (pushed.size() > 0) && (rx != {sym(8'hBC,1,rd_ref), sym(8'hBC,1,~rd_ref),
                                                  sym(8'hBC,1,rd_ref), sym(8'hBC,1,~rd_ref)});
        exp_f = is_data ? pushed[0] : IDLE_FRAME;
        for (int i = 3; i >= 0; i--) begin
          logic [9:0] s;
          s = sym(exp_f.data[8*i +: 8], exp_f.comma[i], rd_ref);
          exp[10*i +: 10] = s;
          if ($countones(s) != 5) rd_ref = ~rd_ref;
        end
        checks++;
        if (rx !== exp) begin
          failures++; $display("FAIL frame %0d got %h expected %h", nframes, rx, exp);
        end
        if (is_data) begin
          checks++;
          if (start_cyc - push_cyc[0] > 20 || start_cyc <= push_cyc[0]) begin
            failures++; $display("FAIL latency %0d", start_cyc - push_cyc[0]);
          end
          void'(pushed.pop_front()); void'(push_cyc.pop_front());
          ndata++;
        end
        nframes++;
        nbits = -1;
      end
    end
  end

  initial begin
    repeat (3) @(negedge clk); rst_n = 1;
    repeat (50) @(negedge clk);
    for (int n = 0; n < 200; n++) begin
      frame_t f;
      f = rand_frame();
      frame_in = f; push = 1;
      pushed.push_back(f); push_cyc.push_back(cyc + 1);
      @(negedge clk); push = 0;
      repeat ($urandom_range(19, 45)) @(negedge clk);
    end
    repeat (100) @(negedge clk);
    checks++;
    if (ndata != 200 || pushed.size() != 0) begin
      failures++; $display("FAIL %0d of 200 frames sent", ndata);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

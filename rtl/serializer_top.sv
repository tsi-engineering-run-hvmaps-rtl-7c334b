// serializer_top: 8b/10b encoding and serialization of the RCU's data words.
//
// The readout state machine hands over a frame of four bytes (DataOut) and
// four comma flags (CommaOut, 1 = send the byte as a K word) with a one-cycle
// push. The frame waits in a holding register. Every FRAME_CYC = 20 cycles of
// clk (clk_800p) the serializer takes the held frame, or the idle frame of
// four K28.5 commas if nothing was pushed, encodes the four bytes with four
// chained encoders (running disparity carried from byte to byte and frame to
// frame) and sends the 40 bits, most significant byte first and bit a of each
// symbol first, two bits per clk cycle on bit_data_out[1:0]
// (bit_data_out[1] is sent first). A push in the cycle where a frame is taken
// is kept for the next frame. With pushes at least 20 cycles apart, which the
// state machine guarantees, no frame is lost.
//
// The 40-bit frame, MSB-first order and 2 bits per clk_800p come from the
// chip description. The chip's serializer is a binary tree of multiplexers;
// a shift register is used here, which gives the same bit order.
module serializer_top
  import hvmaps_pkg::*;
(
  input  logic       clk,
  input  logic       rst_n,
  input  logic       push,
  input  frame_t     frame_in,
  output logic [1:0] bit_data_out,
  output logic       frame_start   // first bit pair of a frame is on the output
);
  localparam int unsigned FRAME_CYC = 20;

  frame_t      hold;
  logic        hold_v;
  logic [4:0]  fcnt;
  logic [39:0] shreg;
  logic        rd;

  frame_t      cur;
  logic [4:0]  rd_chain;
  logic [39:0] enc;

  assign cur = hold_v ? hold : IDLE_FRAME;
  assign rd_chain[0] = rd;

  for (genvar i = 0; i < 4; i++) begin : g_enc
    // byte 3 (data[31:24]) is encoded and sent first
    enc_8b10b u_enc (
      .din   (cur.data[8*(3-i) +: 8]),
      .k     (cur.comma[3-i]),
      .rd_in (rd_chain[i]),
      .code  (enc[10*(3-i) +: 10]),
      .rd_out(rd_chain[i+1])
    );
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      hold   <= IDLE_FRAME;
      hold_v <= 1'b0;
      fcnt   <= '0;
      shreg  <= '0;
      rd     <= 1'b0;
    end else begin
      if (fcnt == 5'(FRAME_CYC-1)) begin
        fcnt  <= '0;
        shreg <= enc;
        rd    <= rd_chain[4];
        if (!push) hold_v <= 1'b0;
      end else begin
        fcnt  <= fcnt + 5'd1;
        shreg <= shreg << 2;
      end
      if (push) begin
        hold   <= frame_in;
        hold_v <= 1'b1;
      end
    end
  end

  assign bit_data_out = shreg[39:38];
  assign frame_start  = (fcnt == 5'd0);

endmodule

// config_bit: one bit of the chip's configuration shift register.
//
// The configuration chain is clocked by two non-overlapping clocks. On the
// rising edge of ck1 the bit's first stage takes sin; on the rising edge of
// ck2 the second stage takes the first stage and drives sout, so one ck1/ck2
// pair moves the whole chain by one position. A pulse on ld copies the
// shifted value into the output register q, which is what the chip uses; the
// shift stages can therefore be rewritten without disturbing q. rb (active
// low) clears q asynchronously. The signal names ck1, ck2, sin, sout, ld and
// rb are the chip's; the edge-triggered realisation (instead of latches) and
// clearing only q on rb are this design's choices.
module config_bit (
  input  logic ck1,
  input  logic ck2,
  input  logic ld,
  input  logic rb,
  input  logic sin,
  output logic sout,
  output logic q
);
  logic stage1;

  always_ff @(posedge ck1) stage1 <= sin;
  always_ff @(posedge ck2) sout   <= stage1;

  always_ff @(posedge ld or negedge rb) begin
    if (!rb) q <= 1'b0;
    else     q <= sout;
  end
endmodule

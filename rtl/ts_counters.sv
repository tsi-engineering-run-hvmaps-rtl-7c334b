// ts_counters: the RCU's time stamp counters.
//
// Three counters run on the time stamp clock tsck, each advancing once every
// (divider+1) tsck periods:
//   TS  : 16-bit binary counter (divider ckdivend). Its low 10 bits, Gray
//         coded, drive ts_to_det[9:0], updated on the rising tsck edge; the
//         same code is copied to ts_to_det[19:10] on the falling edge, so the
//         two 10-bit halves count with the same codes half a period apart.
//         The binary value (ts_bin) is sent by the readout state machine.
//   TS2 : 10-bit counter for the trailing edge (divider ckdivend2), Gray.
//   TS3 : 7-bit counter clocking the TDC (divider ckdivend3), Gray.
// sync_res, synchronous to tsck, clears all counters. Widths, dividers and
// the edge use follow the chip description; the 16-bit width of the binary
// counter follows the 16 bits the state machine sends, and the one-period
// lag between binary and Gray values is this design's choice.
module ts_counters
  import hvmaps_pkg::*;
(
  input  logic             tsck,
  input  logic             sync_res,
  input  logic [5:0]       ckdivend,
  input  logic [5:0]       ckdivend2,
  input  logic [5:0]       ckdivend3,
  output logic [15:0]      ts_bin,
  output logic [TS_W-1:0]  ts_to_det,
  output logic [TS2_W-1:0] ts2_to_det,
  output logic [TS3_W-1:0] ts3_to_det
);
  logic [5:0] div1, div2, div3;
  logic [9:0] ts2_bin;
  logic [6:0] ts3_bin;
  logic [9:0] ts_lo;

  always_ff @(posedge tsck) begin
    if (sync_res) begin
      div1 <= '0; div2 <= '0; div3 <= '0;
      ts_bin  <= '0;
      ts2_bin <= '0;
      ts3_bin <= '0;
      ts_lo      <= '0;
      ts2_to_det <= '0;
      ts3_to_det <= '0;
    end else begin
      if (div1 >= ckdivend) begin div1 <= '0; ts_bin  <= ts_bin + 16'd1; end
      else div1 <= div1 + 6'd1;
      if (div2 >= ckdivend2) begin div2 <= '0; ts2_bin <= ts2_bin + 10'd1; end
      else div2 <= div2 + 6'd1;
      if (div3 >= ckdivend3) begin div3 <= '0; ts3_bin <= ts3_bin + 7'd1; end
      else div3 <= div3 + 6'd1;
      ts_lo      <= bin2gray10(ts_bin[9:0]);
      ts2_to_det <= bin2gray10(ts2_bin);
      ts3_to_det <= ts3_bin ^ (ts3_bin >> 1);
    end
  end

  // upper half: same code, taken over on the falling edge
  logic [9:0] ts_hi;
  always_ff @(negedge tsck) ts_hi <= ts_lo;

  assign ts_to_det = {ts_hi, ts_lo};
endmodule

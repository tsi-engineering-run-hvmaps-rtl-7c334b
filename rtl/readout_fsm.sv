// readout_fsm: the RCU state machine that reads hits out of the matrix.
//
// It steps at most once per ce pulse (the clk_8ns period, one tenth of
// clk_800p). A timer counts ce pulses from 0 to timerend; a state ends when
// the timer reaches timerend, so each state lasts timerend+1 periods, except
// Sync ((resetckdivend+1) times that) and Load column 1 ((slowdownend+1)
// times that). The cycle is
//   Sync -> PD1 -> PD2 -> LdCol1 -> LdCol2 -> LdPix1 -> LdPix2
//   LdPix2 -> RdCol1 if the EoC buffers hold hits (prio), else PD1
//            (or SendCnt1 -> SendCnt2 -> PD1 when sendcounter is set)
//   RdCol1 -> RdCol2 -> RdCol3 -> RdCol4 -> RdCol1 while hits remain and
//            fewer than maxcycend hits (at least one) were read, else PD1.
// In counting mode (countsheeps) LdCol2 goes to RdCol1 when the EoC buffers
// hold hits, so new hits are only accepted (LdPix) once every old hit has
// been read out. Outputs: pd in PD1, ld_col in LdCol1, ld_pix in LdPix1,
// rd_col in RdCol1. The EoC word on rd_bus is captured at the end of RdCol1.
//
// In the last clk cycle of SendCnt1, LdCol2, LdPix2 (with hits), RdCol2 and
// RdCol4 a 32-bit frame with its comma flags is pushed to the serializer:
//   SendCnt1 {K28.1, ts[7:0], ts[15:8], 00}      comma 1000
//   LdCol2   {K28.0, D10.5, K28.0, D10.5}         comma 1010
//   LdPix2   {C0, ts[15:8], ts[7:0], tsgray[7:0]} comma 0000
//   RdCol2   {C1, 00, col, row, TS3}              comma 0000
//   RdCol4   {00, TS, TS2}                        comma 0000
// All other frames are the idle K28.5 frame, which the serializer sends
// whenever nothing is pushed. Pushes are at least two states apart, i.e. 20
// clk cycles or more, one serializer frame. The state sequence and frame
// contents are the chip's; where Send counter sits in the cycle, the
// maxcycend counting and the minimum of one read are this design's choices.
module readout_fsm
  import hvmaps_pkg::*;
(
  input  logic        clk,
  input  logic        rst_n,
  input  logic        ce,         // one pulse per clk_8ns period
  input  rcu_cfg_t    cfg,
  input  logic        prio,       // PrioFromDet: some EoC buffer holds a hit
  input  eoc_word_t   rd_bus,     // hit data from the EoC buffers
  input  logic [15:0] ts_bin,     // binary time stamp counter
  input  logic [7:0]  ts_gray,    // Gray time stamp, low byte
  output logic        pd,
  output logic        ld_col,
  output logic        ld_pix,
  output logic        rd_col,
  output logic        push,
  output frame_t      frame
);
  typedef enum logic [3:0] {
    S_SYNC, S_PD1, S_PD2, S_LDCOL1, S_LDCOL2, S_LDPIX1, S_LDPIX2,
    S_RDCOL1, S_RDCOL2, S_RDCOL3, S_RDCOL4, S_SENDCNT1, S_SENDCNT2
  } state_t;

  state_t     state, nxt;
  logic [3:0] tmr;
  logic [3:0] len;      // periods spent in the current state
  logic [7:0] nread;    // hits read since the last load
  eoc_word_t  hit;
  logic       tick;     // last clk cycle of a timer period
  logic       last;     // last clk cycle of the state
  logic [3:0] len_end;

  assign tick = ce && (tmr == cfg.timerend);

  always_comb begin
    unique case (state)
      S_SYNC:   len_end = cfg.resetckdivend;
      S_LDCOL1: len_end = cfg.slowdownend;
      default:  len_end = 4'd0;
    endcase
  end

  assign last = tick && (len == len_end);

  always_comb begin
    nxt = state;
    unique case (state)
      S_SYNC:     nxt = S_PD1;
      S_PD1:      nxt = S_PD2;
      S_PD2:      nxt = S_LDCOL1;
      S_LDCOL1:   nxt = S_LDCOL2;
      S_LDCOL2:   nxt = (cfg.countsheeps && prio) ? S_RDCOL1 : S_LDPIX1;
      S_LDPIX1:   nxt = S_LDPIX2;
      S_LDPIX2:   nxt = prio ? S_RDCOL1 : (cfg.sendcounter ? S_SENDCNT1 : S_PD1);
      S_RDCOL1:   nxt = S_RDCOL2;
      S_RDCOL2:   nxt = S_RDCOL3;
      S_RDCOL3:   nxt = S_RDCOL4;
      S_RDCOL4:   nxt = (prio && (nread + 8'd1 < cfg.maxcycend)) ? S_RDCOL1 : S_PD1;
      S_SENDCNT1: nxt = S_SENDCNT2;
      S_SENDCNT2: nxt = S_PD1;
      default:    nxt = S_SYNC;
    endcase
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state <= S_SYNC;
      tmr   <= '0;
      len   <= '0;
      nread <= '0;
      hit   <= '0;
      push  <= 1'b0;
      frame <= IDLE_FRAME;
    end else begin
      push <= 1'b0;
      if (ce) tmr <= (tmr == cfg.timerend) ? 4'd0 : tmr + 4'd1;
      if (tick) len <= last ? 4'd0 : len + 4'd1;
      if (last) begin
        state <= nxt;
        unique case (state)
          S_SENDCNT1: begin
            push  <= 1'b1;
            frame <= '{data: {K28_1, ts_bin[7:0], ts_bin[15:8], 8'd0}, comma: 4'b1000};
          end
          S_LDCOL2: begin
            push  <= 1'b1;
            frame <= '{data: {K28_0, D10_5, K28_0, D10_5}, comma: 4'b1010};
          end
          S_LDPIX2: begin
            nread <= '0;
            if (prio) begin
              push  <= 1'b1;
              frame <= '{data: {HDR_COUNTER, ts_bin[15:8], ts_bin[7:0], ts_gray}, comma: 4'b0000};
            end
          end
          S_RDCOL1: hit <= rd_bus;
          S_RDCOL2: begin
            push  <= 1'b1;
            frame <= '{data: {HDR_HIT, 2'd0, hit.col, hit.hit.row, hit.hit.ts3}, comma: 4'b0000};
          end
          S_RDCOL4: begin
            push  <= 1'b1;
            nread <= nread + 8'd1;
            frame <= '{data: {2'd0, hit.hit.ts, hit.hit.ts2}, comma: 4'b0000};
          end
          S_PD1: nread <= '0;
          default: ;
        endcase
      end
    end
  end

  assign pd     = (state == S_PD1);
  assign ld_col = (state == S_LDCOL1);
  assign ld_pix = (state == S_LDPIX1);
  assign rd_col = (state == S_RDCOL1);

endmodule

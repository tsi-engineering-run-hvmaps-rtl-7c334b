// rcu: readout control unit of the chip periphery.
//
// Holds the 57-bit RCU configuration register (first part of the chip's
// configuration chain, sin -> QConfig[0] ... QConfig[56] -> sout_config),
// the time stamp counters (on tsck), the readout state machine and the
// serializer (both on clk_800p). From clk_800p it derives the state machine
// step (ce, one cycle in ten: the clk_8ns period) and clk_4n, one fifth of
// clk_800p (high for 2 of 5 cycles), which goes back to the PLL as its
// reference. res_n resets the state machine and the serializer
// asynchronously; sync_res, synchronous to tsck, resets the time stamp
// counters. The last step of the state machine sees the EoC buffers through
// prio (PrioFromDet) and rd_bus. cfg_extra brings out SRExtraBits, which
// control the PLL and the time stamp clock selection outside the RCU.
// Ports and behaviour follow the chip description; deriving the clk_8ns
// period as a clock enable is this design's choice.
module rcu
  import hvmaps_pkg::*;
(
  input  logic             clk_800p,
  input  logic             res_n,
  input  logic             tsck,
  input  logic             sync_res,
  // configuration chain
  input  logic             ck1,
  input  logic             ck2,
  input  logic             cfg_ld,
  input  logic             rb,
  input  logic             sin,
  output logic             sout_config,
  output logic [15:0]      cfg_extra,
  // matrix side
  input  logic             prio_from_det,
  input  eoc_word_t        data_from_det,
  output logic             pull_dn,
  output logic             ld_col,
  output logic             ld_pix,
  output logic             rd_col,
  output logic [TS_W-1:0]  ts_to_det,
  output logic [TS2_W-1:0] ts2_to_det,
  output logic [TS3_W-1:0] ts3_to_det,
  // output side
  output logic [1:0]       bit_data_out,
  output logic             frame_start,
  output logic             clk_4n
);
  logic [RCU_CFG_W-1:0] qcfg;
  rcu_cfg_t             cfg;

  config_chain #(.N(RCU_CFG_W)) u_cfg (
    .ck1 (ck1), .ck2 (ck2), .ld (cfg_ld), .rb (rb),
    .sin (sin), .sout (sout_config), .q (qcfg)
  );
  assign cfg       = decode_rcu_cfg(qcfg);
  assign cfg_extra = cfg.extra;

  // clk_800p / 10 step enable and clk_800p / 5 clock
  logic [3:0] cnt10;
  logic       ce;
  always_ff @(posedge clk_800p or negedge res_n) begin
    if (!res_n) begin
      cnt10  <= '0;
      clk_4n <= 1'b0;
    end else begin
      cnt10  <= (cnt10 == 4'd9) ? 4'd0 : cnt10 + 4'd1;
      clk_4n <= (cnt10 == 4'd9 || cnt10 == 4'd0 || cnt10 == 4'd4 || cnt10 == 4'd5);
    end
  end
  assign ce = (cnt10 == 4'd9);

  logic [15:0] ts_bin;

  ts_counters u_ts (
    .tsck      (tsck),
    .sync_res  (sync_res),
    .ckdivend  (cfg.ckdivend),
    .ckdivend2 (cfg.ckdivend2),
    .ckdivend3 (cfg.ckdivend3),
    .ts_bin    (ts_bin),
    .ts_to_det (ts_to_det),
    .ts2_to_det(ts2_to_det),
    .ts3_to_det(ts3_to_det)
  );

  logic   push;
  frame_t frame;

  readout_fsm u_fsm (
    .clk    (clk_800p),
    .rst_n  (res_n),
    .ce     (ce),
    .cfg    (cfg),
    .prio   (prio_from_det),
    .rd_bus (data_from_det),
    .ts_bin (ts_bin),
    .ts_gray(ts_to_det[7:0]),
    .pd     (pull_dn),
    .ld_col (ld_col),
    .ld_pix (ld_pix),
    .rd_col (rd_col),
    .push   (push),
    .frame  (frame)
  );

  serializer_top u_ser (
    .clk         (clk_800p),
    .rst_n       (res_n),
    .push        (push),
    .frame_in    (frame),
    .bit_data_out(bit_data_out),
    .frame_start (frame_start)
  );

endmodule

// hvmaps_top: digital part of the HVMAPS test chip.
//
// A matrix of NCOLS columns x ROWS hit-buffer slots (29 x 124 on the chip)
// receives the digital comparator outputs of the pixels. Every column
// (hv_column) stores hits with their time stamps, moves one hit at a time to
// its end-of-column buffer and offers it to the readout control unit (rcu).
// The RCU's state machine drives PullDN, LdCol, LdPix and RdCol to all
// columns, collects one hit word per RdCol from the first full EoC buffer
// (EoC priority chain from column 0 upwards; its end is PrioFromDet), and
// sends the hits as 8b/10b frames two bits per clk_800p cycle; the 2:1
// output stage (dcl_serializer, a behavioural model) puts them on the line
// at 1.6 Gbit/s.
//
// The configuration is one shift chain: cfg_sin -> RCU register (57 bits) ->
// DAC register (210 bits) -> pixel register of column 0 (25 bits) -> ... ->
// column NCOLS-1 -> cfg_sout. Rows of hit-buffer RAM write lines, in-pixel
// RAM write lines and injection enables run across the whole matrix; the top
// collects five (seven, five) of them from every column's register.
//
// The time stamp clock is clk_800p or clk_4n, chosen by SRExtraBits[4]; the
// multiplexer below is a plain clock multiplexer and should only be switched
// while sync_res is held. Analog parts (pixels, bias DACs, PLL, pads) are
// outside: their controls are ports. Clock: clk_800p from the PLL; res_n
// asynchronous, active low; sync_res synchronous to the time stamp clock.
module hvmaps_top
  import hvmaps_pkg::*;
#(
  parameter int unsigned NCOLS = NCOL,
  parameter int unsigned ROWS  = NROW
) (
  input  logic             clk_800p,
  input  logic             res_n,
  input  logic             sync_res,
  // configuration chain pads
  input  logic             cfg_ck1,
  input  logic             cfg_ck2,
  input  logic             cfg_ld,
  input  logic             cfg_rb,
  input  logic             cfg_sin,
  output logic             cfg_sout,
  // pixel comparator outputs, one vector per column
  input  logic [ROWS-1:0]  comp_in [NCOLS],
  // data output
  output logic [1:0]       bit_data_out,
  output logic             data_out_p,
  output logic             data_out_n,
  output logic             clk_4n,
  // controls of the analog parts
  output logic [3:0]       pll_ctrl,     // SRExtraBits[3:0]: invert, ext clk, slow clk, enable
  output logic [5:0]       dac_ctrl,
  output logic [DAC_W-1:0] dac [NDAC],
  output logic [2:0]       hb_tdac  [NCOLS][ROWS],
  output logic [2:0]       pix_tdac [NCOLS][ROWS-ROWS/2],
  output logic [ROWS-1:0]  inj_en   [NCOLS],
  output logic [NCOLS-1:0] ampout_en,
  output logic             hitbus
);
  localparam int unsigned PR = ROWS - ROWS/2;

  // ----------------------------------------------------------- RCU
  logic             pull_dn, ld_col, ld_pix, rd_col;
  logic [TS_W-1:0]  ts;
  logic [TS2_W-1:0] ts2;
  logic [TS3_W-1:0] ts3;
  logic [15:0]      cfg_extra;
  logic             tsck;
  logic             prio_from_det;
  eoc_word_t        data_from_det;
  logic             frame_start;
  logic             sout_rcu, sout_dac;

  assign tsck     = cfg_extra[4] ? clk_800p : clk_4n;
  assign pll_ctrl = cfg_extra[3:0];

  rcu u_rcu (
    .clk_800p     (clk_800p),
    .res_n        (res_n),
    .tsck         (tsck),
    .sync_res     (sync_res),
    .ck1          (cfg_ck1),
    .ck2          (cfg_ck2),
    .cfg_ld       (cfg_ld),
    .rb           (cfg_rb),
    .sin          (cfg_sin),
    .sout_config  (sout_rcu),
    .cfg_extra    (cfg_extra),
    .prio_from_det(prio_from_det),
    .data_from_det(data_from_det),
    .pull_dn      (pull_dn),
    .ld_col       (ld_col),
    .ld_pix       (ld_pix),
    .rd_col       (rd_col),
    .ts_to_det    (ts),
    .ts2_to_det   (ts2),
    .ts3_to_det   (ts3),
    .bit_data_out (bit_data_out),
    .frame_start  (frame_start),
    .clk_4n       (clk_4n)
  );

  dcl_serializer u_dcl (
    .clk_800p  (clk_800p),
    .bit_data  (bit_data_out),
    .data_out_p(data_out_p),
    .data_out_n(data_out_n)
  );

  dac_register u_dac (
    .ck1   (cfg_ck1),
    .ck2   (cfg_ck2),
    .cfg_ld(cfg_ld),
    .rb    (cfg_rb),
    .sin   (sout_rcu),
    .sout  (sout_dac),
    .ctrl  (dac_ctrl),
    .dac   (dac)
  );

  // ----------------------------------------------------------- matrix
  logic [NCOLS:0]                  eoc_prio;
  logic [NCOLS:0]                  chain;
  eoc_word_t                       col_rd_bus [NCOLS];
  logic [HB_WR_PER_COL*NCOLS-1:0]  hb_wr_all;
  logic [PIX_WR_PER_COL*NCOLS-1:0] pix_wr_all;
  logic [INJ_PER_COL*NCOLS-1:0]    inj_all;
  logic [NCOLS-1:0]                col_hitbus;

  assign eoc_prio[0] = 1'b0;
  assign chain[0]    = sout_dac;

  for (genvar c = 0; c < NCOLS; c++) begin : g_col
    hv_column #(.COL(c), .ROWS(ROWS)) u_col (
      .clk         (clk_800p),
      .rst_n       (res_n),
      .comp_in     (comp_in[c]),
      .ts_in       (ts),
      .ts2_in      (ts2),
      .ts3_in      (ts3),
      .pd          (pull_dn),
      .ld_pix      (ld_pix),
      .ld_col      (ld_col),
      .rd_col      (rd_col),
      .prio_in     (eoc_prio[c]),
      .prio_out    (eoc_prio[c+1]),
      .rd_bus      (col_rd_bus[c]),
      .ck1         (cfg_ck1),
      .ck2         (cfg_ck2),
      .cfg_ld      (cfg_ld),
      .rb          (cfg_rb),
      .sin         (chain[c]),
      .sout        (chain[c+1]),
      .hb_wr_lines (hb_wr_all[HB_WR_PER_COL*c +: HB_WR_PER_COL]),
      .pix_wr_lines(pix_wr_all[PIX_WR_PER_COL*c +: PIX_WR_PER_COL]),
      .inj_lines   (inj_all[INJ_PER_COL*c +: INJ_PER_COL]),
      .hb_wr_row   (hb_wr_all[ROWS-1:0]),
      .pix_wr      (pix_wr_all[3*PR-1:0]),
      .inj_row     (inj_all[ROWS-1:0]),
      .hb_tdac     (hb_tdac[c]),
      .pix_tdac    (pix_tdac[c]),
      .inj_en      (inj_en[c]),
      .ampout_en   (ampout_en[c]),
      .hitbus      (col_hitbus[c])
    );
  end

  assign cfg_sout      = chain[NCOLS];
  assign prio_from_det = eoc_prio[NCOLS];
  assign hitbus        = |col_hitbus;

  always_comb begin
    data_from_det = '0;
    for (int c = 0; c < NCOLS; c++) data_from_det = data_from_det | col_rd_bus[c];
  end

endmodule

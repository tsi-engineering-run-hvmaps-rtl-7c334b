// hv_column: one column of the readout: NROW hit buffers, the column data
// bus, the end-of-column buffer, the 25-bit pixel control register and the
// 3-bit in-pixel tune RAM of the pixel rows that have one.
//
// Readout: hit buffers are chained by their priority logic from the top row
// (NROW-1) down to row 0, so the highest row holding an h2 hit is granted.
// pd (PullDN) discharges the column bus, modelled as a register cleared to
// zero. While ld_col is high the granted cell pulls bits of the bus high
// (wired OR). At the falling edge of ld_col the EoC buffer copies the bus if
// it is empty and a cell requested; the same event deletes that cell's hit
// flags. Without a pd between two loads the bus would hold the OR of two hit
// words, as on the chip.
//
// Pixel control register (config chain bits, bit 0 nearest the input):
//   0..3  RAM In for the hit-buffer RAM {enB, tune[2:0]} of this column
//   4     RAM In for the in-pixel tune RAM
//   5..9  hit-buffer RAM write lines, rows 5*COL .. 5*COL+4
//   10..16 pixel RAM write lines 7*COL .. 7*COL+6
//   17..21 injection row enables, rows 5*COL .. 5*COL+4
//   22    enableB (active low) of the column hit bus
//   23    amp out enable of the column
//   24    injection enable of the column
// In odd columns the line indices of bits 5..21 run downwards. Write and
// injection lines are row-wide: the chip top gathers the lines of all
// columns and returns the full sets (hb_wr_row, pix_wr, inj_row).
// Pixel RAM line 3*(r-62)+k writes bit k of the tune RAM of row r (r >= 62).
// The register layout is the chip's; the RAM write being synchronous to clk
// is this design's choice.
module hv_column
  import hvmaps_pkg::*;
#(
  parameter int unsigned COL  = 0,
  parameter int unsigned ROWS = NROW
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [ROWS-1:0]  comp_in,
  input  logic [TS_W-1:0]  ts_in,
  input  logic [TS2_W-1:0] ts2_in,
  input  logic [TS3_W-1:0] ts3_in,
  input  logic             pd,
  input  logic             ld_pix,
  input  logic             ld_col,
  input  logic             rd_col,
  input  logic             prio_in,
  output logic             prio_out,
  output eoc_word_t        rd_bus,
  // configuration chain
  input  logic             ck1,
  input  logic             ck2,
  input  logic             cfg_ld,
  input  logic             rb,
  input  logic             sin,
  output logic             sout,
  // this column's row-wide lines, indexed as global line - 5*COL (7*COL)
  output logic [HB_WR_PER_COL-1:0]  hb_wr_lines,
  output logic [PIX_WR_PER_COL-1:0] pix_wr_lines,
  output logic [INJ_PER_COL-1:0]    inj_lines,
  // the full sets of row-wide lines
  input  logic [ROWS-1:0]           hb_wr_row,
  input  logic [3*(ROWS-ROWS/2)-1:0] pix_wr,
  input  logic [ROWS-1:0]           inj_row,
  // to the analog parts
  output logic [2:0]       hb_tdac  [ROWS],
  output logic [2:0]       pix_tdac [ROWS-ROWS/2],
  output logic [ROWS-1:0]  inj_en,
  output logic             ampout_en,
  output logic             hitbus
);
  // pix_tdac[i] belongs to row ROWS/2 + i (row 62 + i at full size)
  localparam int unsigned PR = ROWS - ROWS/2;

  logic [PIX_CFG_W-1:0] q;

  config_chain #(.N(PIX_CFG_W)) u_cfg (
    .ck1 (ck1), .ck2 (ck2), .ld (cfg_ld), .rb (rb),
    .sin (sin), .sout (sout), .q (q)
  );

  always_comb begin
    for (int k = 0; k < HB_WR_PER_COL; k++)
      hb_wr_lines[k] = (COL % 2 == 0) ? q[5+k] : q[5+HB_WR_PER_COL-1-k];
    for (int k = 0; k < PIX_WR_PER_COL; k++)
      pix_wr_lines[k] = (COL % 2 == 0) ? q[10+k] : q[10+PIX_WR_PER_COL-1-k];
    for (int k = 0; k < INJ_PER_COL; k++)
      inj_lines[k] = (COL % 2 == 0) ? q[17+k] : q[17+INJ_PER_COL-1-k];
  end

  assign ampout_en = q[23];
  assign inj_en    = inj_row & {ROWS{q[24]}};

  // ---------------------------------------------------------------- cells
  logic [ROWS:0]     prio;       // prio[r+1] is the request from rows above r
  logic [ROWS-1:0]   grant;
  logic [ROWS-1:0]   hit_or;
  hit_word_t         cell_bus [ROWS];
  hit_word_t         bus_or;
  logic              clr;

  assign prio[ROWS] = 1'b0;

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    hit_buffer #(.ROW(r)) u_hb (
      .clk     (clk),
      .rst_n   (rst_n),
      .comp_in (comp_in[r]),
      .ts_in   (ts_in),
      .ts2_in  (ts2_in),
      .ts3_in  (ts3_in),
      .ld_pix  (ld_pix),
      .ld_col  (ld_col),
      .clr     (clr),
      .prio_in (prio[r+1]),
      .prio_out(prio[r]),
      .grant   (grant[r]),
      .bus_out (cell_bus[r]),
      .ram_wr  (hb_wr_row[r]),
      .ram_in  (q[3:0]),
      .tdac    (hb_tdac[r]),
      .hit_or  (hit_or[r])
    );
  end

  always_comb begin
    bus_or = '0;
    for (int r = 0; r < ROWS; r++) bus_or = bus_or | cell_bus[r];
  end

  assign hitbus = ~q[22] & (|hit_or);

  // the priority logic grants at most one cell of the column
  a_one_grant: assert property (@(posedge clk) disable iff (!rst_n) $onehot0(grant));

  // ------------------------------------------------------- column data bus
  hit_word_t col_bus;
  logic      ld_col_q;
  logic      eoc_full;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      col_bus  <= '0;
      ld_col_q <= 1'b0;
    end else begin
      ld_col_q <= ld_col;
      if (pd)          col_bus <= '0;
      else if (ld_col) col_bus <= col_bus | bus_or;
    end
  end

  assign clr = ld_col_q & ~ld_col & prio[0] & ~eoc_full;

  eoc_buffer #(.COL(COL)) u_eoc (
    .clk     (clk),
    .rst_n   (rst_n),
    .col_bus (col_bus),
    .load    (clr),
    .rd_col  (rd_col),
    .prio_in (prio_in),
    .prio_out(prio_out),
    .full    (eoc_full),
    .rd_bus  (rd_bus)
  );

  // --------------------------------------------------- in-pixel tune RAM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < PR; r++) pix_tdac[r] <= '0;
    end else begin
      for (int r = 0; r < PR; r++)
        for (int k = 0; k < 3; k++)
          if (pix_wr[3*r+k]) pix_tdac[r][k] <= q[4];
    end
  end

endmodule

// hit_buffer: one hit-buffer cell below the pixel matrix.
//
// The cell receives the (already digital) comparator output of its pixel.
// An edge detector finds the leading edge, which sets the first hit flag h1
// and stores the leading-edge time stamp TS (20 bits) in m1 and the TDC fine
// stamp TS3 (7 bits) in m3; the trailing edge stores TS2 (10 bits) in m2.
// While ld_pix is high, the second hit flag h2 takes h1: only hits flagged in
// h2 take part in the readout. The priority logic passes prio_in (some cell
// above holds an h2 hit) down the column: the cell with h2 set and no
// request above it is granted. While ld_col is high the granted cell drives
// its hit word (time stamps and its row address from a fixed ROM) onto
// bus_out; when the column reports that the word was taken (clr) the granted
// cell deletes both hit flags and accepts new hits again.
//
// A small RAM holds three tune bits and the active-low enable bit enB. It is
// written from ram_in while ram_wr is high. enB = 1 masks the comparator.
// hit_or is the receiver output after the local enable, for the column's
// fast hit bus.
//
// Timing: everything runs on clk (clk_800p); comp_in must be synchronous to
// clk. Edges of comp_in are seen one cycle late. A new hit is ignored while
// h1 is set. Storing TS3 at the leading edge stands in for the analog ramp
// TDC, which stops a little later; the grant order (highest row first) and
// the busy behaviour are this design's reading of the description.
module hit_buffer
  import hvmaps_pkg::*;
#(
  parameter int unsigned ROW = 0   // row address held in the address ROM
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             comp_in,   // comparator output of the pixel
  input  logic [TS_W-1:0]  ts_in,     // TsToDet
  input  logic [TS2_W-1:0] ts2_in,    // TSToDet2
  input  logic [TS3_W-1:0] ts3_in,    // TSToDet3
  input  logic             ld_pix,
  input  logic             ld_col,
  input  logic             clr,       // column: word of the granted cell taken
  input  logic             prio_in,   // a higher cell requests
  output logic             prio_out,
  output logic             grant,
  output hit_word_t        bus_out,   // zero unless granted during ld_col
  input  logic             ram_wr,
  input  logic [3:0]       ram_in,    // {enB, tune[2:0]}
  output logic [2:0]       tdac,      // tune bits to the hit-buffer TDAC
  output logic             hit_or
);
  logic       en_b;
  logic       comp_q;
  logic       h1, h2;
  logic       wait_fall;
  logic [TS_W-1:0]  m1;
  logic [TS2_W-1:0] m2;
  logic [TS3_W-1:0] m3;
  hit_word_t        word;

  logic comp_en;
  logic rise, fall;

  assign comp_en = comp_in & ~en_b;
  assign rise    = comp_en & ~comp_q;
  assign fall    = ~comp_en & comp_q;
  assign hit_or  = comp_en;

  // tune / enable RAM
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      tdac <= '0;
      en_b <= 1'b0;
    end else if (ram_wr) begin
      tdac <= ram_in[2:0];
      en_b <= ram_in[3];
    end
  end

  // edge detector, hit flags and time stamp memories
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      comp_q    <= 1'b0;
      h1        <= 1'b0;
      h2        <= 1'b0;
      wait_fall <= 1'b0;
      m1 <= '0;
      m2 <= '0;
      m3 <= '0;
    end else begin
      comp_q <= comp_en;
      if (clr && grant) begin
        h1        <= 1'b0;
        h2        <= 1'b0;
        wait_fall <= 1'b0;
      end else begin
        if (rise && !h1) begin
          h1        <= 1'b1;
          wait_fall <= 1'b1;
          m1 <= ts_in;
          m3 <= ts3_in;
        end
        if (fall && wait_fall) begin
          wait_fall <= 1'b0;
          m2 <= ts2_in;
        end
        if (ld_pix) h2 <= h1;
      end
    end
  end

  assign word = '{ts: m1, ts2: m2, ts3: m3, row: ROW_W'(ROW)};

  // priority logic
  assign grant    = h2 & ~prio_in;
  assign prio_out = h2 | prio_in;
  assign bus_out  = (grant && ld_col) ? word : '0;

endmodule

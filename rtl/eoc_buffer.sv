// eoc_buffer: end-of-column buffer of one column.
//
// It holds one hit word (memory meoc) and a full flag. When the column
// reports that a hit word was moved over the column bus (load, at the end of
// Ld column), the buffer stores it. The full flags of all columns form a
// priority (scan out) chain: prio_in tells that a column earlier in the chain
// holds data, prio_out = prio_in | full, and the last prio_out is the RCU's
// PrioFromDet. While rd_col is high the first full buffer in the chain
// (granted) drives its word, with its column address, onto rd_bus; the
// falling edge of rd_col clears the granted buffer.
//
// One word per column, the chain order (column 0 first) and the gating of
// loads by the full flag are this design's choices where the description
// gives only the buffer's role.
module eoc_buffer
  import hvmaps_pkg::*;
#(
  parameter int unsigned COL = 0   // column address
) (
  input  logic      clk,
  input  logic      rst_n,
  input  hit_word_t col_bus,
  input  logic      load,
  input  logic      rd_col,
  input  logic      prio_in,
  output logic      prio_out,
  output logic      full,
  output eoc_word_t rd_bus
);
  hit_word_t meoc;
  logic      rd_col_q;
  logic      grant;
  logic      rd_fall;

  assign grant    = full & ~prio_in;
  assign prio_out = full | prio_in;
  assign rd_fall  = rd_col_q & ~rd_col;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      meoc     <= '0;
      full     <= 1'b0;
      rd_col_q <= 1'b0;
    end else begin
      rd_col_q <= rd_col;
      if (load && !full) begin
        meoc <= col_bus;
        full <= 1'b1;
      end else if (rd_fall && grant) begin
        full <= 1'b0;
      end
    end
  end

  assign rd_bus = (grant && rd_col) ? '{col: COL_W'(COL), hit: meoc} : '0;

endmodule

// hvmaps_pkg: sizes, word formats, configuration fields and helper functions
// shared by the HVMAPS test-chip readout RTL.
//
// The chip has a 29 x 124 matrix of hit-buffer slots below the pixel matrix,
// one end-of-column (EoC) buffer per column and a readout control unit (RCU).
// A hit is stored as a 20-bit Gray leading-edge time stamp (two 10-bit
// halves that count with the same code, one half moving on each TSCk edge),
// a 10-bit Gray trailing-edge time stamp, a 7-bit fine (TDC) time stamp and a
// 10-bit row address of which the 3 upper bits are always zero. The EoC adds
// a 5-bit column address. All of these widths, the 57-bit RCU configuration
// layout and the 25-bit per-column pixel register are taken from the chip
// description; the struct packing order is this design's choice.
package hvmaps_pkg;

  localparam int unsigned NCOL      = 29;   // columns
  localparam int unsigned NROW      = 124;  // hit buffer slots per column
  localparam int unsigned TS_W      = 20;   // leading-edge time stamp (Gray)
  localparam int unsigned TS2_W     = 10;   // trailing-edge time stamp (Gray)
  localparam int unsigned TS3_W     = 7;    // TDC fine time stamp
  localparam int unsigned ROW_W     = 10;   // row address (3 MS bits unused)
  localparam int unsigned COL_W     = 5;    // column address
  localparam int unsigned RCU_CFG_W = 57;   // QConfig[0:56]
  localparam int unsigned PIX_CFG_W = 25;   // pixel control register per column
  localparam int unsigned NDAC      = 34;   // 21 analog + 13 digital bias DACs
  localparam int unsigned DAC_W     = 6;
  localparam int unsigned DAC_CFG_W = 6 + NDAC*DAC_W; // q00,q01,qon0..3 + DACs
  localparam int unsigned HB_WR_PER_COL  = 5;  // hit-buffer RAM write rows per column
  localparam int unsigned PIX_WR_PER_COL = 7;  // pixel RAM write lines per column
  localparam int unsigned INJ_PER_COL    = 5;  // injection row lines per column

  // Hit data as it travels on the column bus (hit buffer -> EoC).
  typedef struct packed {
    logic [TS_W-1:0]  ts;
    logic [TS2_W-1:0] ts2;
    logic [TS3_W-1:0] ts3;
    logic [ROW_W-1:0] row;
  } hit_word_t;

  // Hit data on the EoC -> RCU bus: column address added.
  typedef struct packed {
    logic [COL_W-1:0] col;
    hit_word_t        hit;
  } eoc_word_t;

  // Decoded RCU configuration register (QConfig).
  typedef struct packed {
    logic [15:0] extra;          // SRExtraBits = QConfig[56:41]
    logic        countsheeps;    // QConfig[40] counting mode
    logic        ts_6bit;        // QConfig[39] (only used on another chip)
    logic [5:0]  ckdivend3;      // QConfig[38:33] TDC stamp divider
    logic        sendcounter;    // QConfig[32]
    logic [3:0]  resetckdivend;  // QConfig[31:28] Sync state length
    logic [7:0]  maxcycend;      // QConfig[27:20] hits read per load cycle
    logic [3:0]  slowdownend;    // QConfig[19:16] LdCol length
    logic [3:0]  timerend;       // QConfig[15:12] state machine divider
    logic [5:0]  ckdivend2;      // QConfig[11:6]  TS2 divider
    logic [5:0]  ckdivend;       // QConfig[5:0]   TS divider
  } rcu_cfg_t;

  function automatic rcu_cfg_t decode_rcu_cfg(input logic [RCU_CFG_W-1:0] q);
    rcu_cfg_t c;
    c.ckdivend      = q[5:0];
    c.ckdivend2     = q[11:6];
    c.timerend      = q[15:12];
    c.slowdownend   = q[19:16];
    c.maxcycend     = q[27:20];
    c.resetckdivend = q[31:28];
    c.sendcounter   = q[32];
    c.ckdivend3     = q[38:33];
    c.ts_6bit       = q[39];
    c.countsheeps   = q[40];
    c.extra         = q[56:41];
    return c;
  endfunction

  function automatic logic [9:0] bin2gray10(input logic [9:0] b);
    return b ^ (b >> 1);
  endfunction

  function automatic logic [9:0] gray2bin10(input logic [9:0] g);
    logic [9:0] b;
    b[9] = g[9];
    for (int i = 8; i >= 0; i--) b[i] = b[i+1] ^ g[i];
    return b;
  endfunction

  // 8b/10b comma and data words used by the readout state machine.
  localparam logic [7:0] K28_5 = 8'hBC;
  localparam logic [7:0] K28_1 = 8'h3C;
  localparam logic [7:0] K28_0 = 8'h1C;
  localparam logic [7:0] D10_5 = 8'hAA;
  localparam logic [7:0] HDR_COUNTER = 8'hC0; // header of the time stamp word
  localparam logic [7:0] HDR_HIT     = 8'hC1; // header of a hit word

  // A 32-bit frame for the serializer plus its per-byte comma flags.
  typedef struct packed {
    logic [31:0] data;
    logic [3:0]  comma;
  } frame_t;

  localparam frame_t IDLE_FRAME = '{data: {4{K28_5}}, comma: 4'b1111};

endpackage

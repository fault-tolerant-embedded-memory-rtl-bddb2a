// ftdi_pkg: shared sizes, sample layout and sensitivity-region masks of the
// frequency-time de-interleaver (FTDI) RAM tile with soft memory repair.
//
// A 20-bit de-interleaver sample holds 8 bits of I, 8 bits of Q and 4 bits of
// the carrier-to-noise ratio CN; a 40-bit memory word holds two samples, and
// bit 0 of the byte address picks one of them. The high-sensitivity region of
// a sample is the upper half of each field (I[7:4], Q[7:4], CN[3:2]) and the
// low-sensitivity region is the lower half (I[3:0], Q[3:0], CN[1:0]); both are
// 10 bits wide. Field widths and the region split follow the hardware
// measurement configuration of the repair scheme. The order of the fields
// inside a sample ({I, Q, CN}, I in the top bits) and the 16 words per
// physical row are this design's own choices.
package ftdi_pkg;

  // Sample fields
  localparam int unsigned I_W      = 8;
  localparam int unsigned Q_W      = 8;
  localparam int unsigned CN_W     = 4;
  localparam int unsigned SAMPLE_W = I_W + Q_W + CN_W;     // 20

  // Memory organisation
  localparam int unsigned NUM_INST      = 4;               // 1KxN instances per tile
  localparam int unsigned WORD_W        = 2 * SAMPLE_W;    // N = 40
  localparam int unsigned ROWS          = 1024;            // M, physical rows per instance
  localparam int unsigned WORDS_PER_ROW = 16;              // column multiplexing
  localparam int unsigned WORDS         = ROWS * WORDS_PER_ROW;
  localparam int unsigned WADDR_W       = $clog2(WORDS);   // 14 = addr[14:1]
  localparam int unsigned ROW_W         = $clog2(ROWS);    // 10
  localparam int unsigned INST_W        = $clog2(NUM_INST);
  localparam int unsigned ADDR_W        = 1 + WADDR_W + INST_W;  // 17 = addr[16:0]

  typedef struct packed {
    logic [I_W-1:0]  i;
    logic [Q_W-1:0]  q;
    logic [CN_W-1:0] cn;
  } sample_t;

  // Mask of the high-sensitivity bits of one sample: upper half of each field.
  function automatic logic [SAMPLE_W-1:0] sample_hi_mask();
    sample_t m;
    m.i  = {{(I_W/2){1'b1}},  {(I_W/2){1'b0}}};
    m.q  = {{(Q_W/2){1'b1}},  {(Q_W/2){1'b0}}};
    m.cn = {{(CN_W/2){1'b1}}, {(CN_W/2){1'b0}}};
    return m;
  endfunction

  localparam logic [SAMPLE_W-1:0] SAMPLE_HI_MASK = sample_hi_mask();
  localparam logic [SAMPLE_W-1:0] SAMPLE_LO_MASK = ~SAMPLE_HI_MASK;
  localparam logic [WORD_W-1:0]   WORD_HI_MASK   = {2{SAMPLE_HI_MASK}};
  localparam logic [WORD_W-1:0]   WORD_LO_MASK   = {2{SAMPLE_LO_MASK}};

  // Physical row of a word address: the low address bits select the column.
  function automatic logic [ROW_W-1:0] row_of(input logic [WADDR_W-1:0] waddr);
    return waddr[WADDR_W-1 -: ROW_W];
  endfunction

endpackage

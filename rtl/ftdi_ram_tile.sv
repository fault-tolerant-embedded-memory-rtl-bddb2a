// ftdi_ram_tile: frequency-time de-interleaver (FTDI) RAM tile with soft
// memory repair by permutation of sensitivity regions.
//
// The tile stores de-interleaver samples (8-bit I, 8-bit Q, 4-bit CN) in four
// single-port SRAM instances of 1K rows, 40 bits (two samples) per word and
// 16 words per row. Instead of spare rows and columns it keeps, per instance,
// a row address fault register of ceil(1024/i) bits. A memory BIST run marks
// a group of i rows when a read mismatch hits the high-sensitivity bits of a
// word (upper half of I, Q and CN) while its low-sensitivity bits are clean.
// In functional mode every access to a marked row goes through the ITL
// permutation, which exchanges the two regions, so the bits that matter most
// to the downstream error correction live in fault-free cells and only the
// least significant bits land on the faulty ones. The only cost on the data
// path is one 2:1 mux on the write path and one per instance on the read path.
//
// Functional interface (mbist_mode = 0):
//   addr[16:15] instance, addr[14:1] word in the instance (addr[14:5] is the
//   physical row), addr[0] sample within the word on reads (0: bits 19:0,
//   1: bits 39:20).
//   we[k]  writes (data & mask), both samples, into instance k at addr[14:1];
//          only the instance selected by addr[16:15] may be written.
//   out    the addressed 20-bit sample, valid one cycle after addr is
//          presented with we = 0 (synchronous SRAM read).
// MBIST interface (mbist_mode = 1): the BIST reads and writes the cells
// through the same ports, with the permutation off. It reports a mismatch
// with a one-cycle pulse on cur_err_out together with the failing address on
// test_addr, then shifts the 40-bit error register out on err_sout, one bit
// per cycle with err_shift high, most significant bit first. err_busy is high
// while a report is being taken in. Entering MBIST mode clears all fault
// registers.
//
// The block structure (four 1KxN instances, fault register beside each, ITL
// and 2:1 mux on the shared write path and on each read path, 4:1 instance mux
// and 2:1 sample mux, the AND of data and mask) and the port widths follow the
// published tile architecture; i = 4 is its main configuration. Column
// multiplexing, sample order, read latency and the BIST handshake are this
// design's own choices.
module ftdi_ram_tile
  import ftdi_pkg::*;
#(
  parameter int unsigned ROWS_PER_BIT = 4   // i
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mbist_mode,
  // functional / BIST data port
  input  logic [NUM_INST-1:0] we,
  input  logic [WORD_W-1:0]   data,
  input  logic [WORD_W-1:0]   mask,
  input  logic [ADDR_W-1:0]   addr,
  output logic [SAMPLE_W-1:0] out,
  // MBIST error reporting
  input  logic                cur_err_out,
  input  logic [ADDR_W-1:0]   test_addr,
  input  logic                err_sout,
  input  logic                err_shift,
  output logic                err_busy
);

  logic [WADDR_W-1:0]  waddr;
  logic [ROW_W-1:0]    row;
  logic [WORD_W-1:0]   wr_plain, wr_perm, wr_word;
  logic                repair_en_write;
  logic [NUM_INST-1:0] repair_en_read;
  logic [NUM_INST-1:0] row_fault;
  logic                clear_faults;
  logic [NUM_INST-1:0] set_en;
  logic [ROW_W-1:0]    set_row;
  logic [WORD_W-1:0]   rd_word [NUM_INST];
  logic [INST_W-1:0]   inst_q;
  logic                half_q;
  logic [WORD_W-1:0]   sel_word;

  assign waddr = addr[WADDR_W:1];
  assign row   = row_of(waddr);

  // Write path: AND with mask, ITL permutation, repair mux.
  assign wr_plain = data & mask;

  repair_itl u_itl_wr (.din(wr_plain), .dout(wr_perm));

  assign wr_word = repair_en_write ? wr_perm : wr_plain;

  error_capture_repair u_ecap (
    .clk            (clk),
    .rst_n          (rst_n),
    .mbist_mode     (mbist_mode),
    .cur_err_out    (cur_err_out),
    .test_addr      (test_addr),
    .err_sout       (err_sout),
    .err_shift      (err_shift),
    .busy           (err_busy),
    .clear_faults   (clear_faults),
    .set_en         (set_en),
    .set_row        (set_row),
    .addr           (addr),
    .row_fault      (row_fault),
    .repair_en_write(repair_en_write),
    .repair_en_read (repair_en_read)
  );

  for (genvar k = 0; k < NUM_INST; k++) begin : g_inst
    logic [WORD_W-1:0] rdata, rd_perm;

    row_fault_reg #(
      .ROWS        (ROWS),
      .ROWS_PER_BIT(ROWS_PER_BIT)
    ) u_fault (
      .clk         (clk),
      .rst_n       (rst_n),
      .clear       (clear_faults),
      .set_en      (set_en[k]),
      .set_row     (set_row),
      .lookup_row  (row),
      .lookup_fault(row_fault[k]),
      .fault_q     ()
    );

    ftdi_sram #(
      .DEPTH(WORDS),
      .WIDTH(WORD_W)
    ) u_sram (
      .clk  (clk),
      .we   (we[k]),
      .addr (waddr),
      .wdata(wr_word),
      .rdata(rdata)
    );

    // Read path: ITL permutation and repair mux per instance.
    repair_itl u_itl_rd (.din(rdata), .dout(rd_perm));

    assign rd_word[k] = repair_en_read[k] ? rd_perm : rdata;
  end

  // Output select, aligned with the one-cycle read latency.
  always_ff @(posedge clk) begin
    if (!rst_n) begin
      inst_q <= '0;
      half_q <= 1'b0;
    end else begin
      inst_q <= addr[ADDR_W-1 -: INST_W];
      half_q <= addr[0];
    end
  end

  assign sel_word = rd_word[inst_q];
  assign out      = half_q ? sel_word[WORD_W-1:SAMPLE_W] : sel_word[SAMPLE_W-1:0];

  // Only the instance that addr points at may be written.
  a_we_matches_addr: assert property (@(posedge clk) disable iff (!rst_n)
      (we == '0) || (we == NUM_INST'(1) << addr[ADDR_W-1 -: INST_W]));

endmodule

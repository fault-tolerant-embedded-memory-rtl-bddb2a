// error_capture_repair: error capture and repair enable logic of the FTDI
// RAM tile.
//
// MBIST mode (mbist_mode = 1). On entry to the mode it pulses `clear_faults`
// so that every row address fault register starts empty. When the memory
// BIST reports a read mismatch (`cur_err_out` high for one cycle) the logic
// latches the test address, then takes in the N-bit error register that the
// BIST shifts out serially, one bit per cycle in which `err_shift` is high,
// most significant bit first. With all N bits in, it ORs the error bits of the
// high-sensitivity region and of the low-sensitivity region; if the high
// region has an error and the low region has none, it pulses `set_en` for the
// failing instance with the failing physical row on `set_row`. Any other
// error pattern leaves the fault register as it is.
//
// Functional mode (mbist_mode = 0). `repair_en_write` is the fault bit, for
// the row being addressed, of the instance selected by the top address bits;
// it drives the write-path 2:1 repair mux in the same cycle.
// `repair_en_read[k]` is instance k's fault bit for the addressed row,
// registered so that it lines up with the synchronous read data one cycle
// later. Both are forced to 0 in MBIST mode so that the test sees the raw
// cells.
//
// Timing: capture of one error takes 1 + N + 1 cycles (latch, shift, decide).
// The BIST must not report a new mismatch until `busy` has fallen.
//
// The mismatch signal, the serial error register, the region test by
// reduction OR and the rule "high region faulty, low region clean" follow the
// repair algorithm. The shift order, the one-cycle strobe, the clearing on
// mode entry and the busy handshake are this design's choices.
module error_capture_repair
  import ftdi_pkg::*;
#(
  parameter logic [WORD_W-1:0] HI_MASK = WORD_HI_MASK,
  parameter logic [WORD_W-1:0] LO_MASK = WORD_LO_MASK
) (
  input  logic                clk,
  input  logic                rst_n,
  input  logic                mbist_mode,
  // MBIST side
  input  logic                cur_err_out,
  input  logic [ADDR_W-1:0]   test_addr,
  input  logic                err_sout,
  input  logic                err_shift,
  output logic                busy,
  // to the row address fault registers
  output logic                clear_faults,
  output logic [NUM_INST-1:0] set_en,
  output logic [ROW_W-1:0]    set_row,
  // functional side
  input  logic [ADDR_W-1:0]   addr,
  input  logic [NUM_INST-1:0] row_fault,  // fault bit of each instance at addr's row
  output logic                repair_en_write,
  output logic [NUM_INST-1:0] repair_en_read
);

  typedef enum logic [1:0] {S_IDLE, S_SHIFT, S_DECIDE} state_t;

  state_t                 state_q;
  logic                   mode_q;
  logic [WORD_W-1:0]      err_sr_q;
  logic [$clog2(WORD_W):0] cnt_q;
  logic [INST_W-1:0]      inst_q;
  logic [ROW_W-1:0]       row_q;
  logic                   hi_err, lo_err;

  assign hi_err = |(err_sr_q & HI_MASK);
  assign lo_err = |(err_sr_q & LO_MASK);

  assign clear_faults = mbist_mode && !mode_q;
  assign busy         = (state_q != S_IDLE);
  assign set_row      = row_q;

  always_comb begin
    set_en = '0;
    if (state_q == S_DECIDE && mbist_mode && hi_err && !lo_err) set_en[inst_q] = 1'b1;
  end

  always_ff @(posedge clk) begin
    if (!rst_n) begin
      state_q  <= S_IDLE;
      mode_q   <= 1'b0;
      err_sr_q <= '0;
      cnt_q    <= '0;
      inst_q   <= '0;
      row_q    <= '0;
    end else begin
      mode_q <= mbist_mode;
      if (!mbist_mode) begin
        state_q <= S_IDLE;
      end else begin
        unique case (state_q)
          S_IDLE: if (cur_err_out) begin
            inst_q  <= test_addr[ADDR_W-1 -: INST_W];
            row_q   <= row_of(test_addr[WADDR_W:1]);
            cnt_q   <= '0;
            state_q <= S_SHIFT;
          end
          S_SHIFT: if (err_shift) begin
            err_sr_q <= {err_sr_q[WORD_W-2:0], err_sout};
            cnt_q    <= cnt_q + 1'b1;
            if (cnt_q == ($clog2(WORD_W)+1)'(WORD_W - 1)) state_q <= S_DECIDE;
          end
          S_DECIDE: state_q <= S_IDLE;
          default:  state_q <= S_IDLE;
        endcase
      end
    end
  end

  // Repair enables
  logic [NUM_INST-1:0] rd_en_q;

  always_ff @(posedge clk) begin
    if (!rst_n) rd_en_q <= '0;
    else        rd_en_q <= mbist_mode ? '0 : row_fault;
  end

  assign repair_en_read  = rd_en_q;
  assign repair_en_write = !mbist_mode && row_fault[addr[ADDR_W-1 -: INST_W]];

  // A new mismatch may only be reported once the previous one is captured.
  a_no_overlap: assert property (@(posedge clk) disable iff (!rst_n)
                                 (mbist_mode && busy) |-> !cur_err_out);

endmodule

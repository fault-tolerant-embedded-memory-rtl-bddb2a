// row_fault_reg: row address fault register of one memory instance.
//
// Holds ceil(M/i) flip-flops, one per group of i consecutive physical rows
// (M = ROWS, i = ROWS_PER_BIT). A bit set to 1 marks every row of its group for
// repair: data written to or read from those rows passes through the ITL
// permutation. The register lives outside the memory macro so it costs
// ceil(M/i) bits; with M = 1024 and i = 4 that is 256 flip-flops.
//
// Interface: `clear` zeroes all bits (start of a memory test), `set_en`
// sets the bit of the group that holds `set_row` (bits are only ever set,
// so several faulty rows of one group accumulate). A combinational lookup
// port returns the bit of the group that holds `lookup_row`, the row of the
// current read or write; `fault_q` shows the whole register.
// `clear` wins over `set_en`. A synchronous active-low reset clears the
// register.
//
// The size formula, the sharing of one bit among i rows and the set-only
// behaviour follow the repair scheme; the lookup port, the reset and the
// priority of clear are this design's choices.
module row_fault_reg #(
  parameter int unsigned ROWS         = 1024,
  parameter int unsigned ROWS_PER_BIT = 4,
  localparam int unsigned BITS        = (ROWS + ROWS_PER_BIT - 1) / ROWS_PER_BIT,
  localparam int unsigned ROW_W       = $clog2(ROWS)
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic             clear,
  input  logic             set_en,
  input  logic [ROW_W-1:0] set_row,
  input  logic [ROW_W-1:0] lookup_row,
  output logic             lookup_fault,
  output logic [BITS-1:0]  fault_q
);

  function automatic int unsigned group_of(input logic [ROW_W-1:0] row);
    return int'(row) / ROWS_PER_BIT;
  endfunction

  always_ff @(posedge clk) begin
    if (!rst_n || clear) begin
      fault_q <= '0;
    end else if (set_en) begin
      fault_q[group_of(set_row)] <= 1'b1;
    end
  end

  assign lookup_fault = fault_q[group_of(lookup_row)];

  initial assert (ROWS_PER_BIT >= 1 && ROWS_PER_BIT <= ROWS)
    else $error("ROWS_PER_BIT must lie between 1 and ROWS");

endmodule

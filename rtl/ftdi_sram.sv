// ftdi_sram: one "1KxN" FTDI SRAM instance, modelled as a memory array.
//
// 1024 physical rows with 16 words of N = 40 bits per row give 16K words,
// addressed by a 14-bit word address whose upper 10 bits are the row and whose
// lower 4 bits the column. Single port: when we is high at a rising clock edge
// wdata is written to waddr; every edge also latches the word at addr into
// rdata (read-before-write), so read data appears one cycle after the address.
// The instance size (1K rows, 40-bit data, 4 instances per tile) comes from the
// tile's address and data map; the column multiplexing, the synchronous read
// and the read-before-write behaviour are this design's own choices. The
// contents are not reset, as in an SRAM macro.
module ftdi_sram #(
  parameter int unsigned DEPTH = 16384,
  parameter int unsigned WIDTH = 40,
  localparam int unsigned AW   = $clog2(DEPTH)
) (
  input  logic             clk,
  input  logic             we,
  input  logic [AW-1:0]    addr,
  input  logic [WIDTH-1:0] wdata,
  output logic [WIDTH-1:0] rdata
);

  logic [WIDTH-1:0] mem [DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wdata;
    rdata <= mem[addr];
  end

endmodule

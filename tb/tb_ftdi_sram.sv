// tb_ftdi_sram: self-checking test of one FTDI SRAM instance.
//
// Writes random words to random addresses of the full 16K x 40 array while a
// reference array in the testbench records them, reads them back and checks
// the data one cycle after the address (synchronous read). Also checks
// read-before-write: a write cycle returns the word that was there before.
module tb_ftdi_sram;

  localparam int DEPTH = 16384;
  localparam int WIDTH = 40;

  logic             clk = 0;
  logic             we;
  logic [13:0]      addr;
  logic [WIDTH-1:0] wdata, rdata;
  logic [WIDTH-1:0] ref_mem [DEPTH];
  bit               written [DEPTH];
  int checks = 0, failures = 0;

  ftdi_sram dut (.clk(clk), .we(we), .addr(addr), .wdata(wdata), .rdata(rdata));

  always #5 clk = ~clk;

  task automatic write_word(input logic [13:0] a, input logic [WIDTH-1:0] d);
    logic [WIDTH-1:0] old;
    we = 1; addr = a; wdata = d;
    old = ref_mem[a];
    @(posedge clk); #1;
    if (written[a]) begin
      checks++;
      if (rdata !== old) begin
        failures++;
        $display("FAIL read-before-write a=%0d got=%h exp=%h", a, rdata, old);
      end
    end
    ref_mem[a] = d; written[a] = 1'b1;
    we = 0;
  endtask

  task automatic read_word(input logic [13:0] a);
    we = 0; addr = a;
    @(posedge clk); #1;
    checks++;
    if (rdata !== ref_mem[a]) begin
      failures++;
      $display("FAIL read a=%0d got=%h exp=%h", a, rdata, ref_mem[a]);
    end
  endtask

  initial begin
    logic [13:0] a;
    we = 0; addr = '0; wdata = '0;
    @(posedge clk); #1;
    // first and last word, then every row's first word
    write_word(14'd0, 40'hAB_CDEF_0123);
    write_word(14'd16383, 40'h12_3456_789A);
    for (int r = 0; r < 1024; r++) write_word(14'(r * 16), {$urandom(), $urandom()});
    for (int n = 0; n < 3000; n++) write_word(14'($urandom_range(0, DEPTH-1)), {$urandom(), $urandom()});
    // overwrite some written words to test read-before-write
    for (int r = 0; r < 200; r++) write_word(14'(r * 16), {$urandom(), $urandom()});
    read_word(14'd0);
    read_word(14'd16383);
    for (int n = 0; n < DEPTH; n++) if (written[n]) read_word(14'(n));
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_ftdi_ram_tile_rows_per_bit: end-to-end runs of the FTDI RAM tile for
// the other fault register sizes: i = 1 and i = 2 rows per bit (1024 and
// 512 flip-flops per instance, the other two columns of the published
// overhead table) and i = M/4 = 256 (4 flip-flops per instance, the smallest
// configuration discussed). The i = 2 run uses March C- instead of MATS+ as
// its memory test. Each run has its own tile and fault set; the
// testbench waits for all three and adds up their checks.
module tb_ftdi_ram_tile_rows_per_bit;

  bit done1, done2, done256;
  int checks1, checks2, checks256, fail1, fail2, fail256;
  int cycles = 0;
  bit clk = 0;

  tile_e2e_run #(.RPB(1))   run1   (.done(done1),   .checks(checks1),   .failures(fail1));
  tile_e2e_run #(.RPB(2), .MARCH(1)) run2  (.done(done2),   .checks(checks2),   .failures(fail2));
  tile_e2e_run #(.RPB(256)) run256 (.done(done256), .checks(checks256), .failures(fail256));

  always #5 clk = ~clk;

  initial begin
    wait (done1 && done2 && done256);
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2 + checks256, fail1 + fail2 + fail256);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks1 + checks2 + checks256, fail1 + fail2 + fail256 + 1);
    $finish;
  end

endmodule

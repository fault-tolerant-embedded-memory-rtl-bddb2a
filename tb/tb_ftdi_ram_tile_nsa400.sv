// tb_ftdi_ram_tile_nsa400: the high-fault workload, N_SA = 400 stuck-at
// faults alternating between stuck-at-0 and stuck-at-1 in a burst over 400
// consecutive words (25 rows), once for each of the top four bits of I or Q:
// I[7] and I[6] of the lower sample, I[5] and Q[4] of the upper sample. The
// tile runs at its default size with i = 4. Each run must mark the burst's
// rows and read back every written word with its high region intact, while
// the reference count shows how many high-region bit errors the same faults
// cause without the repair.
module tb_ftdi_ram_tile_nsa400;

  bit done_a, done_b, done_c, done_d;
  int chk_a, chk_b, chk_c, chk_d, fail_a, fail_b, fail_c, fail_d;
  bit clk = 0;

  tile_e2e_run #(.RPB(4), .NSA(400), .BURST_BIT(19), .BURST_BASE(256))
    run_i7 (.done(done_a), .checks(chk_a), .failures(fail_a));
  tile_e2e_run #(.RPB(4), .NSA(400), .BURST_BIT(18), .BURST_BASE(1000))
    run_i6 (.done(done_b), .checks(chk_b), .failures(fail_b));
  tile_e2e_run #(.RPB(4), .NSA(400), .BURST_BIT(37), .BURST_BASE(8000))
    run_i5 (.done(done_c), .checks(chk_c), .failures(fail_c));
  tile_e2e_run #(.RPB(4), .NSA(400), .BURST_BIT(28), .BURST_BASE(16200))
    run_q4 (.done(done_d), .checks(chk_d), .failures(fail_d));

  always #5 clk = ~clk;

  initial begin
    wait (done_a && done_b && done_c && done_d);
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c + chk_d,
             fail_a + fail_b + fail_c + fail_d);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", chk_a + chk_b + chk_c + chk_d,
             fail_a + fail_b + fail_c + fail_d + 1);
    $finish;
  end

endmodule

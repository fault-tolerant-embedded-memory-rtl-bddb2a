// tb_row_fault_reg: self-checking test of the row address fault register.
//
// Runs three instances side by side with i = 1, 2 and 4 rows per bit (the
// three sizes of the published overhead table), M = 1024 rows. Sets random
// rows, keeps a reference set of marked groups, and checks the register
// width, the whole register and the lookup of every row. Also checks that
// clear empties it and wins over a simultaneous set, and that reset empties
// it.
module tb_row_fault_reg;

  localparam int M = 1024;

  logic       clk = 0, rst_n, clear, set_en;
  logic [9:0] set_row, lookup_row;
  logic       lk1, lk2, lk4;
  logic [1023:0] q1;
  logic [511:0]  q2;
  logic [255:0]  q4;
  bit   ref1 [1024], ref2 [512], ref4 [256];
  int checks = 0, failures = 0;

  row_fault_reg #(.ROWS(M), .ROWS_PER_BIT(1)) dut1 (.clk, .rst_n, .clear, .set_en, .set_row,
      .lookup_row, .lookup_fault(lk1), .fault_q(q1));
  row_fault_reg #(.ROWS(M), .ROWS_PER_BIT(2)) dut2 (.clk, .rst_n, .clear, .set_en, .set_row,
      .lookup_row, .lookup_fault(lk2), .fault_q(q2));
  row_fault_reg #(.ROWS(M), .ROWS_PER_BIT(4)) dut4 (.clk, .rst_n, .clear, .set_en, .set_row,
      .lookup_row, .lookup_fault(lk4), .fault_q(q4));

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic set_one(input int r);
    set_en = 1; set_row = 10'(r);
    @(posedge clk); #1;
    set_en = 0;
    ref1[r] = 1; ref2[r/2] = 1; ref4[r/4] = 1;
  endtask

  task automatic check_all();
    for (int r = 0; r < M; r++) begin
      lookup_row = 10'(r);
      #1;
      chk(lk1 == ref1[r],   $sformatf("i=1 lookup row %0d", r));
      chk(lk2 == ref2[r/2], $sformatf("i=2 lookup row %0d", r));
      chk(lk4 == ref4[r/4], $sformatf("i=4 lookup row %0d", r));
    end
    for (int b = 0; b < 256; b++) chk(q4[b] == ref4[b], $sformatf("i=4 bit %0d", b));
    for (int b = 0; b < 512; b++) chk(q2[b] == ref2[b], $sformatf("i=2 bit %0d", b));
  endtask

  task automatic clear_ref();
    foreach (ref1[k]) ref1[k] = 0;
    foreach (ref2[k]) ref2[k] = 0;
    foreach (ref4[k]) ref4[k] = 0;
  endtask

  initial begin
    rst_n = 0; clear = 0; set_en = 0; set_row = '0; lookup_row = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    chk($bits(q1) == 1024 && $bits(q2) == 512 && $bits(q4) == 256, "register widths");
    chk(q1 == '0 && q2 == '0 && q4 == '0, "empty after reset");
    set_one(0); set_one(5); set_one(1023); set_one(514);
    for (int n = 0; n < 40; n++) set_one($urandom_range(0, M-1));
    check_all();
    // clear has priority over set
    clear = 1; set_en = 1; set_row = 10'd77;
    @(posedge clk); #1;
    clear = 0; set_en = 0;
    clear_ref();
    check_all();
    for (int n = 0; n < 30; n++) set_one($urandom_range(0, M-1));
    check_all();
    rst_n = 0;
    @(posedge clk); #1;
    rst_n = 1;
    clear_ref();
    check_all();
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

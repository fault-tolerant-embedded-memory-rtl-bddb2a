// tb_error_capture_repair: self-checking test of the error capture and
// repair enable logic.
//
// MBIST mode: checks the clear pulse on mode entry, then reports random
// error words (high region only, low region only, both, none) at random
// addresses, shifting them in serially with random gaps in err_shift. A
// set request must appear, for the right instance and row, exactly when the
// high region (I[7:4], Q[7:4], CN[3:2] of either sample, mask F0F0C F0F0C)
// has an error and the low region has none, and in the cycle after the 40th
// shifted bit. Functional mode: checks repair_en_write against the fault bit
// of the addressed instance in the same cycle, repair_en_read one cycle
// later, and that both stay 0 in MBIST mode.
module tb_error_capture_repair;

  localparam logic [39:0] HI = 40'hF0F0C_F0F0C;
  localparam logic [39:0] LO = 40'h0F0F3_0F0F3;

  logic        clk = 0, rst_n, mbist_mode, cur_err_out, err_sout, err_shift, busy;
  logic [16:0] test_addr, addr;
  logic        clear_faults;
  logic [3:0]  set_en, row_fault, repair_en_read;
  logic [9:0]  set_row;
  logic        repair_en_write;
  int checks = 0, failures = 0;
  int n_set = 0, n_noset = 0;

  error_capture_repair dut (.*);

  always #5 clk = ~clk;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      $display("FAIL %s", what);
    end
  endtask

  task automatic report(input logic [16:0] a, input logic [39:0] err);
    bit exp_set;
    int cycles;
    exp_set = (|(err & HI)) && !(|(err & LO));
    cur_err_out = 1; test_addr = a;
    @(posedge clk); #1;
    cur_err_out = 0; test_addr = $urandom();
    chk(busy, "busy after report");
    for (int b = 39; b >= 0; b--) begin
      while ($urandom_range(0, 3) == 0) begin   // random gaps
        err_shift = 0; err_sout = $urandom();
        @(posedge clk); #1;
        chk(set_en == '0, "no set while shifting");
      end
      err_shift = 1; err_sout = err[b];
      @(posedge clk); #1;
      if (b > 0) chk(set_en == '0, "no set before last bit");
    end
    err_shift = 0;
    // decide cycle: the cycle right after the last bit
    if (exp_set) begin
      chk(set_en == (4'b1 << a[16:15]), $sformatf("set_en for addr %h err %h", a, err));
      chk(set_row == a[14:5], "set_row");
      n_set++;
    end else begin
      chk(set_en == '0, $sformatf("no set for err %h", err));
      n_noset++;
    end
    chk(busy, "busy in decide cycle");
    @(posedge clk); #1;
    chk(set_en == '0 && !busy, "idle after decide");
  endtask

  initial begin
    rst_n = 0; mbist_mode = 0; cur_err_out = 0; err_sout = 0; err_shift = 0;
    test_addr = '0; addr = '0; row_fault = '0;
    repeat (2) @(posedge clk); #1;
    rst_n = 1;
    chk(!clear_faults, "no clear in functional mode");
    mbist_mode = 1;
    #1;
    chk(clear_faults, "clear on entry to MBIST mode");
    @(posedge clk); #1;
    chk(!clear_faults, "clear is one cycle");
    report({2'd2, 10'd37, 4'd3, 1'b0}, 40'h80000_00000);   // I MSB of upper sample
    report({2'd1, 10'd512, 4'd0, 1'b0}, 40'h00000_00004);  // CN[2] of lower sample
    report({2'd0, 10'd3, 4'd9, 1'b0}, 40'h80000_00001);    // high and low: no set
    report({2'd3, 10'd1023, 4'd15, 1'b0}, 40'h01000_00000);// low only: no set
    report({2'd3, 10'd1, 4'd1, 1'b0}, 40'h0);              // empty word: no set
    for (int n = 0; n < 60; n++) begin
      logic [39:0] e;
      case ($urandom_range(0, 2))
        0: e = {$urandom(), $urandom()} & HI;
        1: e = {$urandom(), $urandom()} & LO;
        default: e = {$urandom(), $urandom()};
      endcase
      report(17'($urandom()), e);
    end
    // repair enables are off in MBIST mode
    row_fault = 4'hF; addr = 17'h1_0000;
    @(posedge clk); #1;
    chk(!repair_en_write && repair_en_read == '0, "repair off in MBIST mode");
    // functional mode
    mbist_mode = 0;
    for (int n = 0; n < 200; n++) begin
      logic [3:0] f;
      f = 4'($urandom());
      row_fault = f; addr = 17'($urandom());
      #1;
      chk(repair_en_write == f[addr[16:15]], "repair_en_write follows addressed instance");
      @(posedge clk); #1;
      chk(repair_en_read == f, "repair_en_read registered one cycle");
    end
    chk(n_set > 0 && n_noset > 0, "both outcomes seen");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

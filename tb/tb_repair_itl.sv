// tb_repair_itl: self-checking test of the ITL region exchange.
//
// Drives random 40-bit words and compares the output with a reference built
// from fixed bit slices of the {I[7:0], Q[7:0], CN[3:0]} sample layout: the
// upper and lower nibble of I and of Q and the upper and lower bit pair of CN
// change places, in both samples. Also checks that applying the block twice
// gives back the input.
module tb_repair_itl;

  logic [39:0] din, dout, dout2;
  int checks = 0, failures = 0;

  repair_itl dut  (.din(din),  .dout(dout));
  repair_itl dut2 (.din(dout), .dout(dout2));

  function automatic logic [19:0] ref_sample(input logic [19:0] s);
    return {s[15:12], s[19:16], s[7:4], s[11:8], s[1:0], s[3:2]};
  endfunction

  task automatic check(input logic [39:0] w);
    logic [39:0] exp;
    din = w;
    #1;
    exp = {ref_sample(w[39:20]), ref_sample(w[19:0])};
    checks++;
    if (dout !== exp) begin
      failures++;
      $display("FAIL itl in=%h out=%h exp=%h", w, dout, exp);
    end
    checks++;
    if (dout2 !== w) begin
      failures++;
      $display("FAIL itl twice in=%h got=%h", w, dout2);
    end
  endtask

  initial begin
    check('0);
    check('1);
    check(40'hF0F0C_F0F0C);   // only high-region bits set
    check(40'h0F0F3_0F0F3);   // only low-region bits set
    for (int n = 0; n < 40; n++) check(40'(1) << n);
    for (int n = 0; n < 500; n++) check({$urandom(), $urandom()});
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

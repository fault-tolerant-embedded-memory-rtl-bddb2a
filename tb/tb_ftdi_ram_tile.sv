// tb_ftdi_ram_tile: end-to-end test of the FTDI RAM tile at its default size
// (4 instances x 16K words x 40 bits, 1024 rows each, i = 4 rows per fault
// register bit).
//
// 1. Stuck-at faults are placed in the SRAM cells: at every falling clock
//    edge the testbench forces each faulty bit back to its stuck value, so a
//    write cannot change it. A few hand-placed faults cover the cases of the
//    repair rule (high region only, low region only, both, and a word whose
//    stuck-at-1 bit is in the low region but whose stuck-at-0 bit is in the
//    high region); the rest are random.
// 2. A behavioural memory BIST runs the MATS+ march {any(w0); up(r0,w1);
//    down(r1,w0)} over every word through the tile's own ports. Each word is
//    read as its two 20-bit halves; on a mismatch the BIST pulses cur_err_out
//    and shifts the 40-bit error word out serially.
// 3. A reference model, written here independently of the RTL, marks a
//    group of four rows when a single read's error word has a high-region
//    error and no low-region error.
// 4. In functional mode the test writes random data under random masks to
//    the faulty words, to fault-free rows that share a fault register bit
//    with them, and to random words, reads both samples back in
//    back-to-back cycles and compares with the reference (data AND mask,
//    permuted when the group is marked, stuck bits applied, permuted back).
//    It also peeks at the stored word to check that marked groups hold the
//    permuted data. For every word whose only faults sit in the high
//    region, it checks that the high region of the read data is intact.
// 5. A second BIST pass with the faults removed must clear every mark.
// Each mechanism (error report, mark, rejected mark, repaired write and
// read, shared-bit repair, mask, both output halves, mode switch, clear)
// is counted and must happen at least once.
module tb_ftdi_ram_tile;

  localparam int NI = 4, WORDS = 16384, RPB = 4;
  localparam logic [39:0] HI = 40'hF0F0C_F0F0C;
  localparam logic [39:0] LO = 40'h0F0F3_0F0F3;
  localparam int MAXF = 64;

  logic        clk = 0, rst_n, mbist_mode;
  logic [3:0]  we;
  logic [39:0] data, mask;
  logic [16:0] addr, test_addr;
  logic [19:0] out;
  logic        cur_err_out, err_sout, err_shift, err_busy;

  ftdi_ram_tile dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

  // ---------------- stuck-at fault list ----------------
  int   nf = 0;
  int   f_inst [MAXF];
  int   f_word [MAXF];
  int   f_bit  [MAXF];
  bit   f_val  [MAXF];
  bit   faults_on = 0;

  function automatic bit has_fault(input int k, input int w, input int b);
    for (int n = 0; n < nf; n++)
      if (f_inst[n] == k && f_word[n] == w && f_bit[n] == b) return 1;
    return 0;
  endfunction

  task automatic add_fault(input int k, input int w, input int b, input bit v);
    if (nf < MAXF && !has_fault(k, w, b)) begin
      f_inst[nf] = k; f_word[nf] = w; f_bit[nf] = b; f_val[nf] = v;
      nf++;
    end
  endtask

  always @(negedge clk) if (faults_on) begin
    for (int n = 0; n < nf; n++) begin
      case (f_inst[n])
        0: dut.g_inst[0].u_sram.mem[f_word[n]][f_bit[n]] = f_val[n];
        1: dut.g_inst[1].u_sram.mem[f_word[n]][f_bit[n]] = f_val[n];
        2: dut.g_inst[2].u_sram.mem[f_word[n]][f_bit[n]] = f_val[n];
        default: dut.g_inst[3].u_sram.mem[f_word[n]][f_bit[n]] = f_val[n];
      endcase
    end
  end

  function automatic logic [39:0] peek(input int k, input int w);
    case (k)
      0: return dut.g_inst[0].u_sram.mem[w];
      1: return dut.g_inst[1].u_sram.mem[w];
      2: return dut.g_inst[2].u_sram.mem[w];
      default: return dut.g_inst[3].u_sram.mem[w];
    endcase
  endfunction

  // stuck bits of one word: value mask and which-bits mask
  function automatic void stuck_of(input int k, input int w,
                                   output logic [39:0] sa0, output logic [39:0] sa1);
    sa0 = '0; sa1 = '0;
    if (!faults_on) return;
    for (int n = 0; n < nf; n++)
      if (f_inst[n] == k && f_word[n] == w) begin
        if (f_val[n]) sa1[f_bit[n]] = 1'b1;
        else          sa0[f_bit[n]] = 1'b1;
      end
  endfunction

  // ---------------- reference model ----------------
  bit ref_mark [NI][1024/RPB];

  function automatic logic [19:0] itl_sample(input logic [19:0] s);
    return {s[15:12], s[19:16], s[7:4], s[11:8], s[1:0], s[3:2]};
  endfunction

  function automatic logic [39:0] itl(input logic [39:0] w);
    return {itl_sample(w[39:20]), itl_sample(w[19:0])};
  endfunction

  function automatic bit marked(input int k, input int w);
    return ref_mark[k][(w / 16) / RPB];
  endfunction

  // marking rule applied to the error word of one read
  function automatic bit mark_rule(input logic [39:0] e);
    return (|(e & HI)) && !(|(e & LO));
  endfunction

  task automatic build_ref_marks();
    foreach (ref_mark[k, g]) ref_mark[k][g] = 0;
    if (!faults_on) return;
    for (int n = 0; n < nf; n++) begin
      logic [39:0] sa0, sa1;
      stuck_of(f_inst[n], f_word[n], sa0, sa1);
      // r0 reads see the stuck-at-1 bits, r1 reads the stuck-at-0 bits
      if (mark_rule(sa1) || mark_rule(sa0)) ref_mark[f_inst[n]][(f_word[n] / 16) / RPB] = 1;
    end
  endtask

  // ---------------- mechanism counters ----------------
  int c_err_reports = 0, c_mark_groups = 0, c_rejected = 0, c_rep_write = 0,
      c_rep_read = 0, c_shared = 0, c_mask = 0, c_half0 = 0, c_half1 = 0,
      c_mode_sw = 0, c_cleared = 0, c_saved = 0;

  task automatic chk(input bit cond, input string what);
    checks++;
    if (!cond) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic logic [16:0] mk_addr(input int k, input int w, input bit h);
    return {2'(k), 14'(w), h};
  endfunction

  // ---------------- behavioural MATS+ BIST ----------------
  task automatic bist_write(input int k, input int w, input logic [39:0] d);
    we = 4'b1 << k; addr = mk_addr(k, w, 0); data = d; mask = '1;
    @(posedge clk); #1;
    we = '0;
  endtask

  task automatic bist_report(input int k, input int w, input logic [39:0] e);
    cur_err_out = 1; test_addr = mk_addr(k, w, 0);
    @(posedge clk); #1;
    cur_err_out = 0;
    for (int b = 39; b >= 0; b--) begin
      err_shift = 1; err_sout = e[b];
      @(posedge clk); #1;
    end
    err_shift = 0;
    while (err_busy) begin
      @(posedge clk); #1;
    end
    c_err_reports++;
  endtask

  task automatic bist_read(input int k, input int w, input logic [39:0] exp);
    logic [39:0] got;
    addr = mk_addr(k, w, 0);
    @(posedge clk); #1;
    got[19:0] = out;
    addr = mk_addr(k, w, 1);
    @(posedge clk); #1;
    got[39:20] = out;
    if (got != exp) bist_report(k, w, got ^ exp);
  endtask

  task automatic run_mats_plus();
    mbist_mode = 1; c_mode_sw++;
    @(posedge clk); #1;
    for (int k = 0; k < NI; k++)
      for (int w = 0; w < WORDS; w++) bist_write(k, w, '0);
    for (int k = 0; k < NI; k++)
      for (int w = 0; w < WORDS; w++) begin
        bist_read(k, w, '0);
        bist_write(k, w, '1);
      end
    for (int k = NI - 1; k >= 0; k--)
      for (int w = WORDS - 1; w >= 0; w--) begin
        bist_read(k, w, '1);
        bist_write(k, w, '0);
      end
    mbist_mode = 0; c_mode_sw++;
    @(posedge clk); #1;
  endtask

  // ---------------- functional traffic ----------------
  task automatic func_word(input int k, input int w);
    logic [39:0] d, m, st, phys, rd, sa0, sa1;
    bit mk;
    d = {$urandom(), $urandom()};
    m = ($urandom_range(0, 2) == 0) ? {$urandom(), $urandom()} : '1;
    if (m != '1) c_mask++;
    mk = marked(k, w);
    stuck_of(k, w, sa0, sa1);
    st   = d & m;
    phys = ((mk ? itl(st) : st) & ~sa0) | sa1;
    rd   = mk ? itl(phys) : phys;
    we = 4'b1 << k; addr = mk_addr(k, w, $urandom()); data = d; mask = m;
    @(posedge clk); #1;
    we = '0;
    if (mk) c_rep_write++;
    if (mk && sa0 == '0 && sa1 == '0) c_shared++;
    // back-to-back reads of both samples
    addr = mk_addr(k, w, 0);
    @(posedge clk); #1;
    chk(out == rd[19:0], $sformatf("read inst %0d word %0d half 0: %h exp %h", k, w, out, rd[19:0]));
    c_half0++;
    // the stuck bits have been re-applied at the falling edge by now
    chk(peek(k, w) == phys, $sformatf("stored word inst %0d word %0d", k, w));
    if (mk) c_rep_read++;
    addr = mk_addr(k, w, 1);
    @(posedge clk); #1;
    chk(out == rd[39:20], $sformatf("read inst %0d word %0d half 1: %h exp %h", k, w, out, rd[39:20]));
    c_half1++;
    // faults only in the high region of the cells: the sensitive data survive
    if (((sa0 | sa1) != '0) && (((sa0 | sa1) & LO) == '0)) begin
      chk(((rd ^ st) & HI) == '0, "high region intact after repair");
      chk(mk, "high-region-only faulty word is marked");
      c_saved++;
    end
  endtask

  task automatic functional_pass();
    for (int n = 0; n < nf; n++) begin
      func_word(f_inst[n], f_word[n]);
      // another row of the same fault register group
      func_word(f_inst[n], (f_word[n] ^ 16) % WORDS);
    end
    for (int n = 0; n < 200; n++) func_word($urandom_range(0, NI-1), $urandom_range(0, WORDS-1));
  endtask

  initial begin
    rst_n = 0; mbist_mode = 0; we = '0; data = '0; mask = '1; addr = '0;
    test_addr = '0; cur_err_out = 0; err_sout = 0; err_shift = 0;
    // hand-placed faults (instance, word, bit, stuck value)
    add_fault(0, 16'h0040, 39, 1'b0);  // I[7] upper sample: high only -> marked
    add_fault(0, 16'h0100, 19, 1'b1);  // I[7] lower sample and ...
    add_fault(0, 16'h0100, 12, 1'b1);  // ... I[0] lower sample: both -> not marked
    add_fault(0, 16'h0200, 0,  1'b1);  // CN[0]: low only -> not marked
    add_fault(0, 16'h0300, 11, 1'b0);  // Q[7] s-a-0 (seen by r1: high only) ...
    add_fault(0, 16'h0300, 4,  1'b1);  // ... Q[0] s-a-1 (seen by r0: low only) -> marked
    add_fault(1, 16'h3FFF, 3,  1'b0);  // CN[3] in the last word
    for (int n = 0; n < 40; n++)
      add_fault($urandom_range(0, NI-1), $urandom_range(0, WORDS-1), $urandom_range(0, 39), 1'($urandom()));
    repeat (3) @(posedge clk); #1;
    rst_n = 1;
    @(posedge clk); #1;

    faults_on = 1;
    build_ref_marks();
    for (int k = 0; k < NI; k++)
      for (int g = 0; g < 1024/RPB; g++) if (ref_mark[k][g]) c_mark_groups++;
    for (int n = 0; n < nf; n++) begin
      logic [39:0] sa0, sa1;
      stuck_of(f_inst[n], f_word[n], sa0, sa1);
      if (!mark_rule(sa0) && !mark_rule(sa1) && (|((sa0 | sa1) & HI))) c_rejected++;
    end
    run_mats_plus();
    // compare the fault registers with the reference
    for (int g = 0; g < 1024/RPB; g++) begin
      chk(dut.g_inst[0].u_fault.fault_q[g] == ref_mark[0][g], $sformatf("mark inst 0 group %0d", g));
      chk(dut.g_inst[1].u_fault.fault_q[g] == ref_mark[1][g], $sformatf("mark inst 1 group %0d", g));
      chk(dut.g_inst[2].u_fault.fault_q[g] == ref_mark[2][g], $sformatf("mark inst 2 group %0d", g));
      chk(dut.g_inst[3].u_fault.fault_q[g] == ref_mark[3][g], $sformatf("mark inst 3 group %0d", g));
    end
    functional_pass();

    // second test pass on a memory without faults: all marks are cleared
    faults_on = 0;
    build_ref_marks();
    run_mats_plus();
    chk(dut.g_inst[0].u_fault.fault_q == '0 && dut.g_inst[1].u_fault.fault_q == '0 &&
        dut.g_inst[2].u_fault.fault_q == '0 && dut.g_inst[3].u_fault.fault_q == '0,
        "fault registers cleared by a new BIST run");
    if (dut.g_inst[0].u_fault.fault_q == '0) c_cleared++;
    functional_pass();

    $display("mechanisms: err_reports=%0d marked_groups=%0d rejected=%0d rep_write=%0d rep_read=%0d shared_bit=%0d mask=%0d half0=%0d half1=%0d mode_switch=%0d cleared=%0d saved=%0d",
             c_err_reports, c_mark_groups, c_rejected, c_rep_write, c_rep_read, c_shared,
             c_mask, c_half0, c_half1, c_mode_sw, c_cleared, c_saved);
    chk(c_err_reports > 0, "an error report happened");
    chk(c_mark_groups > 0, "a row group was marked");
    chk(c_rejected > 0, "a high-region fault was left unmarked because of a low-region fault");
    chk(c_rep_write > 0, "a repaired write happened");
    chk(c_rep_read > 0, "a repaired read happened");
    chk(c_shared > 0, "a fault-free row was repaired through a shared bit");
    chk(c_mask > 0, "a masked write happened");
    chk(c_half0 > 0 && c_half1 > 0, "both output samples read");
    chk(c_mode_sw >= 4, "mode switches happened");
    chk(c_cleared > 0, "marks cleared");
    chk(c_saved > 0, "high region saved by repair");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000000) @(posedge clk);
    failures++;
    $display("FAIL watchdog");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

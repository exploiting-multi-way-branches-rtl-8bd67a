// tb_mwb_core: end-to-end test of the multi-way-branch processor at its
// default size (four execution units).
//
// Hand-scheduled programs run on the core and their results, read back from
// data memory, are compared with values the testbench computes itself:
//   - GCD by repeated subtraction, in three versions, one per delay-slot
//     option. The loop compares a and b once and leaves through one
//     three-way branch (equal / greater / less); both differences are
//     computed ahead of the branch into shadow registers, as the
//     shadow-variable transformation does. With option 2 the update of a or
//     b sits in the delay slot of the unit whose branch is taken.
//   - Binary search in a sorted table, with a three-way branch on one
//     compare and the lo/hi updates in the per-unit delay slots (option 2).
//   - A short program for the load delay slot, the forwarding paths and a
//     multi-way branch that falls through.
// Cycle counts are checked: per loop iteration the GCD loops take 3 cycles
// (option 2) and 5 cycles (options 1 and 3). Every mechanism (multi-way
// branch, taken/fall-through, nullification under options 2 and 3, delay
// slot execution under option 1, both forwarding paths, condition-code
// forwarding, load delay, halt) is counted and must occur.
module tb_mwb_core;
  import mwb_pkg::*;

  localparam int unsigned NU = 4;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  ds_opt_e            ds_opt = DS_EXECUTE_ALL;
  logic               prog_we = 1'b0;
  pc_t                prog_addr = '0;
  word_t [NU-1:0]     prog_bundle = '0;
  logic               dbg_we = 1'b0;
  word_t              dbg_addr = '0;
  word_t              dbg_wdata = '0;
  word_t              dbg_rdata;
  logic               halted;
  perf_t              perf;

  mwb_core dut (
    .clk, .rst_n, .ds_opt, .prog_we, .prog_addr, .prog_bundle,
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata, .halted, .perf
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_multiway = 0, n_taken = 0, n_null2 = 0, n_null3 = 0, n_ds_exec1 = 0;
  int n_byp_mem = 0, n_byp_wb = 0, n_cc_fwd = 0, n_load_delay = 0, n_halt = 0;
  int n_mw_fallthrough = 0;

  // multi-way bundles that fall through (observed inside the core)
  always @(posedge clk)
    if (rst_n && !halted && $countones(dut.br_valid) >= 2 && !dut.br_redirect)
      n_mw_fallthrough++;

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic check(string what, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s: got %0d expected %0d", what, got, exp);
    end
  endtask

  // ---------------------------------------------------------------- helpers
  function automatic word_t addi(int rd, int rs, int imm);
    return enc_i(OP_ADDI, reg_idx_t'(rd), reg_idx_t'(rs), 16'(imm));
  endfunction
  function automatic word_t subr(int rd, int a, int b);
    return enc_r(OP_SUB, reg_idx_t'(rd), reg_idx_t'(a), reg_idx_t'(b));
  endfunction
  function automatic word_t ld(int rd, int rs, int off);
    return enc_i(OP_LD, reg_idx_t'(rd), reg_idx_t'(rs), 16'(off));
  endfunction
  function automatic word_t st(int rs, int rdata, int off);
    return enc_st(reg_idx_t'(rs), reg_idx_t'(rdata), 11'(off));
  endfunction
  function automatic word_t br(cond_e c, int cc, int disp);
    return enc_br(c, cc_idx_t'(cc), 16'(disp));
  endfunction
  function automatic word_t cmp(int cc, int a, int b);
    return enc_cmp(cc_idx_t'(cc), reg_idx_t'(a), reg_idx_t'(b));
  endfunction

  word_t NOP;
  initial NOP = INSN_NOP;

  task automatic put(int addr, word_t i0, word_t i1 = INSN_NOP, word_t i2 = INSN_NOP,
                     word_t i3 = INSN_NOP);
    prog_addr   = pc_t'(addr);
    prog_bundle = {i3, i2, i1, i0};
    prog_we     = 1'b1;
    @(posedge clk); #1;
    prog_we     = 1'b0;
  endtask

  task automatic clear_prog();
    for (int a = 0; a < 32; a++) put(a, INSN_NOP);
  endtask

  task automatic mem_wr(int addr, int val);
    dbg_addr = word_t'(addr); dbg_wdata = word_t'(val); dbg_we = 1'b1;
    @(posedge clk); #1;
    dbg_we = 1'b0;
  endtask

  function automatic int mem_rd(int addr);
    return int'(dut.u_dmem.mem[addr/4]);
  endfunction

  task automatic run(ds_opt_e opt, output int cycles);
    rst_n  = 1'b0;
    ds_opt = opt;
    @(posedge clk); #1;
    rst_n = 1'b1;
    while (!halted) @(posedge clk);
    #1;
    cycles = int'(perf.cycles);
    n_halt++;
    n_multiway += int'(perf.multiway);
    n_taken    += int'(perf.taken);
    n_byp_mem  += int'(perf.byp_mem);
    n_byp_wb   += int'(perf.byp_wb);
    n_cc_fwd   += int'(perf.cc_fwd);
    if (opt == DS_SAME_UNIT)   n_null2 += int'(perf.nullified);
    if (opt == DS_NULLIFY_ALL) n_null3 += int'(perf.nullified);
    check("no multi-hit", perf.multi_hit, 0);
    @(posedge clk); #1;
    rst_n = 1'b0;
  endtask

  // ---------------------------------------------------------------- programs
  localparam int RES = 256, AADDR = 512, BADDR = 516;

  // GCD, option 2: updates in the per-unit delay slot. 3 cycles / iteration.
  task automatic prog_gcd_opt2();
    clear_prog();
    put(0, ld(1, 0, AADDR), ld(2, 0, BADDR), addi(10, 0, RES));
    put(1, NOP);
    put(2, cmp(0, 1, 2), subr(3, 1, 2), subr(4, 2, 1));
    put(3, br(C_BE, 0, 2), br(C_BG, 0, -1), br(C_BL, 0, -1));
    put(4, NOP, addi(1, 3, 0), addi(2, 4, 0));
    put(5, st(10, 1, 0), INSN_HALT);
  endtask

  // GCD, option 3: the delay slots hold an increment that must never run.
  task automatic prog_gcd_opt3();
    clear_prog();
    put(0, ld(1, 0, AADDR), ld(2, 0, BADDR), addi(10, 0, RES), addi(20, 0, 0));
    put(1, NOP);
    put(2, cmp(0, 1, 2), subr(3, 1, 2), subr(4, 2, 1));
    put(3, br(C_BE, 0, 6), br(C_BG, 0, 2), br(C_BL, 0, 4));
    put(4, addi(20, 20, 1));
    put(5, br(C_BA, 0, -3), addi(1, 3, 0));
    put(6, addi(20, 20, 1));
    put(7, br(C_BA, 0, -5), addi(2, 4, 0));
    put(8, addi(20, 20, 1));
    put(9, st(10, 1, 0), st(10, 20, 4), INSN_HALT);
  endtask

  // GCD, option 1: every delay slot runs; r21 counts compares, r22 updates.
  task automatic prog_gcd_opt1();
    clear_prog();
    put(0, ld(1, 0, AADDR), ld(2, 0, BADDR), addi(10, 0, RES), addi(21, 0, 0));
    put(1, addi(22, 0, 0));
    put(2, cmp(0, 1, 2), subr(3, 1, 2), subr(4, 2, 1));
    put(3, br(C_BE, 0, 6), br(C_BG, 0, 2), br(C_BL, 0, 4));
    put(4, addi(21, 21, 1));
    put(5, br(C_BA, 0, -3), addi(1, 3, 0));
    put(6, addi(22, 22, 1));
    put(7, br(C_BA, 0, -5), addi(2, 4, 0));
    put(8, addi(22, 22, 1));
    put(9, st(10, 1, 0), st(10, 21, 4), st(10, 22, 8), INSN_HALT);
  endtask

  // Binary search, option 2. Table at TBL, length at NADDR, key at XADDR.
  localparam int TBL = 1024, NADDR = 520, XADDR = 524;
  task automatic prog_bsearch();
    clear_prog();
    put(0, ld(3, 0, XADDR), ld(2, 0, NADDR), addi(4, 0, TBL), addi(10, 0, RES));
    put(1, addi(1, 0, 0));
    put(2, addi(2, 2, -1));
    put(3, cmp(1, 1, 2), enc_r(OP_ADD, 5, 1, 2));                      // LOOP
    put(4, br(C_BG, 1, 9), enc_i(OP_SRLI, 5, 5, 16'd1));                 // lo > hi
    put(5, enc_i(OP_SLLI, 6, 5, 16'd2), addi(8, 5, 1), addi(9, 5, -1));
    put(6, enc_r(OP_ADD, 6, 6, 4));
    put(7, ld(7, 6, 0));
    put(8, NOP);
    put(9, cmp(0, 7, 3));
    put(10, br(C_BE, 0, 2), br(C_BL, 0, -7), br(C_BG, 0, -7));
    put(11, NOP, addi(1, 8, 0), addi(2, 9, 0));
    put(12, st(10, 5, 0), INSN_HALT);                                    // FOUND
    put(13, addi(11, 0, -1));                                            // NOT FOUND
    put(14, st(10, 11, 0), INSN_HALT);
  endtask

  // Load delay slot, forwarding and a fall-through multi-way branch.
  localparam int VADDR = 528;
  task automatic prog_pipe();
    clear_prog();
    put(0, addi(5, 0, 5), addi(12, 0, RES), addi(13, 0, 1));
    put(1, cmp(2, 0, 13));                                    // 0 vs 1: less
    put(2, br(C_BE, 2, 10), br(C_BG, 2, 10));                 // neither holds
    put(3, ld(5, 0, VADDR));
    put(4, addi(6, 5, 0));                                    // load delay: old r5
    put(5, addi(7, 5, 0));                                    // new r5 from write-back
    put(6, addi(8, 7, 1));                                    // r7 from memory stage
    put(7, st(12, 6, 0), st(12, 7, 4), st(12, 8, 8), INSN_HALT);
  endtask

  function automatic int gcd_ref(int a, int b, output int iters);
    iters = 0;
    while (a != b) begin
      if (a > b) a -= b; else b -= a;
      iters++;
    end
    return a;
  endfunction

  // ---------------------------------------------------------------- main
  initial begin
    int cyc, cyc_a, it_a, it, g;
    int pairs[4][2] = '{'{12, 18}, '{35, 14}, '{97, 5}, '{1, 1}};
    int cyc2[4], its[4];
    #1;

    // GCD under option 2
    prog_gcd_opt2();
    foreach (pairs[p]) begin
      mem_wr(AADDR, pairs[p][0]); mem_wr(BADDR, pairs[p][1]);
      run(DS_SAME_UNIT, cyc);
      g = gcd_ref(pairs[p][0], pairs[p][1], it);
      check($sformatf("gcd2(%0d,%0d)", pairs[p][0], pairs[p][1]), mem_rd(RES), g);
      cyc2[p] = cyc; its[p] = it;
    end
    for (int p = 1; p < 4; p++)
      check("opt2 cycles per iteration", cyc2[p] - cyc2[0], 3 * (its[p] - its[0]));

    // GCD under option 3
    prog_gcd_opt3();
    foreach (pairs[p]) begin
      mem_wr(AADDR, pairs[p][0]); mem_wr(BADDR, pairs[p][1]);
      run(DS_NULLIFY_ALL, cyc);
      g = gcd_ref(pairs[p][0], pairs[p][1], it);
      check("gcd3", mem_rd(RES), g);
      check("opt3 delay slots nullified", mem_rd(RES + 4), 0);
      if (p == 0) begin cyc_a = cyc; it_a = it; end
      else check("opt3 cycles per iteration", cyc - cyc_a, 5 * (it - it_a));
    end

    // GCD under option 1
    prog_gcd_opt1();
    foreach (pairs[p]) begin
      mem_wr(AADDR, pairs[p][0]); mem_wr(BADDR, pairs[p][1]);
      run(DS_EXECUTE_ALL, cyc);
      g = gcd_ref(pairs[p][0], pairs[p][1], it);
      check("gcd1", mem_rd(RES), g);
      check("opt1 compare-delay slots executed", mem_rd(RES + 4), it + 1);
      check("opt1 update-delay slots executed", mem_rd(RES + 8), it);
      n_ds_exec1 += mem_rd(RES + 4) + mem_rd(RES + 8);
      if (p == 0) begin cyc_a = cyc; it_a = it; end
      else check("opt1 cycles per iteration", cyc - cyc_a, 5 * (it - it_a));
    end

    // Binary search (option 2)
    begin
      int tbl[16];
      int keys[5] = '{3, 40, 1, 46, 20};
      int exp_idx;
      prog_bsearch();
      for (int i = 0; i < 16; i++) begin
        tbl[i] = 3 * i + 1;
        mem_wr(TBL + 4 * i, tbl[i]);
      end
      mem_wr(NADDR, 16);
      foreach (keys[k]) begin
        mem_wr(XADDR, keys[k]);
        run(DS_SAME_UNIT, cyc);
        exp_idx = -1;
        foreach (tbl[i]) if (tbl[i] == keys[k]) exp_idx = i;
        check($sformatf("bsearch(%0d)", keys[k]), mem_rd(RES), exp_idx);
      end
    end

    // Pipeline behaviour
    prog_pipe();
    mem_wr(VADDR, 77);
    run(DS_EXECUTE_ALL, cyc);
    check("load delay slot sees old value", mem_rd(RES), 5);
    check("write-back forwarding", mem_rd(RES + 4), 77);
    check("memory-stage forwarding", mem_rd(RES + 8), 78);
    if (mem_rd(RES) == 5) n_load_delay++;

    // every mechanism must have happened
    check("multi-way branches seen", n_multiway > 0, 1);
    check("multi-way fall-through seen", n_mw_fallthrough > 0, 1);
    check("taken branches seen", n_taken > 0, 1);
    check("option 2 nullification seen", n_null2 > 0, 1);
    check("option 3 nullification seen", n_null3 > 0, 1);
    check("option 1 delay-slot execution seen", n_ds_exec1 > 0, 1);
    check("memory-stage bypass seen", n_byp_mem > 0, 1);
    check("write-back bypass seen", n_byp_wb > 0, 1);
    check("condition-code forwarding seen", n_cc_fwd > 0, 1);
    check("load delay seen", n_load_delay > 0, 1);
    check("halts seen", n_halt, 4 + 4 + 4 + 5 + 1);
    $display("events: multiway=%0d mw_fallthrough=%0d taken=%0d null2=%0d null3=%0d ds_exec1=%0d byp_mem=%0d byp_wb=%0d cc_fwd=%0d load_delay=%0d halts=%0d",
             n_multiway, n_mw_fallthrough, n_taken, n_null2, n_null3, n_ds_exec1,
             n_byp_mem, n_byp_wb, n_cc_fwd, n_load_delay, n_halt);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

endmodule

// tb_workloads: hand-scheduled kernels of further benchmark programs on the
// default four-unit processor, each checked against a result the testbench
// computes itself:
//   - Fibonacci number (iterative; loop test with a single branch, its
//     delay slot nullified with option 3 while looping and run once on exit);
//   - find the minimum of an array (a two-way branch "less / not less" whose
//     option-2 delay slot performs "min = x" only under "less"; 7 cycles
//     per element);
//   - string compare (a two-way branch "less / greater" on the characters
//     that falls through while they are equal, then a loop test).
//   - binary tree search and linear list search in the shadow-pointer form
//     of the transformation: child / next pointers are loaded before the
//     branch that picks one of them, and the per-unit delay slot (option 2)
//     commits the chosen one.
//   - GCD once with ordinary two-way branches and once with a three-way
//     branch, to measure what the multi-way branch saves (7 against 3
//     cycles per iteration).
//   - bucket sort of small keys (count into buckets, write out);
//   - pattern match (first occurrence of a pattern in a text).
// Each run also checks the loop's cost in cycles per iteration.
module tb_workloads;
  import mwb_pkg::*;

  localparam int unsigned NU = 4;

  logic               clk = 1'b0;
  logic               rst_n = 1'b0;
  ds_opt_e            ds_opt = DS_SAME_UNIT;
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

  initial begin
    repeat (50000) @(posedge clk);
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

  function automatic word_t addi(int rd, int rs, int imm);
    return enc_i(OP_ADDI, reg_idx_t'(rd), reg_idx_t'(rs), 16'(imm));
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

  task automatic put(int addr, word_t i0, word_t i1 = INSN_NOP, word_t i2 = INSN_NOP,
                     word_t i3 = INSN_NOP);
    prog_addr = pc_t'(addr); prog_bundle = {i3, i2, i1, i0}; prog_we = 1'b1;
    @(posedge clk); #1;
    prog_we = 1'b0;
  endtask

  task automatic clear_prog();
    for (int a = 0; a < 32; a++) put(a, INSN_NOP);
  endtask

  task automatic mem_wr(int addr, int val);
    dbg_addr = word_t'(addr); dbg_wdata = word_t'(val); dbg_we = 1'b1;
    @(posedge clk); #1;
    dbg_we = 1'b0;
  endtask

  task automatic mem_rd(int addr, output int val);
    dbg_addr = word_t'(addr);
    #1;
    val = int'(dbg_rdata);
  endtask

  task automatic run(ds_opt_e opt, output int cycles);
    ds_opt = opt;
    rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
    while (!halted) @(posedge clk);
    #1;
    cycles = int'(perf.cycles);
    check("no multi-hit", perf.multi_hit, 0);
  endtask

  localparam int RES = 256, NADDR = 512, ARR = 1024, STR2 = 2048, TREE = 3072, LIST = 3584,
               CNT = 2048, OUTB = 2304;

  initial begin
    int cyc, cyc0, got;
    #1;

    // ---------------- Fibonacci number: r1 = fib(n) after n steps
    clear_prog();
    put(0, ld(3, 0, NADDR), addi(1, 0, 0), addi(2, 0, 1), addi(10, 0, RES));
    put(1, addi(20, 0, 0));
    put(2, enc_cmpi(0, 3, 16'd1), enc_r(OP_ADD, 2, 1, 2), addi(1, 2, 0), addi(3, 3, -1)); // LOOP
    put(3, br(C_BG, 0, -1));
    put(4, addi(20, 20, 1));                       // delay slot: runs only on the final fall-through
    put(5, st(10, 1, 0), st(10, 20, 4), INSN_HALT);
    for (int n = 1; n <= 20; n += 6) begin
      int f0, f1, t;
      f0 = 0; f1 = 1;
      for (int i = 0; i < n; i++) begin t = f0 + f1; f0 = f1; f1 = t; end
      mem_wr(NADDR, n);
      run(DS_NULLIFY_ALL, cyc);
      mem_rd(RES, got);
      check($sformatf("fib(%0d)", n), got, f0);
      mem_rd(RES + 4, got);
      check("fib delay slot ran once", got, 1);
      if (n == 1) cyc0 = cyc;
      else check("fib cycles per iteration", cyc - cyc0, 3 * (n - 1));
    end

    // ---------------- Find the minimum
    clear_prog();
    put(0, ld(3, 0, NADDR), addi(4, 0, ARR), addi(10, 0, RES), addi(1, 0, 16'h7FFF));
    put(1, INSN_NOP);
    put(2, ld(5, 4, 0), addi(4, 4, 4), addi(3, 3, -1));           // LOOP
    put(3, INSN_NOP, enc_cmpi(1, 3, 16'd0));                       // load delay
    put(4, enc_cmp(0, 5, 1));
    put(5, br(C_BL, 0, 2), br(C_BGE, 0, 2));                       // two-way
    put(6, addi(1, 5, 0));                                         // runs under "less" only
    put(7, br(C_BNE, 1, -5));                                      // NEXT: loop test
    put(8, INSN_NOP);
    put(9, st(10, 1, 0), INSN_HALT);
    for (int trial = 0; trial < 4; trial++) begin
      int n, mn, v;
      n = 4 + 5 * trial;
      mn = 32767;
      for (int i = 0; i < n; i++) begin
        v = $urandom_range(0, 20000) - 10000;
        if (v < mn) mn = v;
        mem_wr(ARR + 4 * i, v);
      end
      mem_wr(NADDR, n);
      run(DS_SAME_UNIT, cyc);
      mem_rd(RES, got);
      check($sformatf("min of %0d", n), got, mn);
      if (trial == 0) cyc0 = cyc;
      else check("min cycles per element", cyc - cyc0, 7 * (n - 4));
    end

    // ---------------- String compare: -1, 0, +1 (one character per word)
    clear_prog();
    put(0, addi(4, 0, ARR), addi(6, 0, STR2), addi(10, 0, RES));
    put(1, ld(7, 4, 0), ld(8, 6, 0), addi(4, 4, 4), addi(6, 6, 4));  // LOOP
    put(2, INSN_NOP);
    put(3, enc_cmp(0, 7, 8), enc_cmpi(1, 7, 16'd0));
    put(4, br(C_BL, 0, 5), br(C_BG, 0, 8));                          // two-way, equal falls through
    put(5, INSN_NOP);
    put(6, br(C_BNE, 1, -5));                                        // not end of string
    put(7, INSN_NOP);
    put(8, st(10, 0, 0), INSN_HALT);                                 // equal
    put(9, addi(11, 0, -1));                                         // less
    put(10, st(10, 11, 0), INSN_HALT);
    put(12, addi(11, 0, 1));                                         // greater
    put(13, st(10, 11, 0), INSN_HALT);
    begin
      string s1[5] = '{"superscalar", "branch", "branches", "multi", "way"};
      string s2[5] = '{"superscalar", "brancg", "branch",   "multiway", "wax"};
      foreach (s1[k]) begin
        int exp;
        for (int i = 0; i <= s1[k].len(); i++)
          mem_wr(ARR + 4 * i, i < s1[k].len() ? int'(s1[k][i]) : 0);
        for (int i = 0; i <= s2[k].len(); i++)
          mem_wr(STR2 + 4 * i, i < s2[k].len() ? int'(s2[k][i]) : 0);
        exp = s1[k].compare(s2[k]);
        exp = (exp < 0) ? -1 : (exp > 0 ? 1 : 0);
        run(DS_NULLIFY_ALL, cyc);
        mem_rd(RES, got);
        check($sformatf("strcmp(%s,%s)", s1[k], s2[k]), got, exp);
      end
    end

    // ---------------- Binary tree search with shadow pointers. The loads of
    // both children are hoisted above the three-way branch into shadow
    // registers r6 / r7; the per-unit delay slot (option 2) copies the one
    // of the taken direction into ptr. Nodes: [p]=key, [p+4]=left, [p+8]=right.
    clear_prog();
    put(0, ld(3, 0, NADDR), addi(1, 0, TREE), addi(10, 0, RES));
    put(1, INSN_NOP);
    put(2, ld(5, 1, 0), ld(6, 1, 4), ld(7, 1, 8), enc_cmpi(1, 1, 16'd0));  // LOOP
    put(3, br(C_BE, 1, 5));                                                 // ptr == NULL
    put(4, enc_cmp(0, 5, 3));
    put(5, br(C_BE, 0, 2), br(C_BL, 0, -3), br(C_BG, 0, -3));               // three-way
    put(6, INSN_NOP, addi(1, 7, 0), addi(1, 6, 0));                         // per-unit delay slot
    put(7, st(10, 1, 0), INSN_HALT);                                        // found
    put(8, st(10, 0, 0), INSN_HALT);                                        // not found
    begin
      int key[15], lft[15], rgt[15];
      int nn;
      nn = 15;
      // keys 0, 10, ..., 140 inserted in a shuffled order into a BST
      for (int i = 0; i < nn; i++) key[i] = 10 * i;
      for (int i = nn - 1; i > 0; i--) begin
        int j, t;
        j = $urandom_range(0, i); t = key[i]; key[i] = key[j]; key[j] = t;
      end
      for (int i = 0; i < nn; i++) begin lft[i] = -1; rgt[i] = -1; end
      for (int i = 1; i < nn; i++) begin
        int c;
        c = 0;
        forever begin
          if (key[i] < key[c]) begin
            if (lft[c] < 0) begin lft[c] = i; break; end
            c = lft[c];
          end else begin
            if (rgt[c] < 0) begin rgt[c] = i; break; end
            c = rgt[c];
          end
        end
      end
      for (int i = 0; i < nn; i++) begin
        mem_wr(TREE + 12 * i, key[i]);
        mem_wr(TREE + 12 * i + 4, lft[i] < 0 ? 0 : TREE + 12 * lft[i]);
        mem_wr(TREE + 12 * i + 8, rgt[i] < 0 ? 0 : TREE + 12 * rgt[i]);
      end
      mem_wr(0, 0);
      for (int s = 0; s < 6; s++) begin
        int x, exp;
        x = (s % 2 == 0) ? 10 * $urandom_range(0, 14) : 10 * $urandom_range(0, 14) + 5;
        exp = 0;
        for (int i = 0; i < nn; i++) if (key[i] == x) exp = TREE + 12 * i;
        mem_wr(NADDR, x);
        run(DS_SAME_UNIT, cyc);
        mem_rd(RES, got);
        check($sformatf("tree search(%0d)", x), got, exp);
      end
    end

    // ---------------- Linear list search with a shadow pointer: the load of
    // ptr->next into s_ptr (r6) is hoisted above the "v == x" branch, which
    // merges with the loop branch into one two-way branch.
    // Nodes: [p]=value, [p+4]=next. Result: address of the node or 0.
    clear_prog();
    put(0, ld(3, 0, NADDR), addi(1, 0, LIST), addi(10, 0, RES));
    put(1, INSN_NOP);
    put(2, ld(5, 1, 0), ld(6, 1, 4), enc_cmpi(1, 1, 16'd0));               // LOOP
    put(3, br(C_BE, 1, 4));                                                 // ptr == NULL
    put(4, enc_cmp(0, 5, 3));
    put(5, br(C_BE, 0, 1), br(C_BNE, 0, -3));                               // found / next
    put(6, st(10, 1, 0), addi(1, 6, 0), INSN_HALT);                         // delay slot and found target
    put(7, st(10, 0, 0), INSN_HALT);                                        // not found
    begin
      int vals[12];
      int order[12];
      for (int i = 0; i < 12; i++) begin vals[i] = $urandom_range(1, 30000); order[i] = i; end
      for (int i = 11; i > 0; i--) begin
        int j, t;
        j = $urandom_range(0, i); t = order[i]; order[i] = order[j]; order[j] = t;
      end
      // node order[k] is the k-th element of the list
      for (int k = 0; k < 12; k++) begin
        mem_wr(LIST + 8 * order[k], vals[order[k]]);
        mem_wr(LIST + 8 * order[k] + 4, k == 11 ? 0 : LIST + 8 * order[k + 1]);
      end
      mem_wr(0, 0);
      for (int s = 0; s < 5; s++) begin
        int x, exp, steps;
        x = (s == 4) ? 30001 : vals[order[$urandom_range(0, 11)]];
        exp = 0;
        for (int k = 11; k >= 0; k--) if (vals[order[k]] == x) exp = LIST + 8 * order[k];
        // list starts at node order[0]
        mem_wr(NADDR, x);
        put(0, ld(3, 0, NADDR), addi(1, 0, LIST + 8 * order[0]), addi(10, 0, RES));
        run(DS_SAME_UNIT, cyc);
        mem_rd(RES, got);
        check($sformatf("list search(%0d)", x), got, exp);
      end
    end

    // ---------------- GCD with and without multi-way branches. The plain
    // version tests "equal" and "greater" with two ordinary branches, each
    // followed by an empty delay slot: 7 cycles per iteration. The multi-way
    // version (three-way branch, option-2 delay slot) takes 3.
    begin
      int cyc_plain[2], cyc_mw[2], it[2];
      int ab[2][2] = '{'{91, 13}, '{377, 233}};
      for (int v = 0; v < 2; v++) begin
        clear_prog();
        put(0, ld(1, 0, ARR), ld(2, 0, ARR + 4), addi(10, 0, RES));
        put(1, INSN_NOP);
        if (v == 0) begin
          put(2, enc_cmp(0, 1, 2));                                     // LOOP
          put(3, br(C_BE, 0, 8));                                       // -> DONE
          put(4, INSN_NOP);
          put(5, br(C_BG, 0, 4));                                       // -> GA
          put(6, INSN_NOP);
          put(7, enc_r(OP_SUB, 2, 2, 1), br(C_BA, 0, -5));
          put(8, INSN_NOP);
          put(9, enc_r(OP_SUB, 1, 1, 2), br(C_BA, 0, -7));              // GA
          put(10, INSN_NOP);
          put(11, st(10, 1, 0), INSN_HALT);                             // DONE
        end else begin
          put(2, enc_cmp(0, 1, 2), enc_r(OP_SUB, 3, 1, 2), enc_r(OP_SUB, 4, 2, 1));
          put(3, br(C_BE, 0, 2), br(C_BG, 0, -1), br(C_BL, 0, -1));
          put(4, INSN_NOP, addi(1, 3, 0), addi(2, 4, 0));
          put(5, st(10, 1, 0), INSN_HALT);
        end
        for (int k = 0; k < 2; k++) begin
          int a, b, n;
          a = ab[k][0]; b = ab[k][1]; n = 0;
          while (a != b) begin if (a > b) a -= b; else b -= a; n++; end
          it[k] = n;
          mem_wr(ARR, ab[k][0]); mem_wr(ARR + 4, ab[k][1]);
          run(v == 0 ? DS_EXECUTE_ALL : DS_SAME_UNIT, cyc);
          mem_rd(RES, got);
          check($sformatf("gcd(%0d,%0d) %s", ab[k][0], ab[k][1], v == 0 ? "plain" : "multi-way"), got, a);
          if (v == 0) cyc_plain[k] = cyc; else cyc_mw[k] = cyc;
        end
      end
      check("plain loop cycles per iteration", cyc_plain[1] - cyc_plain[0], 7 * (it[1] - it[0]));
      check("multi-way loop cycles per iteration", cyc_mw[1] - cyc_mw[0], 3 * (it[1] - it[0]));
      $display("gcd(%0d,%0d): %0d cycles plain, %0d cycles with a multi-way branch (speedup %0.2f)",
               ab[1][0], ab[1][1], cyc_plain[1], cyc_mw[1], real'(cyc_plain[1]) / real'(cyc_mw[1]));
    end

    // ---------------- Bucket sort of small keys (0..15): count the keys into
    // buckets, then write each bucket's key out as often as it was counted.
    clear_prog();
    put(0, ld(2, 0, NADDR), addi(1, 0, ARR), addi(3, 0, CNT), addi(10, 0, RES));
    put(1, INSN_NOP);
    put(2, ld(5, 1, 0), addi(1, 1, 4), addi(2, 2, -1));                 // L1
    put(3, enc_cmpi(1, 2, 16'd0));
    put(4, enc_i(OP_SLLI, 6, 5, 16'd2));
    put(5, enc_r(OP_ADD, 6, 6, 3));
    put(6, ld(7, 6, 0));
    put(7, INSN_NOP);
    put(8, addi(7, 7, 1), br(C_BNE, 1, -6));
    put(9, st(6, 7, 0));                                                  // delay slot
    put(10, addi(8, 0, 0), addi(9, 0, OUTB), addi(4, 3, 0));
    put(11, ld(7, 4, 0), addi(4, 4, 4));                                  // L2
    put(12, INSN_NOP);
    put(13, enc_cmpi(2, 7, 16'd0));
    put(14, br(C_BE, 2, 5));                                              // empty bucket
    put(15, INSN_NOP);
    put(16, st(9, 8, 0), addi(9, 9, 4), addi(7, 7, -1), enc_cmpi(2, 7, 16'd1)); // L3
    put(17, br(C_BG, 2, -1));
    put(18, INSN_NOP);
    put(19, addi(8, 8, 1), enc_cmpi(3, 8, 16'd15));                       // NEXTB
    put(20, br(C_BL, 3, -9));
    put(21, INSN_NOP);
    put(22, INSN_HALT);
    begin
      int keys[40], cnt[16];
      foreach (cnt[b]) begin cnt[b] = 0; mem_wr(CNT + 4 * b, 0); end
      foreach (keys[i]) begin
        keys[i] = $urandom_range(0, 15);
        cnt[keys[i]]++;
        mem_wr(ARR + 4 * i, keys[i]);
      end
      mem_wr(NADDR, 40);
      run(DS_EXECUTE_ALL, cyc);
      begin
        int j, bad;
        j = 0; bad = 0;
        for (int b = 0; b < 16; b++)
          for (int k = 0; k < cnt[b]; k++) begin
            mem_rd(OUTB + 4 * j, got);
            if (got != b) bad++;
            j++;
          end
        check("bucket sort output", bad, 0);
      end
    end

    // ---------------- Pattern match: first position of a zero-terminated
    // pattern in a text. After a mismatch a two-way branch tells "pattern
    // ended: found" from "try the next position"; the option-2 delay slot
    // advances the position only on the second.
    clear_prog();
    put(0, ld(2, 0, NADDR), addi(1, 0, ARR), addi(10, 0, RES));
    put(1, INSN_NOP);
    put(2, addi(3, 1, 0), addi(4, 0, STR2), enc_cmp(2, 1, 2));            // OUTER
    put(3, br(C_BG, 2, 11));                                              // past last position
    put(4, INSN_NOP);
    put(5, ld(5, 3, 0), ld(6, 4, 0), addi(3, 3, 4), addi(4, 4, 4));       // INNER
    put(6, INSN_NOP);
    put(7, enc_cmp(0, 5, 6), enc_cmpi(1, 6, 16'd0));
    put(8, br(C_BE, 0, -3));
    put(9, INSN_NOP);
    put(10, br(C_BE, 1, 3), br(C_BNE, 1, -8));                            // found / next
    put(11, INSN_NOP, addi(1, 1, 4));
    put(13, st(10, 1, 0), INSN_HALT);                                     // FOUND
    put(14, addi(11, 0, -1));                                             // NOT FOUND
    put(15, st(10, 11, 0), INSN_HALT);
    begin
      string txt = "exploiting multiway branches to boost superscalar performance";
      string pats[4] = '{"branch", "super", "bra", "scalar!"};
      for (int i = 0; i < txt.len(); i++) mem_wr(ARR + 4 * i, int'(txt[i]));
      foreach (pats[k]) begin
        int pos, exp;
        for (int i = 0; i <= pats[k].len(); i++)
          mem_wr(STR2 + 4 * i, i < pats[k].len() ? int'(pats[k][i]) : 0);
        mem_wr(NADDR, ARR + 4 * (txt.len() - pats[k].len()));
        pos = -1;
        for (int i = txt.len() - pats[k].len(); i >= 0; i--)
          if (txt.substr(i, i + pats[k].len() - 1) == pats[k]) pos = i;
        exp = (pos < 0) ? -1 : ARR + 4 * pos;
        run(DS_SAME_UNIT, cyc);
        mem_rd(RES, got);
        check($sformatf("match(%s)", pats[k]), got, exp);
      end
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

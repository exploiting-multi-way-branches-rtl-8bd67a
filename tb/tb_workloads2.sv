// tb_workloads2: three more benchmark kernels on the default four-unit
// processor, checked against results the testbench computes itself:
//   - shortest paths between all pairs of a small weighted graph
//     (Floyd-Warshall). The relaxation "if d[i][k] + d[k][j] < d[i][j]"
//     is a two-way branch "less / not less" whose option-2 delay slot
//     stores the new distance only under "less";
//   - binary tree traversal (in order, with an explicit stack in memory).
//     The left child is loaded into a shadow register before the
//     "p != NULL" test; after it, a two-way branch separates "stack empty:
//     done" from "pop";
//   - merge sort, bottom-up, 16 keys: each merge step is a two-way branch
//     on the two run heads whose per-unit delay slot stores the chosen one.
module tb_workloads2;
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

  localparam int RES = 256, NADDR = 512, DM = 1024, TREE = 2048, STK = 2560, OUTB = 3072,
               ARRA = 3328, ARRB = 3584;

  initial begin
    int cyc, got;
    #1;

    // ---------------- Shortest path: Floyd-Warshall on n nodes
    clear_prog();
    put(0, ld(20, 0, NADDR), ld(22, 0, NADDR + 4), addi(21, 0, DM), addi(1, 0, 0));
    put(1, addi(23, 21, 0));
    put(2, addi(2, 0, 0), addi(24, 21, 0));                                      // KLOOP
    put(3, enc_i(OP_SLLI, 5, 1, 16'd2));                                         // ILOOP
    put(4, enc_r(OP_ADD, 5, 5, 24));
    put(5, ld(6, 5, 0), addi(3, 0, 0), addi(7, 24, 0), addi(8, 23, 0));
    put(6, INSN_NOP);
    put(7, ld(9, 7, 0), ld(10, 8, 0), addi(3, 3, 1), addi(8, 8, 4));             // JLOOP
    put(8, INSN_NOP);
    put(9, enc_r(OP_ADD, 11, 6, 10), enc_cmp(1, 3, 20));
    put(10, enc_cmp(0, 11, 9));
    put(11, br(C_BL, 0, 2), br(C_BGE, 0, 2));                                    // two-way
    put(12, st(7, 11, 0));                                                       // runs under "less" only
    put(13, addi(7, 7, 4), br(C_BL, 1, -6));                                     // JNEXT
    put(14, INSN_NOP);
    put(15, addi(2, 2, 1), enc_r(OP_ADD, 24, 24, 22));
    put(16, enc_cmp(2, 2, 20));
    put(17, br(C_BL, 2, -14));
    put(18, INSN_NOP);
    put(19, addi(1, 1, 1), enc_r(OP_ADD, 23, 23, 22));
    put(20, enc_cmp(3, 1, 20));
    put(21, br(C_BL, 3, -19));
    put(22, INSN_NOP);
    put(23, INSN_HALT);
    for (int trial = 0; trial < 2; trial++) begin
      int n, bad;
      int d[6][6];
      n = 5 + trial;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          d[i][j] = (i == j) ? 0 : (($urandom_range(0, 2) == 0) ? 1000 : $urandom_range(1, 50));
          mem_wr(DM + 4 * (i * n + j), d[i][j]);
        end
      mem_wr(NADDR, n);
      mem_wr(NADDR + 4, 4 * n);
      for (int k = 0; k < n; k++)
        for (int i = 0; i < n; i++)
          for (int j = 0; j < n; j++)
            if (d[i][k] + d[k][j] < d[i][j]) d[i][j] = d[i][k] + d[k][j];
      run(DS_SAME_UNIT, cyc);
      bad = 0;
      for (int i = 0; i < n; i++)
        for (int j = 0; j < n; j++) begin
          mem_rd(DM + 4 * (i * n + j), got);
          if (got != d[i][j]) bad++;
        end
      check($sformatf("all-pairs shortest paths, %0d nodes", n), bad, 0);
    end

    // ---------------- Binary tree traversal, in order
    clear_prog();
    put(0, addi(1, 0, TREE), addi(2, 0, STK), addi(3, 0, STK), addi(4, 0, OUTB));
    put(1, ld(5, 1, 4), enc_cmpi(0, 1, 16'd0), enc_cmp(1, 2, 3));              // LOOP
    put(2, br(C_BNE, 0, 4));                                                   // p != NULL
    put(3, INSN_NOP);
    put(4, br(C_BE, 1, 10), br(C_BNE, 1, 4));                                  // done / pop
    put(5, INSN_NOP);
    put(6, st(2, 1, 0), addi(2, 2, 4), addi(1, 5, 0), br(C_BA, 0, -5));         // PUSH
    put(7, INSN_NOP);
    put(8, ld(1, 2, -4), addi(2, 2, -4));                                      // POP
    put(9, INSN_NOP);
    put(10, ld(6, 1, 0), ld(7, 1, 8));
    put(11, INSN_NOP);
    put(12, st(4, 6, 0), addi(4, 4, 4), addi(1, 7, 0), br(C_BA, 0, -11));
    put(13, INSN_NOP);
    put(14, INSN_HALT);                                                        // DONE
    begin
      int key[20], lft[20], rgt[20];
      int nn, bad;
      nn = 20;
      for (int i = 0; i < nn; i++) key[i] = 7 * i + 3;
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
      run(DS_NULLIFY_ALL, cyc);
      bad = 0;
      // in-order output of keys 7*i+3 is the sorted sequence
      for (int i = 0; i < nn; i++) begin
        mem_rd(OUTB + 4 * i, got);
        if (got != 7 * i + 3) bad++;
      end
      check("in-order traversal", bad, 0);
    end

    // ---------------- Merge sort, bottom-up, between two arrays. The merge
    // step compares the heads of both runs once and leaves through a
    // two-way branch "<= / >"; the option-2 delay slot stores the head of
    // the run whose branch was taken. The final array's address is stored.
    clear_prog();
    put(0, ld(20, 0, NADDR), addi(21, 0, ARRA), addi(22, 0, ARRB), addi(23, 0, 4));
    put(1, addi(10, 0, RES));
    put(2, addi(24, 0, 0));                                                      // PASS
    put(3, enc_r(OP_ADD, 1, 21, 24), enc_r(OP_ADD, 5, 22, 24));                  // SETUP
    put(4, enc_r(OP_ADD, 2, 1, 23), enc_r(OP_ADD, 3, 1, 23));
    put(5, enc_r(OP_ADD, 4, 3, 23));
    put(6, enc_cmp(1, 1, 2), enc_cmp(2, 3, 4), ld(6, 1, 0), ld(7, 3, 0));       // MLOOP
    put(7, br(C_BGE, 1, 10));                                                    // left run empty
    put(8, INSN_NOP);
    put(9, br(C_BGE, 2, 13), enc_cmp(0, 6, 7));                                  // right run empty
    put(10, INSN_NOP);
    put(11, br(C_BLE, 0, 2), br(C_BG, 0, 4));                                    // two-way
    put(12, st(5, 6, 0), st(5, 7, 0));                                           // per-unit delay slot
    put(13, addi(1, 1, 4), addi(5, 5, 4), br(C_BA, 0, -7));                      // TA
    put(14, INSN_NOP);
    put(15, addi(3, 3, 4), addi(5, 5, 4), br(C_BA, 0, -9));                      // TB
    put(16, INSN_NOP);
    put(17, enc_cmp(2, 3, 4), ld(7, 3, 0));                                      // TAILJ
    put(18, br(C_BGE, 2, 9));
    put(19, INSN_NOP);
    put(20, st(5, 7, 0), addi(3, 3, 4), addi(5, 5, 4), br(C_BA, 0, -3));
    put(21, INSN_NOP);
    put(22, enc_cmp(1, 1, 2), ld(6, 1, 0));                                      // TAILI
    put(23, br(C_BGE, 1, 4));
    put(24, INSN_NOP);
    put(25, st(5, 6, 0), addi(1, 1, 4), addi(5, 5, 4), br(C_BA, 0, -3));
    put(26, INSN_NOP);
    put(27, enc_i(OP_SLLI, 8, 23, 16'd1));                                       // NEXTLO
    put(28, enc_r(OP_ADD, 24, 24, 8));
    put(29, enc_cmp(3, 24, 20));
    put(30, br(C_BL, 3, -27));
    put(31, INSN_NOP);
    put(32, addi(21, 22, 0), addi(22, 21, 0), enc_i(OP_SLLI, 23, 23, 16'd1));    // swap arrays
    put(33, enc_cmp(3, 23, 20));
    put(34, br(C_BL, 3, -32));
    put(35, INSN_NOP);
    put(36, st(10, 21, 0), INSN_HALT);
    begin
      int v[16], s[16];
      int base, bad;
      foreach (v[i]) begin
        v[i] = $urandom_range(0, 999);
        mem_wr(ARRA + 4 * i, v[i]);
      end
      s = v;
      s.sort();
      mem_wr(NADDR, 4 * 16);
      run(DS_SAME_UNIT, cyc);
      mem_rd(RES, base);
      bad = 0;
      foreach (s[i]) begin
        mem_rd(base + 4 * i, got);
        if (got != s[i]) bad++;
      end
      check("merge sort of 16 keys", bad, 0);
    end

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_speedup: the speedup comparison the scheme was evaluated by, on one
// kernel. Three copies of the processor run side by side from the same data
// memory contents: a scalar machine (the same core built with one execution
// unit), the two-unit build and the default four-unit build. Each machine
// runs GCD by repeated subtraction, scheduled for its width:
//   - scalar: an ordinary loop with one branch per bundle, "equal?" then
//     "less?", and the subtraction in the delay slot of an always-taken
//     branch back to the top (delay-slot option 1), 7 cycles per iteration;
//   - two and four units: the multi-way loop, one compare bundle and one
//     branch bundle with "greater / less" in two units and the per-unit
//     delay slot (option 2) doing "a -= b" or "b -= a", 3 cycles per
//     iteration.
// The testbench checks every result against its own GCD, the cost per
// iteration of each machine, and that the wide machines beat the scalar one
// on the sum of all runs; it prints the measured speedups. The programs and
// operand pairs are this testbench's own; the speedups are those of this
// kernel, not of a compiled benchmark.
//
// Interface and timing: all three cores share clock, reset and the debug
// data port, so one debug write initialises all three memories; each has
// its own program load enable and result read-back. A run is a reset pulse
// followed by waiting until all three have halted.
module tb_speedup;
  import mwb_pkg::*;

  logic              clk = 1'b0;
  logic              rst_n = 1'b0;
  pc_t               prog_addr = '0;
  logic              we1 = 1'b0, we2 = 1'b0, we4 = 1'b0;
  word_t [0:0]       pb1 = '0;
  word_t [1:0]       pb2 = '0;
  word_t [3:0]       pb4 = '0;
  logic              dbg_we = 1'b0;
  word_t             dbg_addr = '0;
  word_t             dbg_wdata = '0;
  word_t             rd1, rd2, rd4;
  logic              h1, h2, h4;
  perf_t             p1, p2, p4;

  mwb_core #(.NUNITS(1)) u_scalar (
    .clk, .rst_n, .ds_opt(DS_EXECUTE_ALL), .prog_we(we1), .prog_addr, .prog_bundle(pb1),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata(rd1), .halted(h1), .perf(p1)
  );
  mwb_core #(.NUNITS(2)) u_two (
    .clk, .rst_n, .ds_opt(DS_SAME_UNIT), .prog_we(we2), .prog_addr, .prog_bundle(pb2),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata(rd2), .halted(h2), .perf(p2)
  );
  mwb_core u_four (
    .clk, .rst_n, .ds_opt(DS_SAME_UNIT), .prog_we(we4), .prog_addr, .prog_bundle(pb4),
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata(rd4), .halted(h4), .perf(p4)
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

  task automatic put1(int addr, word_t i0);
    prog_addr = pc_t'(addr); pb1 = i0; we1 = 1'b1;
    @(posedge clk); #1;
    we1 = 1'b0;
  endtask

  task automatic put2(int addr, word_t i0, word_t i1 = INSN_NOP);
    prog_addr = pc_t'(addr); pb2 = {i1, i0}; we2 = 1'b1;
    @(posedge clk); #1;
    we2 = 1'b0;
  endtask

  task automatic put4(int addr, word_t i0, word_t i1 = INSN_NOP, word_t i2 = INSN_NOP,
                      word_t i3 = INSN_NOP);
    prog_addr = pc_t'(addr); pb4 = {i3, i2, i1, i0}; we4 = 1'b1;
    @(posedge clk); #1;
    we4 = 1'b0;
  endtask

  task automatic mem_wr(int addr, int val);
    dbg_addr = word_t'(addr); dbg_wdata = word_t'(val); dbg_we = 1'b1;
    @(posedge clk); #1;
    dbg_we = 1'b0;
  endtask

  localparam int RES = 256, AADDR = 512, BADDR = 516;

  function automatic word_t ld(int rd, int rs1, int off);
    return enc_i(OP_LD, reg_idx_t'(rd), reg_idx_t'(rs1), 16'(off));
  endfunction

  function automatic word_t addi(int rd, int rs1, int imm);
    return enc_i(OP_ADDI, reg_idx_t'(rd), reg_idx_t'(rs1), 16'(imm));
  endfunction

  function automatic word_t br(cond_e c, int cc, int disp);
    return enc_br(c, cc_idx_t'(cc), 16'(disp));
  endfunction

  initial begin
    int pairs[6][2] = '{'{12, 18}, '{35, 14}, '{97, 5}, '{7, 7}, '{144, 60}, '{377, 233}};
    int c1_0, c2_0, c4_0, it0;
    longint sum1, sum2, sum4;
    #1;
    // scalar schedule
    put1(0, ld(1, 0, AADDR));
    put1(1, ld(2, 0, BADDR));
    put1(2, addi(10, 0, RES));
    put1(3, enc_cmp(0, 1, 2));                      // LOOP
    put1(4, br(C_BE, 0, 8));                        // -> DONE
    put1(5, INSN_NOP);
    put1(6, br(C_BL, 0, 4));                        // -> LESS
    put1(7, INSN_NOP);
    put1(8, br(C_BA, 0, -5));                       // -> LOOP
    put1(9, enc_r(OP_SUB, 1, 1, 2));                // delay slot: a -= b
    put1(10, br(C_BA, 0, -7));                      // LESS -> LOOP
    put1(11, enc_r(OP_SUB, 2, 2, 1));               // delay slot: b -= a
    put1(12, enc_st(10, 1, 11'd0));                 // DONE
    put1(13, INSN_HALT);
    // two-unit multi-way schedule
    put2(0, ld(1, 0, AADDR), ld(2, 0, BADDR));
    put2(1, addi(10, 0, RES));
    put2(2, enc_cmp(0, 1, 2), addi(5, 1, 0));
    put2(3, br(C_BG, 0, -1), br(C_BL, 0, -1));
    put2(4, enc_r(OP_SUB, 1, 1, 2), enc_r(OP_SUB, 2, 2, 1));
    put2(5, enc_st(10, 5, 11'd0), INSN_HALT);
    // four-unit multi-way schedule (same loop; the other units idle)
    put4(0, ld(1, 0, AADDR), ld(2, 0, BADDR), addi(10, 0, RES));
    put4(1, INSN_NOP);
    put4(2, enc_cmp(0, 1, 2), addi(5, 1, 0));
    put4(3, br(C_BG, 0, -1), br(C_BL, 0, -1));
    put4(4, enc_r(OP_SUB, 1, 1, 2), enc_r(OP_SUB, 2, 2, 1));
    put4(5, enc_st(10, 5, 11'd0), INSN_HALT);
    sum1 = 0; sum2 = 0; sum4 = 0;
    foreach (pairs[p]) begin
      int a, b, it;
      a = pairs[p][0]; b = pairs[p][1]; it = 0;
      mem_wr(AADDR, a); mem_wr(BADDR, b);
      rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
      while (!(h1 && h2 && h4)) @(posedge clk);
      #1;
      while (a != b) begin if (a > b) a -= b; else b -= a; it++; end
      dbg_addr = word_t'(RES);
      #1;
      check($sformatf("scalar gcd(%0d,%0d)", pairs[p][0], pairs[p][1]), int'(rd1), a);
      check($sformatf("two-unit gcd(%0d,%0d)", pairs[p][0], pairs[p][1]), int'(rd2), a);
      check($sformatf("four-unit gcd(%0d,%0d)", pairs[p][0], pairs[p][1]), int'(rd4), a);
      check("scalar multi-way bundles", p1.multiway, 0);
      check("four-unit multi-way bundles", p4.multiway, it + 1);
      sum1 += p1.cycles; sum2 += p2.cycles; sum4 += p4.cycles;
      if (p == 0) begin
        c1_0 = int'(p1.cycles); c2_0 = int'(p2.cycles); c4_0 = int'(p4.cycles); it0 = it;
      end else begin
        check("scalar cycles per iteration", int'(p1.cycles) - c1_0, 7 * (it - it0));
        check("two-unit cycles per iteration", int'(p2.cycles) - c2_0, 3 * (it - it0));
        check("four-unit cycles per iteration", int'(p4.cycles) - c4_0, 3 * (it - it0));
      end
    end
    $display("GCD, all runs: scalar %0d cycles, two units %0d, four units %0d",
             sum1, sum2, sum4);
    $display("speedup over scalar: two units %0d.%02d, four units %0d.%02d",
             sum1 / sum2, (sum1 * 100 / sum2) % 100, sum1 / sum4, (sum1 * 100 / sum4) % 100);
    checks++;
    if (!(sum2 < sum1 && sum4 < sum1)) begin
      failures++;
      $display("FAIL the wide machines are not faster than the scalar one");
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

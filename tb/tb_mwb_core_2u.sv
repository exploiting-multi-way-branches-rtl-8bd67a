// tb_mwb_core_2u: the processor built with two execution units, the smaller
// configuration. Runs GCD by repeated subtraction with a two-way branch
// (greater / less, equal falls through) under delay-slot option 2: the
// delay-slot bundle holds "a -= b" in unit 0 and "b -= a" in unit 1, and
// only the one in the unit whose branch was taken executes, so no shadow
// registers are needed. Checks results against the testbench's own GCD and
// a loop cost of 3 cycles per iteration.
module tb_mwb_core_2u;
  import mwb_pkg::*;

  localparam int unsigned NU = 2;

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

  mwb_core #(.NUNITS(NU), .IMEM_DEPTH(64), .DMEM_WORDS(256)) dut (
    .clk, .rst_n, .ds_opt, .prog_we, .prog_addr, .prog_bundle,
    .dbg_we, .dbg_addr, .dbg_wdata, .dbg_rdata, .halted, .perf
  );

  always #5 clk = ~clk;

  int checks = 0, failures = 0;

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

  task automatic put(int addr, word_t i0, word_t i1 = INSN_NOP);
    prog_addr = pc_t'(addr); prog_bundle = {i1, i0}; prog_we = 1'b1;
    @(posedge clk); #1;
    prog_we = 1'b0;
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

  localparam int RES = 256, AADDR = 512, BADDR = 516;

  initial begin
    int pairs[5][2] = '{'{12, 18}, '{35, 14}, '{97, 5}, '{7, 7}, '{144, 60}};
    int cyc0, it0;
    #1;
    put(0, enc_i(OP_LD, 1, 0, 16'(AADDR)), enc_i(OP_LD, 2, 0, 16'(BADDR)));
    put(1, enc_i(OP_ADDI, 10, 0, 16'(RES)));
    put(2, enc_cmp(0, 1, 2), enc_i(OP_ADDI, 5, 1, 16'd0));        // LOOP
    put(3, enc_br(C_BG, 0, 16'hFFFF), enc_br(C_BL, 0, 16'hFFFF)); // two-way
    put(4, enc_r(OP_SUB, 1, 1, 2), enc_r(OP_SUB, 2, 2, 1));       // per-unit delay slot
    put(5, enc_st(10, 5, 11'd0), INSN_HALT);
    foreach (pairs[p]) begin
      int a, b, it, got;
      a = pairs[p][0]; b = pairs[p][1]; it = 0;
      mem_wr(AADDR, a); mem_wr(BADDR, b);
      rst_n = 1'b0; @(posedge clk); #1; rst_n = 1'b1;
      while (!halted) @(posedge clk);
      #1;
      while (a != b) begin if (a > b) a -= b; else b -= a; it++; end
      mem_rd(RES, got);
      check($sformatf("gcd(%0d,%0d)", pairs[p][0], pairs[p][1]), got, a);
      check("multi-way bundles", perf.multiway, it + 1);
      check("taken", perf.taken, it);
      check("nullified", perf.nullified, it);
      if (p == 0) begin cyc0 = int'(perf.cycles); it0 = it; end
      else check("cycles per iteration", int'(perf.cycles) - cyc0, 3 * (it - it0));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

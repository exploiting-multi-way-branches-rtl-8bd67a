// tb_multiway_branch_unit: random bundles of branches, each with its own
// condition codes, under the three delay-slot options. At most one
// condition is made to hold, as the scheduling rule demands; a separate
// group of cases makes several hold and checks the multi_hit report and the
// lowest-slot choice. The reference model computes the target, the
// redirect and the delay-slot mask directly.
module tb_multiway_branch_unit;
  import mwb_pkg::*;

  localparam int unsigned NU = 4;

  pc_t               pc;
  logic  [NU-1:0]    br_valid;
  cond_e [NU-1:0]    br_cond;
  pc_t   [NU-1:0]    br_disp;
  icc_t  [NU-1:0]    br_icc;
  ds_opt_e           ds_opt;
  logic              redirect, multi_hit;
  pc_t               target;
  logic  [NU-1:0]    taken_vec, sel_vec, ds_keep;

  multiway_branch_unit #(.NUNITS(NU)) dut (.*);

  int checks = 0, failures = 0;
  int n_taken = 0, n_fall = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  task automatic chk(string w, longint got, longint exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s got %0h exp %0h", w, got, exp);
    end
  endtask

  initial begin
    for (int t = 0; t < 3000; t++) begin
      int hit;
      logic allow_multi;
      allow_multi = (t % 10) == 9;
      hit = $urandom_range(0, NU);        // NU = no branch holds
      pc = pc_t'($urandom);
      ds_opt = ds_opt_e'($urandom_range(1, 3));
      for (int u = 0; u < int'(NU); u++) begin
        br_valid[u] = $urandom_range(0, 3) != 0;
        br_disp[u]  = pc_t'($urandom);
        br_icc[u]   = icc_t'($urandom);
        // BE on Z: hold exactly when intended
        br_cond[u]  = $urandom_range(0, 1) ? C_BE : C_BNE;
        if (u == hit || (allow_multi && $urandom_range(0, 1)))
          br_icc[u].z = (br_cond[u] == C_BE);
        else
          br_icc[u].z = (br_cond[u] != C_BE);
      end
      #1;
      begin
        logic [NU-1:0] exp_t, exp_keep, exp_sel;
        logic exp_red;
        pc_t exp_tgt;
        exp_t = '0;
        for (int u = 0; u < int'(NU); u++)
          exp_t[u] = br_valid[u] && ((br_cond[u] == C_BE) == br_icc[u].z);
        exp_red = exp_t != 0;
        exp_sel = '0;
        exp_tgt = pc + 1;
        for (int u = int'(NU) - 1; u >= 0; u--)
          if (exp_t[u]) begin exp_sel = '0; exp_sel[u] = 1; exp_tgt = pc + br_disp[u]; end
        if (!exp_red) exp_keep = '1;
        else if (ds_opt == DS_SAME_UNIT) exp_keep = exp_sel;
        else if (ds_opt == DS_NULLIFY_ALL) exp_keep = '0;
        else exp_keep = '1;
        chk("taken_vec", taken_vec, exp_t);
        chk("redirect", redirect, exp_red);
        chk("target", target, exp_tgt);
        chk("sel_vec", sel_vec, exp_sel);
        chk("ds_keep", ds_keep, exp_keep);
        chk("multi_hit", multi_hit, $countones(exp_t) > 1);
        if (exp_red) n_taken++; else n_fall++;
      end
    end
    chk("both outcomes seen", (n_taken > 0) && (n_fall > 0), 1);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

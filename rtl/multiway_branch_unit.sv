// multiway_branch_unit: carries out one multi-way branch.
//
// Every conditional branch in the bundle that is in the decode stage forms,
// together, one multi-way branch. Each slot's branch condition is evaluated
// at the same time by its own branch_cond_unit; the destination of the
// branch whose condition holds is selected and becomes the next program
// counter, and when no condition holds the program falls through to the next
// bundle. This is the original multi-way branch scheme.
//
// The compiler must only group branches whose conditions are mutually
// exclusive, so at most one condition may hold. The hardware does not rely
// on that for safety: if several hold, the lowest-numbered slot wins and
// multi_hit reports the broken rule (the core asserts it never happens).
//
// The bundle after the branch bundle is its delay slot. ds_keep says which
// of its slots survive, following the three options of the original scheme:
//   option 1  all delay-slot instructions execute;
//   option 2  only the delay-slot instruction in the same execution unit as
//             the taken branch executes, the rest are nullified;
//   option 3  all delay-slot instructions are nullified.
// Options 2 and 3 nullify only when a branch is taken; on fall-through the
// delay slot is ordinary sequential code and always executes (the original scheme
// does not say; this is the natural reading).
//
// Purely combinational. Targets are pc + disp in bundles, disp signed.
module multiway_branch_unit
  import mwb_pkg::*;
#(
  parameter int unsigned NUNITS = 4
) (
  input  pc_t                     pc,        // bundle address of the branch bundle
  input  logic    [NUNITS-1:0]    br_valid,  // slot holds a live conditional branch
  input  cond_e   [NUNITS-1:0]    br_cond,
  input  pc_t     [NUNITS-1:0]    br_disp,
  input  icc_t    [NUNITS-1:0]    br_icc,    // condition codes each branch tests
  input  ds_opt_e                 ds_opt,
  output logic                    redirect,  // a condition holds: load target into PC
  output pc_t                     target,
  output logic    [NUNITS-1:0]    taken_vec, // per-slot condition results
  output logic    [NUNITS-1:0]    sel_vec,   // one-hot: the branch whose action is taken
  output logic    [NUNITS-1:0]    ds_keep,   // delay-slot instructions that execute
  output logic                    multi_hit  // more than one condition held
);

  for (genvar u = 0; u < NUNITS; u++) begin : g_cond
    branch_cond_unit u_cond (
      .valid (br_valid[u]),
      .cond  (br_cond[u]),
      .icc   (br_icc[u]),
      .taken (taken_vec[u])
    );
  end

  always_comb begin
    logic found;
    found    = 1'b0;
    sel_vec  = '0;
    target   = pc + pc_t'(1);
    for (int u = 0; u < NUNITS; u++) begin
      if (taken_vec[u] && !found) begin
        found      = 1'b1;
        sel_vec[u] = 1'b1;
        target     = pc + br_disp[u];
      end
    end
    redirect  = found;
    multi_hit = (taken_vec & (taken_vec - 1'b1)) != '0;

    if (!found) begin
      ds_keep = '1;
    end else begin
      unique case (ds_opt)
        DS_SAME_UNIT:   ds_keep = sel_vec;
        DS_NULLIFY_ALL: ds_keep = '0;
        default:        ds_keep = '1;
      endcase
    end
  end

endmodule

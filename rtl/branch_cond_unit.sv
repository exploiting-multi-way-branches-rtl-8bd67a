// branch_cond_unit: evaluates one conditional branch in one execution unit.
//
// In the multi-way branch scheme every conditional branch of an issue bundle
// is evaluated concurrently by the execution unit it was scheduled into; this
// module is that per-unit condition test. It decodes the sixteen Sparc Bicc
// conditions against one set of integer condition codes (N, Z, V, C), the
// way the Sparc instruction set the original scheme starts from defines them.
//
// Interface: valid qualifies the instruction (a nullified or non-branch slot
// never reports taken); cond is the Bicc condition; icc the condition codes
// the branch tests, already forwarded by the caller. Purely combinational:
// taken is valid in the same cycle.
module branch_cond_unit
  import mwb_pkg::*;
(
  input  logic  valid,
  input  cond_e cond,
  input  icc_t  icc,
  output logic  taken
);

  logic hold;

  always_comb begin
    unique case (cond)
      C_BN:    hold = 1'b0;
      C_BE:    hold = icc.z;
      C_BLE:   hold = icc.z | (icc.n ^ icc.v);
      C_BL:    hold = icc.n ^ icc.v;
      C_BLEU:  hold = icc.c | icc.z;
      C_BCS:   hold = icc.c;
      C_BNEG:  hold = icc.n;
      C_BVS:   hold = icc.v;
      C_BA:    hold = 1'b1;
      C_BNE:   hold = ~icc.z;
      C_BG:    hold = ~(icc.z | (icc.n ^ icc.v));
      C_BGE:   hold = ~(icc.n ^ icc.v);
      C_BGU:   hold = ~(icc.c | icc.z);
      C_BCC:   hold = ~icc.c;
      C_BPOS:  hold = ~icc.n;
      C_BVC:   hold = ~icc.v;
      default: hold = 1'b0;
    endcase
    taken = valid & hold;
  end

endmodule

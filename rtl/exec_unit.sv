// exec_unit: the ALU of one execution unit (stage 3, "ALU operation").
//
// Every execution unit of the processor is identical and can run any
// instruction: arithmetic and logic, the address add of a load or store, and
// the subtract of a compare, whose Sparc-style condition codes it produces:
//   N = result[31], Z = (result == 0),
//   V = signed overflow of a - b, C = borrow of a - b (a < b unsigned).
// Shifts use the low five bits of b. Combinational.
module exec_unit
  import mwb_pkg::*;
(
  input  alu_op_e alu_op,
  input  word_t   a,
  input  word_t   b,
  output word_t   result,
  output icc_t    icc      // condition codes of a - b
);

  word_t diff;

  always_comb begin
    diff = a - b;
    unique case (alu_op)
      ALU_ADD: result = a + b;
      ALU_SUB: result = diff;
      ALU_AND: result = a & b;
      ALU_OR:  result = a | b;
      ALU_XOR: result = a ^ b;
      ALU_SLL: result = a << b[4:0];
      ALU_SRL: result = a >> b[4:0];
      ALU_SRA: result = word_t'($signed(a) >>> b[4:0]);
      default: result = a + b;
    endcase
    icc.n = diff[XLEN-1];
    icc.z = (diff == '0);
    icc.v = (a[XLEN-1] != b[XLEN-1]) && (diff[XLEN-1] != a[XLEN-1]);
    icc.c = (a < b);
  end

endmodule

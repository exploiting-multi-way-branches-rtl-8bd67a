// insn_decoder: decodes one 32-bit instruction of one execution-unit slot.
//
// Part of the decode / register-fetch stage (stage 2 of the five-stage
// pipeline). Translates the instruction encoding of mwb_pkg into the control
// fields the later stages use. Loads and stores compute their address with
// the ALU (add of rs1 and an offset), compares are subtracts that write a
// condition-code register instead of an integer register. Unknown opcodes
// decode as no-operations. The instruction set is this design's own
// Sparc-style encoding; the original scheme only says the instruction set is
// derived from Sparc and extended.
//
// Combinational; valid_in qualifies the slot (nullified slots decode to a
// no-operation with valid cleared).
module insn_decoder
  import mwb_pkg::*;
(
  input  logic  valid_in,
  input  word_t insn,
  output dec_t  dec
);

  opcode_e op;
  logic [15:0] imm16;
  logic [10:0] imm11;

  always_comb begin
    op    = opcode_e'(insn[31:26]);
    imm16 = insn[15:0];
    imm11 = insn[10:0];

    dec           = '0;
    dec.valid     = valid_in;
    dec.rd        = insn[25:21];
    dec.rs1       = insn[20:16];
    dec.rs2       = insn[15:11];
    dec.alu_op    = ALU_ADD;
    dec.imm       = {{16{imm16[15]}}, imm16};
    dec.cc_dst    = cc_idx_t'(insn[21+$clog2(NCC)-1:21]);
    dec.cc_src    = cc_idx_t'(insn[16+$clog2(NCC)-1:16]);
    dec.cond      = cond_e'(insn[25:22]);
    dec.disp      = pc_t'({{16{imm16[15]}}, imm16});

    unique case (op)
      OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_SLL, OP_SRL, OP_SRA: begin
        dec.alu_op    = alu_op_e'(3'(op - OP_ADD));
        dec.reads_rs1 = 1'b1;
        dec.reads_rs2 = 1'b1;
        dec.reg_we    = 1'b1;
      end
      OP_ADDI, OP_SUBI, OP_ANDI, OP_ORI, OP_XORI, OP_SLLI, OP_SRLI, OP_SRAI: begin
        dec.alu_op    = alu_op_e'(3'(op - OP_ADDI));
        dec.use_imm   = 1'b1;
        dec.reads_rs1 = 1'b1;
        dec.reg_we    = 1'b1;
      end
      OP_SETHI: begin
        // rd = imm16 << 16, computed as r0 + (imm16 << 16)
        dec.rs1       = '0;
        dec.imm       = {imm16, 16'd0};
        dec.use_imm   = 1'b1;
        dec.reg_we    = 1'b1;
      end
      OP_LD: begin
        dec.use_imm   = 1'b1;
        dec.reads_rs1 = 1'b1;
        dec.reg_we    = 1'b1;
        dec.is_load   = 1'b1;
      end
      OP_ST: begin
        dec.imm       = {{21{imm11[10]}}, imm11};
        dec.use_imm   = 1'b1;
        dec.reads_rs1 = 1'b1;
        dec.reads_rs2 = 1'b1;
        dec.is_store  = 1'b1;
      end
      OP_CMP: begin
        dec.alu_op    = ALU_SUB;
        dec.reads_rs1 = 1'b1;
        dec.reads_rs2 = 1'b1;
        dec.is_cmp    = 1'b1;
      end
      OP_CMPI: begin
        dec.alu_op    = ALU_SUB;
        dec.use_imm   = 1'b1;
        dec.reads_rs1 = 1'b1;
        dec.is_cmp    = 1'b1;
      end
      OP_BICC: dec.is_branch = 1'b1;
      OP_HALT: dec.is_halt   = 1'b1;
      default: ;
    endcase

    // r0 is hard-wired to zero: never written
    if (dec.rd == '0) dec.reg_we = 1'b0;

    if (!valid_in) begin
      dec.reg_we    = 1'b0;
      dec.is_load   = 1'b0;
      dec.is_store  = 1'b0;
      dec.is_cmp    = 1'b0;
      dec.is_branch = 1'b0;
      dec.is_halt   = 1'b0;
    end
  end

endmodule

// mwb_pkg: instruction set, decoded-instruction type and shared constants of
// the multi-way-branch superscalar processor.
//
// The processor executes a Sparc-flavoured integer instruction set. The
// original scheme derives its instruction set from Sparc and extends it; the
// exact encoding below is this design's own. What is kept from Sparc: 32 integer
// registers with r0 reading as zero, compare instructions that set integer
// condition codes (N, Z, V, C), and Bicc conditional branches with the
// sixteen Sparc condition encodings. The extension that makes concurrent
// branches possible is that there are NCC condition-code registers instead
// of one: a compare names the register it writes and a branch names the
// register it tests, so several compare/branch pairs can live in one bundle.
//
// Encoding (32 bits, one instruction per execution-unit slot):
//   [31:26] opcode   (opcode_e)
//   [25:21] rd       destination register; for CMP/CMPI the cc register index
//   [20:16] rs1      first source; for BICC the cc register to test
//   [15:11] rs2      second source (register forms and ST data)
//   [15:0]  simm16   immediate of ALU-immediate forms, LD offset, SETHI value,
//                    BICC displacement (signed, in bundles, from the branch's bundle)
//   [10:0]  simm11   ST offset
//   [25:22] cond     BICC condition (Sparc encoding)
// Addresses of data are byte addresses of 32-bit words (low two bits ignored);
// the program counter counts bundles.
package mwb_pkg;

  localparam int unsigned XLEN  = 32;
  localparam int unsigned NREG  = 32;
  localparam int unsigned NCC   = 4;   // condition-code registers
  localparam int unsigned PCW   = 16;  // program counter width (bundle index)

  typedef logic [XLEN-1:0] word_t;
  typedef logic [4:0]      reg_idx_t;
  typedef logic [$clog2(NCC)-1:0] cc_idx_t;
  typedef logic [PCW-1:0]  pc_t;

  // Integer condition codes, as in the Sparc icc field.
  typedef struct packed {
    logic n;
    logic z;
    logic v;
    logic c;
  } icc_t;

  typedef enum logic [5:0] {
    OP_NOP   = 6'd0,
    OP_ADD   = 6'd1,
    OP_SUB   = 6'd2,
    OP_AND   = 6'd3,
    OP_OR    = 6'd4,
    OP_XOR   = 6'd5,
    OP_SLL   = 6'd6,
    OP_SRL   = 6'd7,
    OP_SRA   = 6'd8,
    OP_ADDI  = 6'd9,
    OP_SUBI  = 6'd10,
    OP_ANDI  = 6'd11,
    OP_ORI   = 6'd12,
    OP_XORI  = 6'd13,
    OP_SLLI  = 6'd14,
    OP_SRLI  = 6'd15,
    OP_SRAI  = 6'd16,
    OP_LD    = 6'd17,
    OP_ST    = 6'd18,
    OP_CMP   = 6'd19,
    OP_CMPI  = 6'd20,
    OP_BICC  = 6'd21,
    OP_HALT  = 6'd22,
    OP_SETHI = 6'd23
  } opcode_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SLL, ALU_SRL, ALU_SRA
  } alu_op_e;

  // Sparc Bicc condition field.
  typedef enum logic [3:0] {
    C_BN   = 4'd0,  C_BE   = 4'd1,  C_BLE  = 4'd2,  C_BL   = 4'd3,
    C_BLEU = 4'd4,  C_BCS  = 4'd5,  C_BNEG = 4'd6,  C_BVS  = 4'd7,
    C_BA   = 4'd8,  C_BNE  = 4'd9,  C_BG   = 4'd10, C_BGE  = 4'd11,
    C_BGU  = 4'd12, C_BCC  = 4'd13, C_BPOS = 4'd14, C_BVC  = 4'd15
  } cond_e;

  // Delay-slot options for multi-way branches (the original scheme).
  typedef enum logic [1:0] {
    DS_EXECUTE_ALL = 2'd1,  // option 1: execute every delay-slot instruction
    DS_SAME_UNIT   = 2'd2,  // option 2: execute only the one in the taken branch's unit
    DS_NULLIFY_ALL = 2'd3   // option 3: nullify every delay-slot instruction
  } ds_opt_e;

  typedef struct packed {
    logic     valid;
    alu_op_e  alu_op;
    logic     use_imm;
    word_t    imm;
    reg_idx_t rd;
    reg_idx_t rs1;
    reg_idx_t rs2;
    logic     reads_rs1;
    logic     reads_rs2;
    logic     reg_we;
    logic     is_load;
    logic     is_store;
    logic     is_cmp;
    cc_idx_t  cc_dst;
    logic     is_branch;
    cond_e    cond;
    cc_idx_t  cc_src;
    pc_t      disp;
    logic     is_halt;
  } dec_t;

  // Event counters of the core. cycles counts from reset release to halt.
  typedef struct packed {
    logic [31:0] cycles;
    logic [31:0] bundles;    // bundles with at least one live instruction leaving decode
    logic [31:0] insns;      // live instructions leaving decode
    logic [31:0] branches;   // live conditional branches evaluated
    logic [31:0] multiway;   // bundles evaluating two or more branches at once
    logic [31:0] taken;      // branch actions taken (PC loaded with a target)
    logic [31:0] nullified;  // delay-slot instructions nullified
    logic [31:0] byp_mem;    // operands forwarded from the memory stage
    logic [31:0] byp_wb;     // operands forwarded from the write-back stage
    logic [31:0] cc_fwd;     // branches that took condition codes from a compare in the ALU stage
    logic [31:0] multi_hit;  // bundles where more than one branch condition held
  } perf_t;

  // Instruction builders, shared by testbenches and program images.
  function automatic word_t enc_r(opcode_e op, reg_idx_t rd, reg_idx_t rs1, reg_idx_t rs2);
    return {op, rd, rs1, rs2, 11'd0};
  endfunction

  function automatic word_t enc_i(opcode_e op, reg_idx_t rd, reg_idx_t rs1, logic [15:0] imm);
    return {op, rd, rs1, imm};
  endfunction

  function automatic word_t enc_st(reg_idx_t rs1, reg_idx_t rs2, logic [10:0] off);
    return {OP_ST, 5'd0, rs1, rs2, off};
  endfunction

  function automatic word_t enc_cmp(cc_idx_t cc, reg_idx_t rs1, reg_idx_t rs2);
    return {OP_CMP, 5'(cc), rs1, rs2, 11'd0};
  endfunction

  function automatic word_t enc_cmpi(cc_idx_t cc, reg_idx_t rs1, logic [15:0] imm);
    return {OP_CMPI, 5'(cc), rs1, imm};
  endfunction

  function automatic word_t enc_br(cond_e cond, cc_idx_t cc, logic [15:0] disp);
    return {OP_BICC, cond, 1'b0, 5'(cc), disp};
  endfunction

  localparam word_t INSN_NOP  = '0;
  localparam word_t INSN_HALT = {OP_HALT, 26'd0};

endpackage

// tb_insn_decoder: encodes instructions with the package's builders and
// random fields, decodes them, and checks the control fields against what
// each instruction class must produce (register writes, immediates, memory
// and compare flags, branch fields, r0 never written, nullified slots inert).
module tb_insn_decoder;
  import mwb_pkg::*;

  logic  valid_in;
  word_t insn;
  dec_t  dec;

  insn_decoder dut (.valid_in, .insn, .dec);

  int checks = 0, failures = 0;

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
      $display("FAIL %s got %0h exp %0h (insn %h)", w, got, exp, insn);
    end
  endtask

  initial begin
    for (int t = 0; t < 2000; t++) begin
      reg_idx_t rd, rs1, rs2;
      logic [15:0] imm;
      int kind;
      rd = reg_idx_t'($urandom); rs1 = reg_idx_t'($urandom); rs2 = reg_idx_t'($urandom);
      imm = 16'($urandom);
      kind = $urandom_range(0, 7);
      valid_in = ($urandom_range(0, 7) != 0);
      case (kind)
        0: begin   // register ALU op
          opcode_e op;
          op = opcode_e'($urandom_range(int'(OP_ADD), int'(OP_SRA)));
          insn = enc_r(op, rd, rs1, rs2); #1;
          chk("r.alu_op", dec.alu_op, int'(op) - int'(OP_ADD));
          chk("r.use_imm", dec.use_imm, 0);
          chk("r.reg_we", dec.reg_we, valid_in && rd != 0);
          chk("r.rs1", dec.rs1, rs1); chk("r.rs2", dec.rs2, rs2);
        end
        1: begin   // immediate ALU op
          opcode_e op;
          op = opcode_e'($urandom_range(int'(OP_ADDI), int'(OP_SRAI)));
          insn = enc_i(op, rd, rs1, imm); #1;
          chk("i.alu_op", dec.alu_op, int'(op) - int'(OP_ADDI));
          chk("i.use_imm", dec.use_imm, 1);
          chk("i.imm", dec.imm, {{16{imm[15]}}, imm});
          chk("i.reg_we", dec.reg_we, valid_in && rd != 0);
        end
        2: begin   // load
          insn = enc_i(OP_LD, rd, rs1, imm); #1;
          chk("ld.is_load", dec.is_load, valid_in);
          chk("ld.imm", dec.imm, {{16{imm[15]}}, imm});
          chk("ld.alu_op", dec.alu_op, ALU_ADD);
          chk("ld.reg_we", dec.reg_we, valid_in && rd != 0);
        end
        3: begin   // store
          insn = enc_st(rs1, rs2, imm[10:0]); #1;
          chk("st.is_store", dec.is_store, valid_in);
          chk("st.imm", dec.imm, {{21{imm[10]}}, imm[10:0]});
          chk("st.reg_we", dec.reg_we, 0);
          chk("st.rs2", dec.rs2, rs2);
        end
        4: begin   // compare
          cc_idx_t cc;
          cc = cc_idx_t'($urandom);
          if (imm[0]) begin insn = enc_cmp(cc, rs1, rs2); end
          else begin insn = enc_cmpi(cc, rs1, imm); end
          #1;
          chk("cmp.is_cmp", dec.is_cmp, valid_in);
          chk("cmp.cc_dst", dec.cc_dst, cc);
          chk("cmp.alu_op", dec.alu_op, ALU_SUB);
          chk("cmp.use_imm", dec.use_imm, !imm[0]);
          chk("cmp.reg_we", dec.reg_we, 0);
        end
        5: begin   // branch
          cc_idx_t cc;
          cond_e c;
          cc = cc_idx_t'($urandom); c = cond_e'($urandom_range(0, 15));
          insn = enc_br(c, cc, imm); #1;
          chk("br.is_branch", dec.is_branch, valid_in);
          chk("br.cond", dec.cond, c);
          chk("br.cc_src", dec.cc_src, cc);
          chk("br.disp", dec.disp, pc_t'({{16{imm[15]}}, imm}));
          chk("br.reg_we", dec.reg_we, 0);
        end
        6: begin   // halt / sethi
          if (imm[0]) begin
            insn = INSN_HALT; #1;
            chk("halt", dec.is_halt, valid_in);
          end else begin
            insn = enc_i(OP_SETHI, rd, rs1, imm); #1;
            chk("sethi.imm", dec.imm, {imm, 16'd0});
            chk("sethi.rs1", dec.rs1, 0);
            chk("sethi.reg_we", dec.reg_we, valid_in && rd != 0);
          end
        end
        default: begin  // undefined opcode: no effect
          insn = {6'($urandom_range(24, 63)), 26'($urandom)}; #1;
          chk("undef inert", {dec.reg_we, dec.is_load, dec.is_store, dec.is_cmp,
                              dec.is_branch, dec.is_halt}, 0);
        end
      endcase
      chk("valid", dec.valid, valid_in);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

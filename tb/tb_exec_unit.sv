// tb_exec_unit: random operands for every ALU operation; results and the
// compare condition codes are checked against arithmetic done in the
// testbench (signed and unsigned comparisons for N^V and C).
module tb_exec_unit;
  import mwb_pkg::*;

  alu_op_e op;
  word_t   a, b, result;
  icc_t    icc;

  exec_unit dut (.alu_op(op), .a, .b, .result, .icc);

  int checks = 0, failures = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      word_t exp;
      op = alu_op_e'($urandom_range(0, 7));
      a = (t % 4 == 0) ? word_t'($urandom_range(0, 3)) : $urandom;
      b = (t % 5 == 0) ? a : ((t % 3 == 0) ? word_t'($urandom_range(0, 40)) : $urandom);
      #1;
      case (op)
        ALU_ADD: exp = a + b;
        ALU_SUB: exp = a - b;
        ALU_AND: exp = a & b;
        ALU_OR:  exp = a | b;
        ALU_XOR: exp = a ^ b;
        ALU_SLL: exp = a << (b % 32);
        ALU_SRL: exp = a >> (b % 32);
        default: exp = word_t'($signed(a) >>> (b % 32));
      endcase
      checks++;
      if (result !== exp) begin
        failures++;
        $display("FAIL op=%0d a=%h b=%h got %h exp %h", op, a, b, result, exp);
      end
      checks++;
      if ((icc.n != icc.v) !== ($signed(a) < $signed(b)) || icc.c !== (a < b) ||
          icc.z !== (a == b) || icc.n !== exp_n(a, b)) begin
        failures++;
        $display("FAIL icc a=%h b=%h icc=%b", a, b, icc);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic exp_n(word_t x, word_t y);
    word_t d;
    d = x - y;
    return d[31];
  endfunction
endmodule

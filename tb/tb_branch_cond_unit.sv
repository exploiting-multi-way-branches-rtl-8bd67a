// tb_branch_cond_unit: checks all sixteen Sparc branch conditions against
// all sixteen condition-code values, with valid high and low. The expected
// result is worked out from the signed/unsigned comparison each condition
// stands for, using the codes of a real subtraction where possible.
module tb_branch_cond_unit;
  import mwb_pkg::*;

  logic  valid;
  cond_e cond;
  icc_t  icc;
  logic  taken;

  branch_cond_unit dut (.valid, .cond, .icc, .taken);

  int checks = 0, failures = 0;

  initial begin
    #100000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  function automatic logic ref_hold(cond_e c, icc_t f);
    logic lt_s, lt_u;
    lt_s = f.n != f.v;
    lt_u = f.c;
    case (c)
      C_BA:    return 1;
      C_BN:    return 0;
      C_BE:    return f.z;
      C_BNE:   return !f.z;
      C_BL:    return lt_s;
      C_BGE:   return !lt_s;
      C_BLE:   return lt_s || f.z;
      C_BG:    return !lt_s && !f.z;
      C_BCS:   return lt_u;
      C_BCC:   return !lt_u;
      C_BLEU:  return lt_u || f.z;
      C_BGU:   return !lt_u && !f.z;
      C_BNEG:  return f.n;
      C_BPOS:  return !f.n;
      C_BVS:   return f.v;
      C_BVC:   return !f.v;
      default: return 0;
    endcase
  endfunction

  initial begin
    // exhaustive over cond x icc x valid
    for (int c = 0; c < 16; c++)
      for (int f = 0; f < 16; f++)
        for (int v = 0; v < 2; v++) begin
          cond = cond_e'(c); icc = icc_t'(f); valid = v[0];
          #1;
          checks++;
          if (taken !== (valid && ref_hold(cond, icc))) begin
            failures++;
            $display("FAIL cond=%0d icc=%b valid=%0d taken=%0d", c, f, v, taken);
          end
        end
    // signed/unsigned meaning on real compares: a vs b
    for (int i = 0; i < 200; i++) begin
      int a, b;
      logic [31:0] d;
      a = $urandom_range(0, 20) - 10; b = $urandom_range(0, 20) - 10;
      d = a - b;
      icc.n = d[31]; icc.z = (d == 0);
      icc.v = (a[31] != b[31]) && (d[31] != a[31]);
      icc.c = unsigned'(a) < unsigned'(b);
      valid = 1;
      cond = C_BL;  #1; checks++; if (taken !== (a < b))  failures++;
      cond = C_BG;  #1; checks++; if (taken !== (a > b))  failures++;
      cond = C_BLE; #1; checks++; if (taken !== (a <= b)) failures++;
      cond = C_BGU; #1; checks++; if (taken !== (unsigned'(a) > unsigned'(b))) failures++;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_bypass_unit: random producer sets in the memory and write-back stages;
// the selected operand must be the newest one (memory stage over write-back
// over register file, highest unit within a stage) and r0 is never
// forwarded.
module tb_bypass_unit;
  import mwb_pkg::*;

  localparam int unsigned NU = 4;

  reg_idx_t            src;
  word_t               rf_val;
  logic     [NU-1:0]   m_we, w_we;
  reg_idx_t [NU-1:0]   m_rd, w_rd;
  word_t    [NU-1:0]   m_val, w_val;
  word_t               val;
  logic                from_m, from_w;

  bypass_unit #(.NUNITS(NU)) dut (.*);

  int checks = 0, failures = 0, nm = 0, nw = 0, nr = 0;

  initial begin
    #1000000;
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    for (int t = 0; t < 4000; t++) begin
      word_t exp;
      logic em, ew;
      src = reg_idx_t'($urandom_range(0, 5));
      rf_val = $urandom;
      for (int u = 0; u < int'(NU); u++) begin
        m_we[u] = $urandom_range(0, 2) == 0; m_rd[u] = reg_idx_t'($urandom_range(0, 5)); m_val[u] = $urandom;
        w_we[u] = $urandom_range(0, 2) == 0; w_rd[u] = reg_idx_t'($urandom_range(0, 5)); w_val[u] = $urandom;
      end
      #1;
      exp = rf_val; em = 0; ew = 0;
      if (src != 0) begin
        for (int u = 0; u < int'(NU); u++) if (w_we[u] && w_rd[u] == src) begin exp = w_val[u]; ew = 1; end
        for (int u = 0; u < int'(NU); u++) if (m_we[u] && m_rd[u] == src) begin exp = m_val[u]; em = 1; end
      end
      checks++;
      if (val !== exp || from_m !== em || from_w !== (ew && !em)) begin
        failures++;
        $display("FAIL t=%0d src=%0d got %h exp %h", t, src, val, exp);
      end
      if (em) nm++; else if (ew) nw++; else nr++;
    end
    checks++;
    if (nm == 0 || nw == 0 || nr == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

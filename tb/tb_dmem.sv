// tb_dmem: random loads and stores on all unit ports and the debug port of a
// small data memory, against a shadow array. Checks combinational reads,
// byte addressing of words, and the write priority (highest unit, then
// the debug port).
module tb_dmem;
  import mwb_pkg::*;

  localparam int unsigned NU = 4, WORDS = 64;

  logic clk = 0;
  word_t [NU-1:0] addr, wdata, rdata;
  logic  [NU-1:0] we;
  word_t dbg_addr, dbg_wdata, dbg_rdata;
  logic  dbg_we;

  dmem #(.NUNITS(NU), .DMEM_WORDS(WORDS)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t shadow [WORDS];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; dbg_we = 0; addr = '0; wdata = '0; dbg_wdata = '0;
    @(negedge clk);
    for (int a = 0; a < int'(WORDS); a++) begin
      dbg_addr = word_t'(4 * a); dbg_wdata = $urandom; dbg_we = 1;
      shadow[a] = dbg_wdata;
      @(negedge clk);
    end
    dbg_we = 0;
    for (int t = 0; t < 3000; t++) begin
      for (int u = 0; u < int'(NU); u++) begin
        addr[u]  = word_t'(4 * $urandom_range(0, 7) + $urandom_range(0, 3));
        we[u]    = $urandom_range(0, 3) == 0;
        wdata[u] = $urandom;
      end
      dbg_addr  = word_t'(4 * $urandom_range(0, 7));
      dbg_we    = $urandom_range(0, 3) == 0;
      dbg_wdata = $urandom;
      #1;
      for (int u = 0; u < int'(NU); u++) begin
        checks++;
        if (rdata[u] !== shadow[addr[u][31:2] % WORDS]) begin
          failures++;
          $display("FAIL port %0d addr %h", u, addr[u]);
        end
      end
      checks++;
      if (dbg_rdata !== shadow[dbg_addr[31:2] % WORDS]) failures++;
      @(posedge clk);
      if (dbg_we) shadow[dbg_addr[31:2] % WORDS] = dbg_wdata;
      for (int u = 0; u < int'(NU); u++) if (we[u]) shadow[addr[u][31:2] % WORDS] = wdata[u];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

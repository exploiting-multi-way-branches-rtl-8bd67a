// tb_imem: writes random bundles to random addresses of a small instruction
// memory and reads them back at the fetch port, comparing with a shadow copy;
// also checks that the read is combinational (same-cycle) and that the
// address wraps at the depth.
module tb_imem;
  import mwb_pkg::*;

  localparam int unsigned NU = 4, DEPTH = 32;

  logic clk = 0;
  pc_t raddr = '0, waddr = '0;
  word_t [NU-1:0] rdata, wdata;
  logic we = 0;

  imem #(.NUNITS(NU), .IMEM_DEPTH(DEPTH)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  logic [NU*XLEN-1:0] shadow [DEPTH];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    wdata = '0;
    @(negedge clk);
    for (int a = 0; a < int'(DEPTH); a++) begin
      waddr = pc_t'(a);
      for (int u = 0; u < int'(NU); u++) wdata[u] = $urandom;
      shadow[a] = wdata;
      we = 1; @(negedge clk);
    end
    we = 0;
    for (int t = 0; t < 2000; t++) begin
      if ($urandom_range(0, 1)) begin
        waddr = pc_t'($urandom);
        for (int u = 0; u < int'(NU); u++) wdata[u] = $urandom;
        we = 1;
      end else begin
        we = 0;
        waddr = pc_t'($urandom);           // must not be written
        for (int u = 0; u < int'(NU); u++) wdata[u] = $urandom;
      end
      raddr = pc_t'($urandom);     // upper bits beyond the depth are ignored
      #1;
      checks++;
      if (rdata !== shadow[raddr % DEPTH]) begin
        failures++;
        $display("FAIL read %0d", raddr);
      end
      @(posedge clk);
      if (we) shadow[waddr % DEPTH] = wdata;
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

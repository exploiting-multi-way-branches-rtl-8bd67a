// tb_regfile: random reads and writes on all ports against a shadow array.
// Checks reset to zero, r0 stuck at zero, write-through of same-cycle
// writes, and that the highest write port wins a conflict.
module tb_regfile;
  import mwb_pkg::*;

  localparam int unsigned NRD = 8, NWR = 4;

  logic clk = 0, rst_n = 0;
  reg_idx_t [NRD-1:0] raddr;
  word_t    [NRD-1:0] rdata;
  logic     [NWR-1:0] we;
  reg_idx_t [NWR-1:0] waddr;
  word_t    [NWR-1:0] wdata;

  regfile #(.NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  word_t shadow [NREG];

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    we = '0; raddr = '0; waddr = '0; wdata = '0;
    foreach (shadow[i]) shadow[i] = '0;
    #12 rst_n = 1;
    @(negedge clk);
    for (int t = 0; t < 3000; t++) begin
      for (int p = 0; p < int'(NWR); p++) begin
        we[p] = $urandom_range(0, 1);
        waddr[p] = reg_idx_t'($urandom_range(0, 7));   // small range: conflicts
        wdata[p] = $urandom;
      end
      for (int q = 0; q < int'(NRD); q++) raddr[q] = reg_idx_t'($urandom_range(0, 9));
      #1;
      for (int q = 0; q < int'(NRD); q++) begin
        word_t exp;
        exp = shadow[raddr[q]];
        for (int p = 0; p < int'(NWR); p++) if (we[p] && waddr[p] == raddr[q]) exp = wdata[p];
        if (raddr[q] == 0) exp = 0;
        checks++;
        if (rdata[q] !== exp) begin
          failures++;
          $display("FAIL t=%0d r%0d got %h exp %h", t, raddr[q], rdata[q], exp);
        end
      end
      @(posedge clk);
      for (int p = 0; p < int'(NWR); p++)
        if (we[p] && waddr[p] != 0) shadow[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

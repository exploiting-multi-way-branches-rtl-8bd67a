// tb_cc_file: random compare writes and branch reads against a shadow copy.
// Checks reset to zero, same-cycle forwarding of a write to a read of the
// same register, and that the highest write port wins a conflict.
module tb_cc_file;
  import mwb_pkg::*;

  localparam int unsigned NRD = 4, NWR = 4;

  logic clk = 0, rst_n = 0;
  cc_idx_t [NRD-1:0] raddr;
  icc_t    [NRD-1:0] rdata;
  logic    [NWR-1:0] we;
  cc_idx_t [NWR-1:0] waddr;
  icc_t    [NWR-1:0] wdata;

  cc_file #(.NRD(NRD), .NWR(NWR)) dut (.*);

  always #5 clk = ~clk;

  int checks = 0, failures = 0, n_fwd = 0;
  icc_t shadow [NCC];

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
        we[p] = ($urandom_range(0, 3) == 0);
        waddr[p] = cc_idx_t'($urandom);
        wdata[p] = icc_t'($urandom);
      end
      for (int q = 0; q < int'(NRD); q++) raddr[q] = cc_idx_t'($urandom);
      #1;
      for (int q = 0; q < int'(NRD); q++) begin
        icc_t exp;
        exp = shadow[raddr[q]];
        for (int p = 0; p < int'(NWR); p++)
          if (we[p] && waddr[p] == raddr[q]) begin exp = wdata[p]; n_fwd++; end
        checks++;
        if (rdata[q] !== exp) begin
          failures++;
          $display("FAIL t=%0d cc%0d got %b exp %b", t, raddr[q], rdata[q], exp);
        end
      end
      @(posedge clk);
      for (int p = 0; p < int'(NWR); p++) if (we[p]) shadow[waddr[p]] = wdata[p];
      @(negedge clk);
    end
    checks++;
    if (n_fwd == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// regfile: integer register file shared by all execution units.
//
// NREG words of XLEN bits, register 0 reads as zero (as in Sparc's %g0).
// Read in the decode / register-fetch stage: two read ports per execution
// unit. Written in the write-back stage: one write port per unit. Reads are
// combinational and see a write of the same cycle (write-through), so an
// instruction three bundles after its producer needs no other bypass. If
// several ports write one register in one cycle the highest-numbered port
// wins; the static scheduler is expected not to do that.
// Reset clears every register. No register windows: the original scheme's
// processor model does not mention them, and this design leaves them out.
module regfile
  import mwb_pkg::*;
#(
  parameter int unsigned NRD = 8,
  parameter int unsigned NWR = 4
) (
  input  logic                 clk,
  input  logic                 rst_n,
  input  reg_idx_t [NRD-1:0]   raddr,
  output word_t    [NRD-1:0]   rdata,
  input  logic     [NWR-1:0]   we,
  input  reg_idx_t [NWR-1:0]   waddr,
  input  word_t    [NWR-1:0]   wdata
);

  word_t regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NREG); r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (we[p] && waddr[p] != '0) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int q = 0; q < int'(NRD); q++) begin
      rdata[q] = regs[raddr[q]];
      for (int p = 0; p < int'(NWR); p++)
        if (we[p] && waddr[p] == raddr[q]) rdata[q] = wdata[p];
      if (raddr[q] == '0) rdata[q] = '0;
    end
  end

endmodule

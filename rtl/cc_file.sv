// cc_file: the condition-code registers.
//
// Sparc has one set of integer condition codes. To let several
// compare-and-branch pairs run in one bundle (the multi-way branches that the
// shadow-variable transformation produces) this design extends that to NCC
// registers: a compare names the one it writes, a branch the one it tests.
//
// Compares compute their codes in the ALU stage and write here at the end of
// that cycle. Branches are resolved one stage earlier, in decode, so a
// branch in the bundle right after its compare reads the value being
// written in the same cycle: each read port forwards the write ports
// combinationally. A compare in the same bundle as the branch is not seen
// (all instructions of a bundle read state from before the bundle).
// Several writes to one register in a cycle: highest port wins.
// Reset clears all codes.
module cc_file
  import mwb_pkg::*;
#(
  parameter int unsigned NRD = 4,
  parameter int unsigned NWR = 4
) (
  input  logic                clk,
  input  logic                rst_n,
  input  cc_idx_t [NRD-1:0]   raddr,
  output icc_t    [NRD-1:0]   rdata,
  input  logic    [NWR-1:0]   we,
  input  cc_idx_t [NWR-1:0]   waddr,
  input  icc_t    [NWR-1:0]   wdata
);

  icc_t ccs [NCC];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < int'(NCC); r++) ccs[r] <= '0;
    end else begin
      for (int p = 0; p < int'(NWR); p++)
        if (we[p]) ccs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int q = 0; q < int'(NRD); q++) begin
      rdata[q] = ccs[raddr[q]];
      for (int p = 0; p < int'(NWR); p++)
        if (we[p] && waddr[p] == raddr[q]) rdata[q] = wdata[p];
    end
  end

endmodule

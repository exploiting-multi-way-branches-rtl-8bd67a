// dmem: data memory used in the memory stage (stage 4).
//
// Every execution unit may issue a load or a store in the same cycle, so the
// memory has one read/write port per unit plus one debug port for loading
// data and reading results from outside. Words are XLEN bits; addresses are
// byte addresses, the low two bits are ignored and the word index wraps at
// DMEM_WORDS. Reads are combinational (a load's data is ready at the end of
// the memory stage); writes happen at the clock edge. Several stores to one
// word in one cycle: the highest-numbered unit wins, and any unit wins over
// the debug port. The size and the multi-port organisation are this design's
// choice; the original scheme says only that loads take one memory stage.
module dmem
  import mwb_pkg::*;
#(
  parameter int unsigned NUNITS     = 4,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                  clk,
  input  word_t [NUNITS-1:0]    addr,
  input  logic  [NUNITS-1:0]    we,
  input  word_t [NUNITS-1:0]    wdata,
  output word_t [NUNITS-1:0]    rdata,
  input  word_t                 dbg_addr,
  input  logic                  dbg_we,
  input  word_t                 dbg_wdata,
  output word_t                 dbg_rdata
);

  localparam int unsigned AW = $clog2(DMEM_WORDS);

  word_t mem [DMEM_WORDS];

  always_ff @(posedge clk) begin
    if (dbg_we) mem[dbg_addr[AW+1:2]] <= dbg_wdata;
    for (int u = 0; u < int'(NUNITS); u++)
      if (we[u]) mem[addr[u][AW+1:2]] <= wdata[u];
  end

  always_comb begin
    for (int u = 0; u < int'(NUNITS); u++) rdata[u] = mem[addr[u][AW+1:2]];
    dbg_rdata = mem[dbg_addr[AW+1:2]];
  end

endmodule

// imem: instruction memory holding issue bundles.
//
// The processor is statically scheduled: the scheduler packs one
// instruction per execution unit into a bundle, and the fetch stage reads one
// whole bundle (NUNITS 32-bit instructions) per cycle. The memory is an
// array of IMEM_DEPTH bundles, read combinationally at the program counter
// and loaded through a synchronous write port (used before the program
// runs). The program counter counts bundles; addresses wrap at the depth.
// The size is this design's choice; the original scheme gives none.
module imem
  import mwb_pkg::*;
#(
  parameter int unsigned NUNITS     = 4,
  parameter int unsigned IMEM_DEPTH = 256
) (
  input  logic                      clk,
  input  pc_t                       raddr,
  output word_t [NUNITS-1:0]        rdata,
  input  logic                      we,
  input  pc_t                       waddr,
  input  word_t [NUNITS-1:0]        wdata
);

  localparam int unsigned AW = $clog2(IMEM_DEPTH);

  logic [NUNITS*XLEN-1:0] mem [IMEM_DEPTH];

  always_ff @(posedge clk) begin
    if (we) mem[waddr[AW-1:0]] <= wdata;
  end

  assign rdata = mem[raddr[AW-1:0]];

endmodule

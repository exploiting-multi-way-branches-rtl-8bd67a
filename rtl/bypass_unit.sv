// bypass_unit: operand forwarding for one source operand in the ALU stage.
//
// The processor has no interlocks: it is statically scheduled, and the
// compiler sees a one-cycle load delay. An operand is taken, newest first,
// from
//   1. the ALU result of an instruction in the bundle one ahead (now in the
//      memory stage), unless that instruction is a load: its data is not
//      there yet, which is the load delay slot; the consumer then sees the
//      older value;
//   2. the result (ALU or load) of the bundle two ahead (write-back stage);
//   3. the value read from the register file in decode.
// Within one stage the highest-numbered unit wins. Register 0 is never
// forwarded. Combinational.
module bypass_unit
  import mwb_pkg::*;
#(
  parameter int unsigned NUNITS = 4
) (
  input  reg_idx_t                src,
  input  word_t                   rf_val,
  input  logic     [NUNITS-1:0]   m_we,      // memory-stage writers (non-loads)
  input  reg_idx_t [NUNITS-1:0]   m_rd,
  input  word_t    [NUNITS-1:0]   m_val,
  input  logic     [NUNITS-1:0]   w_we,      // write-back-stage writers
  input  reg_idx_t [NUNITS-1:0]   w_rd,
  input  word_t    [NUNITS-1:0]   w_val,
  output word_t                   val,
  output logic                    from_m,    // forwarded from the memory stage
  output logic                    from_w     // forwarded from write-back
);

  always_comb begin
    logic hit_m, hit_w;
    word_t vm, vw;
    hit_m = 1'b0; hit_w = 1'b0;
    vm = '0; vw = '0;
    for (int u = 0; u < int'(NUNITS); u++) begin
      if (m_we[u] && m_rd[u] == src) begin hit_m = 1'b1; vm = m_val[u]; end
      if (w_we[u] && w_rd[u] == src) begin hit_w = 1'b1; vw = w_val[u]; end
    end
    if (src == '0) begin
      hit_m = 1'b0; hit_w = 1'b0;
    end
    from_m = hit_m;
    from_w = hit_w && !hit_m;
    val    = hit_m ? vm : (hit_w ? vw : rf_val);
  end

endmodule

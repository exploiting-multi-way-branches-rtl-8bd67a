// mwb_core: statically scheduled superscalar processor with multi-way branches.
//
// NUNITS identical execution units run one bundle of NUNITS instructions per
// cycle through a five-stage pipeline: (1) instruction fetch, (2) decode and
// register fetch, (3) ALU operation, (4) memory operation, (5) register
// write-back, as in the original scheme's processor model. Loads and branches have
// a delay of one cycle that the static scheduler sees and fills:
//   - a load's value is not visible to the bundle right after it (that
//     bundle reads the older value); from two bundles on it is forwarded;
//   - conditional branches are resolved in decode, so the one bundle fetched
//     behind a branch bundle is its delay slot.
// There are no interlocks and no stalls.
//
// Multi-way branches (the core idea): all conditional branches
// in one bundle are evaluated concurrently, one per execution unit, against
// the condition-code registers (see cc_file); the target of the one whose
// condition holds is loaded into the PC, otherwise the program falls through.
// The compiler must make the grouped conditions mutually exclusive; this is
// checked by an assertion and counted. What happens to the delay-slot bundle
// of a taken multi-way branch is chosen at run time by ds_opt, the three
// options of the original scheme (see multiway_branch_unit).
//
// A HALT instruction stops fetch in decode (the bundle fetched behind it is
// dropped); halted rises when its bundle has written back, and the core then
// stays idle until reset. imem is loaded through prog_* (normally while in
// reset); dmem is reachable through dbg_* at any time.
//
// Forwarding, the instruction encoding, the number of condition-code
// registers and the memory sizes are this design's choices; the original scheme
// gives the pipeline, the multi-way branch mechanism and the delay-slot
// options.
module mwb_core
  import mwb_pkg::*;
#(
  parameter int unsigned NUNITS     = 4,
  parameter int unsigned IMEM_DEPTH = 256,
  parameter int unsigned DMEM_WORDS = 1024
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  ds_opt_e                ds_opt,
  // program load
  input  logic                   prog_we,
  input  pc_t                    prog_addr,
  input  word_t [NUNITS-1:0]     prog_bundle,
  // data memory access from outside
  input  logic                   dbg_we,
  input  word_t                  dbg_addr,
  input  word_t                  dbg_wdata,
  output word_t                  dbg_rdata,
  // status
  output logic                   halted,
  output perf_t                  perf
);

  // ------------------------------------------------------------------
  // Pipeline registers
  // ------------------------------------------------------------------
  typedef struct packed {
    logic     reg_we;
    reg_idx_t rd;
    logic     is_load;
    logic     is_store;
    logic     is_halt;
    word_t    alu;
    word_t    st_data;
  } em_t;

  typedef struct packed {
    logic     reg_we;
    reg_idx_t rd;
    word_t    val;
    logic     is_halt;
  } mw_t;

  pc_t                    pc;
  logic                   fetching;
  logic [NUNITS-1:0]      fd_valid;
  word_t [NUNITS-1:0]     fd_insn;
  pc_t                    fd_pc;

  dec_t  [NUNITS-1:0]     de_dec;
  word_t [NUNITS-1:0]     de_rs1v;
  word_t [NUNITS-1:0]     de_rs2v;

  em_t   [NUNITS-1:0]     em;
  mw_t   [NUNITS-1:0]     mw;

  // ------------------------------------------------------------------
  // Stage 1: instruction fetch
  // ------------------------------------------------------------------
  word_t [NUNITS-1:0] if_bundle;

  imem #(.NUNITS(NUNITS), .IMEM_DEPTH(IMEM_DEPTH)) u_imem (
    .clk   (clk),
    .raddr (pc),
    .rdata (if_bundle),
    .we    (prog_we),
    .waddr (prog_addr),
    .wdata (prog_bundle)
  );

  // ------------------------------------------------------------------
  // Stage 2: decode, register fetch, multi-way branch
  // ------------------------------------------------------------------
  dec_t     [NUNITS-1:0]   id_dec;
  reg_idx_t [2*NUNITS-1:0] rf_raddr;
  word_t    [2*NUNITS-1:0] rf_rdata;
  cc_idx_t  [NUNITS-1:0]   cc_raddr;
  icc_t     [NUNITS-1:0]   cc_rdata;
  logic     [NUNITS-1:0]   br_valid;
  cond_e    [NUNITS-1:0]   br_cond;
  pc_t      [NUNITS-1:0]   br_disp;
  logic                    br_redirect;
  pc_t                     br_target;
  logic     [NUNITS-1:0]   br_taken_vec, br_sel_vec, br_ds_keep;
  logic                    br_multi_hit;
  logic                    id_halt;

  for (genvar u = 0; u < NUNITS; u++) begin : g_dec
    insn_decoder u_dec (
      .valid_in (fd_valid[u]),
      .insn     (fd_insn[u]),
      .dec      (id_dec[u])
    );
    assign rf_raddr[2*u]   = id_dec[u].rs1;
    assign rf_raddr[2*u+1] = id_dec[u].rs2;
    assign cc_raddr[u]     = id_dec[u].cc_src;
    assign br_valid[u]     = id_dec[u].is_branch;
    assign br_cond[u]      = id_dec[u].cond;
    assign br_disp[u]      = id_dec[u].disp;
  end

  always_comb begin
    id_halt = 1'b0;
    for (int u = 0; u < int'(NUNITS); u++) id_halt |= id_dec[u].is_halt;
  end

  logic     [NUNITS-1:0]   wb_we;
  reg_idx_t [NUNITS-1:0]   wb_rd;
  word_t    [NUNITS-1:0]   wb_val;

  regfile #(.NRD(2*NUNITS), .NWR(NUNITS)) u_rf (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (rf_raddr),
    .rdata (rf_rdata),
    .we    (wb_we),
    .waddr (wb_rd),
    .wdata (wb_val)
  );

  logic    [NUNITS-1:0] cc_we;
  cc_idx_t [NUNITS-1:0] cc_waddr;
  icc_t    [NUNITS-1:0] cc_wdata;

  cc_file #(.NRD(NUNITS), .NWR(NUNITS)) u_cc (
    .clk   (clk),
    .rst_n (rst_n),
    .raddr (cc_raddr),
    .rdata (cc_rdata),
    .we    (cc_we),
    .waddr (cc_waddr),
    .wdata (cc_wdata)
  );

  multiway_branch_unit #(.NUNITS(NUNITS)) u_mwb (
    .pc        (fd_pc),
    .br_valid  (br_valid),
    .br_cond   (br_cond),
    .br_disp   (br_disp),
    .br_icc    (cc_rdata),
    .ds_opt    (ds_opt),
    .redirect  (br_redirect),
    .target    (br_target),
    .taken_vec (br_taken_vec),
    .sel_vec   (br_sel_vec),
    .ds_keep   (br_ds_keep),
    .multi_hit (br_multi_hit)
  );

  // Fetch control and the IF/ID register. The delay-slot bundle is the one
  // being fetched while its branch bundle is in decode; it enters decode
  // with the slots that the delay-slot option nullifies cleared.
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc       <= '0;
      fetching <= 1'b1;
      fd_valid <= '0;
      fd_insn  <= '0;
      fd_pc    <= '0;
    end else if (!fetching || id_halt) begin
      fetching <= 1'b0;
      fd_valid <= '0;
    end else begin
      fd_insn  <= if_bundle;
      fd_pc    <= pc;
      fd_valid <= br_redirect ? br_ds_keep : '1;
      pc       <= br_redirect ? br_target : pc + pc_t'(1);
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      de_dec  <= '0;
      de_rs1v <= '0;
      de_rs2v <= '0;
    end else begin
      de_dec <= id_dec;
      for (int u = 0; u < int'(NUNITS); u++) begin
        de_rs1v[u] <= rf_rdata[2*u];
        de_rs2v[u] <= rf_rdata[2*u+1];
      end
    end
  end

  // ------------------------------------------------------------------
  // Stage 3: ALU operation
  // ------------------------------------------------------------------
  logic     [NUNITS-1:0] m_fwd_we;
  reg_idx_t [NUNITS-1:0] m_fwd_rd;
  word_t    [NUNITS-1:0] m_fwd_val;
  word_t    [NUNITS-1:0] ex_a, ex_b, ex_st, ex_res;
  icc_t     [NUNITS-1:0] ex_icc;
  logic     [NUNITS-1:0] fm1, fw1, fm2, fw2;

  for (genvar u = 0; u < NUNITS; u++) begin : g_ex
    assign m_fwd_we[u]  = em[u].reg_we && !em[u].is_load;
    assign m_fwd_rd[u]  = em[u].rd;
    assign m_fwd_val[u] = em[u].alu;

    bypass_unit #(.NUNITS(NUNITS)) u_byp1 (
      .src (de_dec[u].rs1), .rf_val (de_rs1v[u]),
      .m_we (m_fwd_we), .m_rd (m_fwd_rd), .m_val (m_fwd_val),
      .w_we (wb_we), .w_rd (wb_rd), .w_val (wb_val),
      .val (ex_a[u]), .from_m (fm1[u]), .from_w (fw1[u])
    );
    bypass_unit #(.NUNITS(NUNITS)) u_byp2 (
      .src (de_dec[u].rs2), .rf_val (de_rs2v[u]),
      .m_we (m_fwd_we), .m_rd (m_fwd_rd), .m_val (m_fwd_val),
      .w_we (wb_we), .w_rd (wb_rd), .w_val (wb_val),
      .val (ex_st[u]), .from_m (fm2[u]), .from_w (fw2[u])
    );

    assign ex_b[u] = de_dec[u].use_imm ? de_dec[u].imm : ex_st[u];

    exec_unit u_alu (
      .alu_op (de_dec[u].alu_op),
      .a      (ex_a[u]),
      .b      (ex_b[u]),
      .result (ex_res[u]),
      .icc    (ex_icc[u])
    );

    assign cc_we[u]    = de_dec[u].is_cmp;
    assign cc_waddr[u] = de_dec[u].cc_dst;
    assign cc_wdata[u] = ex_icc[u];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      em <= '0;
    end else begin
      for (int u = 0; u < int'(NUNITS); u++) begin
        em[u].reg_we   <= de_dec[u].reg_we;
        em[u].rd       <= de_dec[u].rd;
        em[u].is_load  <= de_dec[u].is_load;
        em[u].is_store <= de_dec[u].is_store;
        em[u].is_halt  <= de_dec[u].is_halt;
        em[u].alu      <= ex_res[u];
        em[u].st_data  <= ex_st[u];
      end
    end
  end

  // ------------------------------------------------------------------
  // Stage 4: memory operation
  // ------------------------------------------------------------------
  word_t [NUNITS-1:0] mem_addr, mem_wdata, mem_rdata;
  logic  [NUNITS-1:0] mem_we;

  for (genvar u = 0; u < NUNITS; u++) begin : g_mem
    assign mem_addr[u]  = em[u].alu;
    assign mem_we[u]    = em[u].is_store;
    assign mem_wdata[u] = em[u].st_data;
  end

  dmem #(.NUNITS(NUNITS), .DMEM_WORDS(DMEM_WORDS)) u_dmem (
    .clk       (clk),
    .addr      (mem_addr),
    .we        (mem_we),
    .wdata     (mem_wdata),
    .rdata     (mem_rdata),
    .dbg_addr  (dbg_addr),
    .dbg_we    (dbg_we),
    .dbg_wdata (dbg_wdata),
    .dbg_rdata (dbg_rdata)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      mw <= '0;
    end else begin
      for (int u = 0; u < int'(NUNITS); u++) begin
        mw[u].reg_we  <= em[u].reg_we;
        mw[u].rd      <= em[u].rd;
        mw[u].val     <= em[u].is_load ? mem_rdata[u] : em[u].alu;
        mw[u].is_halt <= em[u].is_halt;
      end
    end
  end

  // ------------------------------------------------------------------
  // Stage 5: register write-back
  // ------------------------------------------------------------------
  logic wb_halt;

  always_comb begin
    wb_halt = 1'b0;
    for (int u = 0; u < int'(NUNITS); u++) begin
      wb_we[u]  = mw[u].reg_we;
      wb_rd[u]  = mw[u].rd;
      wb_val[u] = mw[u].val;
      wb_halt  |= mw[u].is_halt;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) halted <= 1'b0;
    else if (wb_halt) halted <= 1'b1;
  end

  // ------------------------------------------------------------------
  // Event counters
  // ------------------------------------------------------------------
  logic [31:0] n_live, n_br, n_byp_m, n_byp_w, n_ccf;

  always_comb begin
    n_live = '0; n_br = '0; n_byp_m = '0; n_byp_w = '0; n_ccf = '0;
    for (int u = 0; u < int'(NUNITS); u++) begin
      n_live  += 32'(id_dec[u].valid);
      n_br    += 32'(id_dec[u].is_branch);
      n_byp_m += 32'(de_dec[u].valid && de_dec[u].reads_rs1 && fm1[u]);
      n_byp_w += 32'(de_dec[u].valid && de_dec[u].reads_rs1 && fw1[u]);
      n_byp_m += 32'(de_dec[u].valid && de_dec[u].reads_rs2 && fm2[u]);
      n_byp_w += 32'(de_dec[u].valid && de_dec[u].reads_rs2 && fw2[u]);
      begin
        logic hit;
        hit = 1'b0;
        for (int p = 0; p < int'(NUNITS); p++)
          hit |= cc_we[p] && cc_waddr[p] == id_dec[u].cc_src;
        n_ccf += 32'(id_dec[u].is_branch && hit);
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf <= '0;
    end else if (!halted) begin
      perf.cycles    <= perf.cycles + 1;
      perf.bundles   <= perf.bundles + 32'(n_live != 0);
      perf.insns     <= perf.insns + n_live;
      perf.branches  <= perf.branches + n_br;
      perf.multiway  <= perf.multiway + 32'(n_br >= 2);
      perf.byp_mem   <= perf.byp_mem + n_byp_m;
      perf.byp_wb    <= perf.byp_wb + n_byp_w;
      perf.cc_fwd    <= perf.cc_fwd + n_ccf;
      perf.multi_hit <= perf.multi_hit + 32'(br_multi_hit);
      if (fetching && !id_halt && br_redirect) begin
        perf.taken     <= perf.taken + 1;
        perf.nullified <= perf.nullified + 32'($countones(~br_ds_keep));
      end
    end
  end

  // The scheduler may only group branches with mutually exclusive conditions.
  a_exclusive_conditions : assert property (@(posedge clk) disable iff (!rst_n)
    !br_multi_hit)
    else $error("multi-way branch at bundle %0d: several conditions hold (%b)",
                fd_pc, br_taken_vec);

endmodule

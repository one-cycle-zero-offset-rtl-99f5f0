// zo_processor: in-order superscalar processor with one-cycle zero-offset
// loads.
//
// Pipeline IF - D - I - ALU - M - WR, W instructions wide (W = 4 by
// default; W = 2 gives the two-way model).  IF fetches four aligned
// instructions per cycle from a perfect instruction cache; D predicts
// branches with 256 2-bit counters and fills the instruction buffers; the
// I stage takes the oldest aligned group when it is empty and issues it in
// order (issue_unit); the ALU stage computes results, effective addresses
// and branch outcomes; M accesses the two-port data cache; WR writes the
// register file.  ALU latency is one cycle, load latency two.
//
// Two techniques remove stall cycles caused by zero-offset loads and
// stores, whose effective address equals their base register:
//  * ZA (za_en): an advanced zero-offset access uses the cache in the ALU
//    stage instead of M, so an advanced load has a latency of one cycle.
//    Its result rides through M unchanged and is written in WR like every
//    other instruction.
//  * ACC (acc_en): a zero-offset access that is not advanced can issue
//    before its base is ready, as long as the base exists by the end of
//    its ALU stage; the base is then bypassed from the functional units
//    straight into the memory address register (the M-stage address).
// With both inputs low the machine is the baseline processor.
//
// Bypass network: operands are read in the I stage from the register file
// (which forwards the value written in WR) or, younger first, from the
// ALU-stage and M-stage results of the same cycle.  A late (ACC) base is
// picked at the end of the ALU stage from older ALU-stage slots of its own
// group or from the M stage.
//
// Misprediction: the ALU stage compares the branch outcome with the D-stage
// prediction; on a difference it discards the younger instructions of its
// own group, the I stage, the instruction buffers and the fetched block,
// and fetch restarts at the right address the next cycle.
//
// Data cache: 8 KB, direct mapped, 32-byte blocks, write through without
// allocation, 8-block merging write buffer, 6-cycle miss latency.  In the
// two-way model its two ports serve two loads or one store per cycle; in
// the four-way model any two accesses.  Port k serves the k-th access of
// the cycle in program order: normal accesses in M first, then advanced
// ones in the ALU stage.  The document lists the cache as "Blocking
// cache, Nonblocking loads": one miss is served at a time, but a load that
// misses does not hold the pipeline.  How this is done is this design's
// choice: a single missing load is let go when no younger instruction in
// the ALU or M stage names its destination and no older one in M writes
// it; the destination is then owed (pend_v/pend_reg), the issue unit holds
// any reader or writer of it, and the fill writes it through an extra
// register-file port.  The pipeline freezes instead when the load cannot
// be let go, when a second miss arrives while one is served, when a store
// hits the block being filled, or when the write buffer is full.
//
// HALT (this design's own instruction) stops fetch and issue; `halted`
// rises when it has reached WR and no load is still owed.  Memory sits
// outside on a read channel (mem_rd_*: block request, answered by
// mem_rd_valid) and a write channel (mem_wr_*: block write with word mask,
// held until mem_wr_ack).  The program is loaded through prog_* while
// rst_n is low.
module zo_processor
  import zo_pkg::*;
  import zo_perf_pkg::*;
#(
  parameter int unsigned W            = 4,
  parameter int unsigned IB_ENTRIES   = (W <= 2) ? 2 : 4,
  parameter int unsigned NPRED        = (W <= 2) ? 1 : 2,
  parameter int unsigned BP_ENTRIES   = 256,
  parameter int unsigned IC_WORDS     = 4096,
  parameter int unsigned DC_BYTES     = 8192,
  parameter int unsigned BLOCK_BYTES  = 32,
  parameter int unsigned MISS_LATENCY = 6,
  parameter int unsigned WB_ENTRIES   = 8,
  localparam int unsigned BW          = BLOCK_BYTES / (XLEN / 8)
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              acc_en,
  input  logic              za_en,
  // program load
  input  logic              prog_we,
  input  pc_t               prog_addr,
  input  logic [31:0]       prog_data,
  // memory
  output logic              mem_rd_req,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rd_valid,
  input  word_t             mem_rd_data [BW],
  output logic              mem_wr_req,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output word_t             mem_wr_data [BW],
  output logic [BW-1:0]     mem_wr_mask,
  input  logic              mem_wr_ack,
  // status
  output logic              halted,
  output logic              wb_empty,
  output perf_t             perf
);
  localparam int unsigned NP = 2;     // data-cache ports

  // ---------------------------------------------------------------------
  // Front end
  // ---------------------------------------------------------------------
  pc_t         ic_pc;
  logic [31:0] ic_insn [FETCH_N];
  pc_t         bp_pc    [NPRED];
  logic        bp_taken [NPRED];
  logic        f_valid, ib_ready, d_redirect;
  fslot_t      f_slots  [FETCH_N];
  logic        redir_valid;
  pc_t         redir_pc;
  logic        halt_pending;
  logic        halt_seen;             // HALT has reached WR
  logic        upd_valid [2];
  pc_t         upd_pc    [2];
  logic        upd_taken [2];

  icache #(.WORDS(IC_WORDS)) u_icache (
    .clk, .fetch_pc(ic_pc), .fetch_insn(ic_insn), .prog_we, .prog_addr, .prog_data
  );

  branch_predictor #(.ENTRIES(BP_ENTRIES), .NPRED(NPRED), .NUPD(2)) u_bp (
    .clk, .rst_n, .lookup_pc(bp_pc), .lookup_taken(bp_taken),
    .upd_valid, .upd_pc, .upd_taken
  );

  fetch_unit #(.NPRED(NPRED)) u_fetch (
    .clk, .rst_n, .stop(halt_pending || halt_seen),
    .ic_pc, .ic_insn, .bp_pc, .bp_taken,
    .out_valid(f_valid), .out_slots(f_slots), .buf_ready(ib_ready),
    .redir_valid, .redir_pc, .d_redirect
  );

  logic   ib_valid, ib_pop;
  fslot_t ib_slots [W];

  instr_buffer #(.ENTRIES(IB_ENTRIES), .W(W)) u_ib (
    .clk, .rst_n, .flush(redir_valid),
    .push_valid(f_valid), .push_slots(f_slots), .push_ready(ib_ready),
    .out_valid(ib_valid), .out_slots(ib_slots), .pop(ib_pop)
  );

  // ---------------------------------------------------------------------
  // Pipeline registers
  // ---------------------------------------------------------------------
  dec_t  is_d    [W];                 // I stage
  dec_t  ex_d    [W];                 // ALU stage
  logic  ex_adv  [W];
  logic  ex_late [W];
  word_t ex_op1  [W];
  word_t ex_op2  [W];
  dec_t  ms_d    [W];                 // M stage
  logic  ms_adv  [W];
  word_t ms_res  [W];                 // ALU result, memory address or advanced load data
  word_t ms_sdata[W];
  logic  wb_v    [W];                 // WR stage
  logic  wb_wr   [W];
  reg_t  wb_dest [W];
  word_t wb_val  [W];
  logic  wb_halt;

  logic  frozen;                      // data cache stall

  // ---------------------------------------------------------------------
  // ALU stage
  // ---------------------------------------------------------------------
  word_t alu_y    [W];
  logic  alu_tk   [W];
  logic  ex_live  [W];
  word_t ex_res   [W];

  for (genvar i = 0; i < W; i++) begin : g_alu
    alu u_alu (
      .fn(ex_d[i].fn), .bcond(ex_d[i].bcond), .a(ex_op1[i]),
      .b(ex_d[i].use_imm ? ex_d[i].imm : ex_op2[i]),
      .y(alu_y[i]), .taken(alu_tk[i])
    );
  end

  logic mispredict;
  always_comb begin
    logic seen;
    pc_t  actual;
    seen        = 1'b0;
    actual      = '0;
    mispredict  = 1'b0;
    redir_pc    = '0;
    for (int i = 0; i < W; i++) begin
      ex_live[i] = ex_d[i].valid && !seen;
      if (ex_live[i] && ex_d[i].is_br) begin
        actual = !alu_tk[i] ? ex_d[i].pc + pc_t'(4) :
                 ex_d[i].is_jmp ? {ex_op1[i][PC_W-1:2], 2'b00} : ex_d[i].target;
        if (alu_tk[i] != ex_d[i].pred_taken || (ex_d[i].is_jmp && alu_tk[i])) begin
          seen        = 1'b1;
          mispredict  = 1'b1;
          redir_pc    = actual;
        end
      end
    end
  end

  assign redir_valid = mispredict && !frozen;

  // predictor updates: the (at most two) conditional branches of the group
  always_comb begin
    int unsigned k;
    k = 0;
    for (int u = 0; u < 2; u++) begin
      upd_valid[u] = 1'b0;
      upd_pc[u]    = '0;
      upd_taken[u] = 1'b0;
    end
    for (int i = 0; i < W; i++) begin
      if (ex_live[i] && ex_d[i].is_br && ex_d[i].bcond != BC_ALWAYS && k < 2) begin
        for (int u = 0; u < 2; u++) begin
          if (u == k) begin
            upd_valid[u] = !frozen;
            upd_pc[u]    = ex_d[i].pc;
            upd_taken[u] = alu_tk[i];
          end
        end
        k++;
      end
    end
  end

  // ---------------------------------------------------------------------
  // Data cache ports: normal accesses in M, then advanced ones in ALU
  // ---------------------------------------------------------------------
  logic              dc_valid [NP];
  logic              dc_we    [NP];
  logic [ADDR_W-1:0] dc_addr  [NP];
  word_t             dc_wdata [NP];
  word_t             dc_rdata [NP];
  logic              dc_miss_busy;
  localparam int unsigned PW = $clog2(2 * W + 1);   // counts accesses of a cycle
  logic [PW-1:0]     ms_port  [W];
  logic [PW-1:0]     ex_port  [W];
  logic [PW-1:0]     n_access;

  always_comb begin
    logic [PW-1:0] k;
    k = '0;
    for (int p = 0; p < NP; p++) begin
      dc_valid[p] = 1'b0;
      dc_we[p]    = 1'b0;
      dc_addr[p]  = '0;
      dc_wdata[p] = '0;
    end
    for (int i = 0; i < W; i++) begin
      ms_port[i] = '0;
      ex_port[i] = '0;
    end
    for (int i = 0; i < W; i++) begin
      if (ms_d[i].valid && !ms_adv[i] && (ms_d[i].is_ld || ms_d[i].is_st)) begin
        ms_port[i] = k;
        for (int p = 0; p < NP; p++) begin
          if (PW'(p) == k) begin
            dc_valid[p] = 1'b1;
            dc_we[p]    = ms_d[i].is_st;
            dc_addr[p]  = ms_res[i][ADDR_W-1:0];
            dc_wdata[p] = ms_sdata[i];
          end
        end
        k++;
      end
    end
    for (int i = 0; i < W; i++) begin
      if (ex_live[i] && ex_adv[i]) begin
        ex_port[i] = k;
        for (int p = 0; p < NP; p++) begin
          if (PW'(p) == k) begin
            dc_valid[p] = 1'b1;
            dc_we[p]    = ex_d[i].is_st;
            dc_addr[p]  = ex_op1[i][ADDR_W-1:0];
            dc_wdata[p] = ex_op2[i];
          end
        end
        k++;
      end
    end
    n_access = k;
  end

  // Nonblocking loads: a load that misses may be let go when no younger
  // instruction in the ALU or M stage reads or writes its destination and
  // no older one there writes it (held up by a later freeze, it could
  // otherwise overwrite the value the fill delivers).  The register is
  // then owed (pend_*) until the block arrives; from the cycle of the
  // release on, the issue unit holds back every instruction that names it.
  logic  dc_nb_ok [NP];
  logic  dc_rel, dc_fill;
  logic [0:0] dc_rel_port;
  word_t dc_fill_word;
  logic  ms_rel [W];                  // this M-stage load is let go now
  logic  ex_rel [W];                  // this advanced ALU-stage load is let go now
  logic  pend_v;
  reg_t  pend_reg;

  function automatic logic names(input dec_t x, input reg_t r);
    return x.valid && ((x.src1_used && x.src1 == r) || (x.src2_used && x.src2 == r) ||
                       (x.dest_used && x.dest == r));
  endfunction

  function automatic logic writes(input dec_t x, input reg_t r);
    return x.valid && x.dest_used && x.dest == r;
  endfunction

  always_comb begin
    logic ok;
    for (int p = 0; p < NP; p++) dc_nb_ok[p] = 1'b0;
    for (int i = 0; i < W; i++) begin
      ms_rel[i] = 1'b0;
      ex_rel[i] = 1'b0;
    end
    for (int i = 0; i < W; i++) begin
      // normal load in M
      ok = 1'b1;
      for (int j = 0; j < W; j++) begin
        if (j > i && names(ms_d[j], ms_d[i].dest)) ok = 1'b0;
        if (j < i && writes(ms_d[j], ms_d[i].dest)) ok = 1'b0;
        if (names(ex_d[j], ms_d[i].dest)) ok = 1'b0;
      end
      if (ms_d[i].valid && !ms_adv[i] && ms_d[i].is_ld) begin
        for (int p = 0; p < NP; p++) if (PW'(p) == ms_port[i]) dc_nb_ok[p] = ok;
        ms_rel[i] = dc_rel && PW'(dc_rel_port) == ms_port[i];
      end
      // advanced load in the ALU stage
      ok = 1'b1;
      for (int j = 0; j < W; j++) begin
        if (j > i && names(ex_d[j], ex_d[i].dest)) ok = 1'b0;
        if (writes(ms_d[j], ex_d[i].dest)) ok = 1'b0;
      end
      if (ex_live[i] && ex_adv[i] && ex_d[i].is_ld) begin
        for (int p = 0; p < NP; p++) if (PW'(p) == ex_port[i]) dc_nb_ok[p] = ok;
        ex_rel[i] = dc_rel && PW'(dc_rel_port) == ex_port[i];
      end
    end
  end

  // the owed register; at most one miss is outstanding
  logic rel_dest_v;
  reg_t rel_dest;
  always_comb begin
    rel_dest_v = 1'b0;
    rel_dest   = '0;
    for (int i = 0; i < W; i++) begin
      if (ms_rel[i] && ms_d[i].dest_used) begin
        rel_dest_v = 1'b1;
        rel_dest   = ms_d[i].dest;
      end
      if (ex_rel[i] && ex_d[i].dest_used) begin
        rel_dest_v = 1'b1;
        rel_dest   = ex_d[i].dest;
      end
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pend_v   <= 1'b0;
      pend_reg <= '0;
    end else if (dc_fill) begin
      pend_v   <= 1'b0;
    end else if (rel_dest_v) begin
      pend_v   <= 1'b1;
      pend_reg <= rel_dest;
    end
  end

  // the machine has stopped once HALT is written back and no load is owed
  assign halted = halt_seen && !pend_v;

  dcache #(.SIZE_BYTES(DC_BYTES), .BLOCK_BYTES(BLOCK_BYTES), .MISS_LATENCY(MISS_LATENCY),
           .WB_ENTRIES(WB_ENTRIES), .NP(NP)) u_dcache (
    .clk, .rst_n,
    .req_valid(dc_valid), .req_we(dc_we), .req_addr(dc_addr), .req_wdata(dc_wdata),
    .rsp_rdata(dc_rdata), .rsp_hit(), .commit(!frozen), .nb_ok(dc_nb_ok),
    .stall(frozen), .miss_release(dc_rel), .release_port(dc_rel_port),
    .fill_valid(dc_fill), .fill_word(dc_fill_word),
    .miss_busy(dc_miss_busy), .wb_empty,
    .mem_rd_req, .mem_rd_addr, .mem_rd_valid, .mem_rd_data,
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_mask, .mem_wr_ack
  );

  // ALU-stage results (advanced loads deliver cache data here)
  always_comb begin
    for (int i = 0; i < W; i++) begin
      if (ex_d[i].is_ld && ex_adv[i]) begin
        ex_res[i] = '0;
        for (int p = 0; p < NP; p++) if (PW'(p) == ex_port[i]) ex_res[i] = dc_rdata[p];
      end else if (ex_d[i].is_br) begin
        ex_res[i] = word_t'(pc_t'(ex_d[i].pc + pc_t'(4)));
      end else begin
        ex_res[i] = alu_y[i];
      end
    end
  end

  // M-stage results (normal loads deliver cache data here)
  word_t ms_out [W];
  always_comb begin
    for (int i = 0; i < W; i++) begin
      ms_out[i] = ms_res[i];
      if (ms_d[i].is_ld && !ms_adv[i])
        for (int p = 0; p < NP; p++) if (PW'(p) == ms_port[i]) ms_out[i] = dc_rdata[p];
    end
  end

  // Memory address register input: late (ACC) bases come from the bypass
  word_t ex_addr [W];
  always_comb begin
    for (int i = 0; i < W; i++) begin
      logic found;
      found      = 1'b0;
      ex_addr[i] = alu_y[i];
      if (ex_late[i]) begin
        for (int j = W - 1; j >= 0; j--) begin
          if (j < i && !found && ex_d[j].valid && ex_d[j].dest_used &&
              ex_d[j].dest == ex_d[i].src1) begin
            found      = 1'b1;
            ex_addr[i] = ex_res[j];
          end
        end
        for (int j = W - 1; j >= 0; j--) begin
          if (!found && ms_d[j].valid && ms_d[j].dest_used && ms_d[j].dest == ex_d[i].src1) begin
            found      = 1'b1;
            ex_addr[i] = ms_out[j];
          end
        end
      end
    end
  end

  // ---------------------------------------------------------------------
  // I stage: issue decisions, register read and bypass
  // ---------------------------------------------------------------------
  logic       iss      [W];
  logic       iss_adv  [W];
  logic       iss_late [W];
  logic       iss_zad  [W];
  logic       st_static, st_agi, st_lui, st_arith, st_miss;
  logic       ex_wr    [W];
  logic       ex_slow  [W];
  logic [2:0] ex_nld, ex_nst;
  reg_t       ex_d_dest [W];
  always_comb for (int i = 0; i < W; i++) ex_d_dest[i] = ex_d[i].dest;

  always_comb begin
    ex_nld = '0;
    ex_nst = '0;
    for (int i = 0; i < W; i++) begin
      ex_wr[i]   = ex_d[i].valid && ex_d[i].dest_used;
      ex_slow[i] = ex_d[i].is_ld && !ex_adv[i];
      if (ex_live[i] && !ex_adv[i] && ex_d[i].is_ld) ex_nld = ex_nld + 3'd1;
      if (ex_live[i] && !ex_adv[i] && ex_d[i].is_st) ex_nst = ex_nst + 3'd1;
    end
  end

  issue_unit #(.W(W)) u_issue (
    .grp(is_d), .block_all(frozen || redir_valid || halt_seen || halt_pending),
    .acc_en, .za_en,
    .ex_wr, .ex_dest(ex_d_dest), .ex_slow, .ex_nld, .ex_nst,
    .pend_valid(pend_v || rel_dest_v), .pend_reg(pend_v ? pend_reg : rel_dest),
    .issue(iss), .adv(iss_adv), .late(iss_late), .za_denied(iss_zad),
    .stall_static(st_static), .stall_agi(st_agi), .stall_lui(st_lui), .stall_arith(st_arith),
    .stall_miss(st_miss)
  );

  // Zero-offset share of the interlocks (AGI-0 and LUI-0): the oldest
  // waiting instruction is a zero-offset access waiting for its base, or
  // it waits for the data of a zero-offset load still in flight.
  logic st_agi0, st_lui0;
  function automatic logic reads(input dec_t x, input reg_t r);
    return (x.src1_used && x.src1 == r) || (x.src2_used && x.src2 == r);
  endfunction
  always_comb begin
    logic seen;
    seen    = 1'b0;
    st_agi0 = 1'b0;
    st_lui0 = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (!seen && is_d[i].valid && !iss[i]) begin
        seen    = 1'b1;
        st_agi0 = st_agi && is_d[i].zero_off && (is_d[i].is_ld || is_d[i].is_st);
        for (int j = 0; j < W; j++) begin
          if (ex_d[j].valid && ex_d[j].is_ld && !ex_adv[j] && ex_d[j].zero_off &&
              ex_d[j].dest_used && reads(is_d[i], ex_d[j].dest))
            st_lui0 = st_lui;
          if (j < i && is_d[j].valid && is_d[j].is_ld && is_d[j].zero_off &&
              is_d[j].dest_used && reads(is_d[i], is_d[j].dest))
            st_lui0 = st_lui;
        end
      end
    end
  end

  reg_t  rf_raddr [2*W];
  word_t rf_rdata [2*W];
  logic  rf_we    [W+1];              // port W: word of a released load miss
  reg_t  rf_waddr [W+1];
  word_t rf_wdata [W+1];

  always_comb begin
    for (int i = 0; i < W; i++) begin
      rf_raddr[2*i]   = is_d[i].src1;
      rf_raddr[2*i+1] = is_d[i].src2;
      rf_we[i]        = wb_v[i] && wb_wr[i] && !frozen;
      rf_waddr[i]     = wb_dest[i];
      rf_wdata[i]     = wb_val[i];
    end
    rf_we[W]    = dc_fill && pend_v;
    rf_waddr[W] = pend_reg;
    rf_wdata[W] = dc_fill_word;
  end

  regfile #(.NR(2*W), .NW(W+1)) u_rf (
    .clk, .rst_n, .raddr(rf_raddr), .rdata(rf_rdata),
    .we(rf_we), .waddr(rf_waddr), .wdata(rf_wdata)
  );

  function automatic word_t bypass(input reg_t r, input word_t rf_val,
                                   input dec_t exd [W], input word_t exr [W],
                                   input dec_t msd [W], input word_t mso [W]);
    word_t v;
    logic  f;
    v = rf_val;
    f = 1'b0;
    for (int j = W - 1; j >= 0; j--)
      if (!f && exd[j].valid && exd[j].dest_used && exd[j].dest == r) begin
        f = 1'b1; v = exr[j];
      end
    for (int j = W - 1; j >= 0; j--)
      if (!f && msd[j].valid && msd[j].dest_used && msd[j].dest == r) begin
        f = 1'b1; v = mso[j];
      end
    if (r == 5'd31) v = '0;
    return v;
  endfunction

  word_t op1 [W];
  word_t op2 [W];
  always_comb
    for (int i = 0; i < W; i++) begin
      op1[i] = bypass(is_d[i].src1, rf_rdata[2*i],   ex_d, ex_res, ms_d, ms_out);
      op2[i] = bypass(is_d[i].src2, rf_rdata[2*i+1], ex_d, ex_res, ms_d, ms_out);
    end

  // I-stage refill: when every valid instruction left it (or issues now)
  logic all_go, is_halt_iss;
  always_comb begin
    all_go      = 1'b1;
    is_halt_iss = 1'b0;
    for (int i = 0; i < W; i++) begin
      if (is_d[i].valid && !iss[i]) all_go = 1'b0;
      if (is_d[i].valid && iss[i] && is_d[i].is_halt) is_halt_iss = 1'b1;
    end
  end
  assign ib_pop = ib_valid && all_go && !frozen && !redir_valid &&
                  !halt_pending && !is_halt_iss && !halt_seen;

  // ---------------------------------------------------------------------
  // Stage registers
  // ---------------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      halt_pending <= 1'b0;
      halt_seen    <= 1'b0;
      wb_halt      <= 1'b0;
      for (int i = 0; i < W; i++) begin
        is_d[i]     <= '0;
        ex_d[i]     <= '0;
        ex_adv[i]   <= 1'b0;
        ex_late[i]  <= 1'b0;
        ex_op1[i]   <= '0;
        ex_op2[i]   <= '0;
        ms_d[i]     <= '0;
        ms_adv[i]   <= 1'b0;
        ms_res[i]   <= '0;
        ms_sdata[i] <= '0;
        wb_v[i]     <= 1'b0;
        wb_wr[i]    <= 1'b0;
        wb_dest[i]  <= '0;
        wb_val[i]   <= '0;
      end
    end else if (!frozen) begin
      // WR
      wb_halt <= 1'b0;
      for (int i = 0; i < W; i++) begin
        wb_v[i]    <= ms_d[i].valid;
        wb_wr[i]   <= ms_d[i].valid && ms_d[i].dest_used && !ms_rel[i];
        wb_dest[i] <= ms_d[i].dest;
        wb_val[i]  <= ms_out[i];
        if (ms_d[i].valid && ms_d[i].is_halt) wb_halt <= 1'b1;
      end
      if (wb_halt) halt_seen <= 1'b1;
      // M
      for (int i = 0; i < W; i++) begin
        ms_d[i]       <= ex_d[i];
        ms_d[i].valid <= ex_live[i];
        if (ex_rel[i]) ms_d[i].dest_used <= 1'b0;
        ms_adv[i]     <= ex_adv[i];
        ms_res[i]     <= (ex_d[i].is_ld || ex_d[i].is_st) && !ex_adv[i] ? ex_addr[i] : ex_res[i];
        ms_sdata[i]   <= ex_op2[i];
      end
      // ALU stage
      for (int i = 0; i < W; i++) begin
        ex_d[i]       <= is_d[i];
        ex_d[i].valid <= is_d[i].valid && iss[i];
        ex_adv[i]     <= iss_adv[i];
        ex_late[i]    <= iss_late[i];
        ex_op1[i]     <= op1[i];
        ex_op2[i]     <= op2[i];
      end
      // I stage
      if (redir_valid) begin
        for (int i = 0; i < W; i++) is_d[i].valid <= 1'b0;
        halt_pending <= 1'b0;
      end else begin
        if (is_halt_iss) halt_pending <= 1'b1;
        for (int i = 0; i < W; i++) if (iss[i]) is_d[i].valid <= 1'b0;
        if (ib_pop)
          for (int i = 0; i < W; i++)
            is_d[i] <= decode(ib_slots[i].ir, ib_slots[i].pc, ib_slots[i].valid,
                              ib_slots[i].pred_taken);
      end
    end
  end

  // ---------------------------------------------------------------------
  // Event counters
  // ---------------------------------------------------------------------
  logic miss_busy_q;
  logic is_any;                       // the I stage holds an instruction
  always_comb begin
    is_any = 1'b0;
    for (int i = 0; i < W; i++) if (is_d[i].valid) is_any = 1'b1;
  end
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      perf        <= '0;
      miss_busy_q <= 1'b0;
    end else begin
      miss_busy_q <= dc_miss_busy;
      if (dc_miss_busy && !miss_busy_q) perf.dc_misses <= perf.dc_misses + 1;
      if (!halted) begin
        perf.cycles <= perf.cycles + 1;
        if (frozen) perf.freeze_cycles <= perf.freeze_cycles + 1;
      end
      if (!frozen) begin
        begin
          int unsigned nr;
          nr = 0;
          for (int i = 0; i < W; i++) if (wb_v[i]) nr++;
          perf.retired <= perf.retired + nr;
        end
        if (!halt_seen && !halt_pending && (redir_valid || !is_any))
          perf.stall_branch <= perf.stall_branch + 1;
        if (!redir_valid) begin
          if (st_static) perf.stall_static <= perf.stall_static + 1;
          if (st_arith)  perf.stall_arith  <= perf.stall_arith + 1;
          if (st_agi)    perf.stall_agi    <= perf.stall_agi + 1;
          if (st_lui)    perf.stall_lui    <= perf.stall_lui + 1;
          if (st_agi0)   perf.stall_agi0   <= perf.stall_agi0 + 1;
          if (st_lui0)   perf.stall_lui0   <= perf.stall_lui0 + 1;
          if (st_miss)   perf.stall_miss   <= perf.stall_miss + 1;
        end
        if (redir_valid) perf.mispredicts <= perf.mispredicts + 1;
        if (d_redirect)  perf.d_redirects <= perf.d_redirects + 1;
        if (dc_rel)      perf.nb_loads    <= perf.nb_loads + 1;
        begin
          int unsigned nl, ns, na, nd;
          nl = 0; ns = 0; na = 0; nd = 0;
          for (int i = 0; i < W; i++) begin
            if (iss[i] && iss_adv[i] && is_d[i].is_ld) nl++;
            if (iss[i] && iss_adv[i] && is_d[i].is_st) ns++;
            if (iss[i] && iss_late[i]) na++;
            if (iss[i] && iss_zad[i]) nd++;
          end
          perf.za_loads  <= perf.za_loads  + nl;
          perf.za_stores <= perf.za_stores + ns;
          perf.acc_used  <= perf.acc_used  + na;
          perf.za_denied <= perf.za_denied + nd;
        end
      end
    end
  end

  // The issue unit keeps every cycle's accesses within the two ports.
  a_ports: assert property (@(posedge clk) disable iff (!rst_n) 32'(n_access) <= NP);
endmodule

// fetch_unit: IF stage and the branch prediction of the D stage.
//
// IF reads the half cache block (FETCH_N = 4 contiguous, aligned
// instructions) that holds the fetch pc from the perfect instruction cache
// and registers it; slots below the pc's position in the block are
// invalid.  In the next cycle (D stage) the registered block is scanned for
// control transfers: up to NPRED of them are predicted per cycle from the
// 2-bit counters (one in the two-way model, two in the four-way model).
// A predicted-taken branch discards the instructions after it and the
// block being fetched in the same cycle, and fetch continues at the
// branch target.  The block then enters the instruction buffers; when they
// are full it is discarded and fetched again.  A misprediction found in
// the ALU stage (redir_*) discards everything fetched and restarts at the
// correct address.  All of this follows the design.
//
// This design's own choices: an unconditional direct branch (BR) is
// always predicted taken without using a counter; an indirect jump (JMP)
// is predicted not taken and is therefore always redirected from the ALU
// stage; a block with more control transfers than NPRED is cut before the
// first one that cannot be predicted, which is fetched again in the next
// cycle.  Fetch starts at address 0 after reset and stops while `stop` is
// high.
module fetch_unit
  import zo_pkg::*;
#(
  parameter int unsigned NPRED = 2
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        stop,
  // perfect instruction cache
  output pc_t         ic_pc,
  input  logic [31:0] ic_insn [FETCH_N],
  // branch predictor
  output pc_t         bp_pc    [NPRED],
  input  logic        bp_taken [NPRED],
  // instruction buffers
  output logic        out_valid,
  output fslot_t      out_slots [FETCH_N],
  input  logic        buf_ready,
  // redirect from the ALU stage after a misprediction
  input  logic        redir_valid,
  input  pc_t         redir_pc,
  // statistics
  output logic        d_redirect
);
  localparam int unsigned FOFF = $clog2(FETCH_N) + 2;

  pc_t         pc;
  logic        f_valid;
  pc_t         f_pc;
  logic [31:0] f_insn [FETCH_N];

  assign ic_pc = pc;

  // ---- D stage: predict and cut the block --------------------------------
  dec_t  dd [FETCH_N];
  logic  cut_redirect;
  pc_t   cut_pc;
  always_comb begin
    int unsigned nbr;
    for (int i = 0; i < FETCH_N; i++)
      dd[i] = decode(f_insn[i], {f_pc[PC_W-1:FOFF], FOFF'(i * 4)},
                     f_valid && (i >= int'(f_pc[FOFF-1:2])), 1'b0);
    // pcs of the first NPRED control transfers, for the counter lookup
    nbr = 0;
    for (int k = 0; k < NPRED; k++) bp_pc[k] = '0;
    for (int i = 0; i < FETCH_N; i++) begin
      if (dd[i].valid && dd[i].is_br) begin
        for (int k = 0; k < NPRED; k++) if (nbr == k) bp_pc[k] = dd[i].pc;
        nbr++;
      end
    end
  end

  always_comb begin
    int unsigned nbr;
    logic done;
    logic t;
    // cut after a predicted-taken transfer or before an unpredicted one
    t            = 1'b0;
    nbr          = 0;
    done         = 1'b0;
    cut_redirect = 1'b0;
    cut_pc       = '0;
    for (int i = 0; i < FETCH_N; i++) begin
      out_slots[i].valid      = dd[i].valid && !done;
      out_slots[i].pc         = dd[i].pc;
      out_slots[i].ir         = f_insn[i];
      out_slots[i].pred_taken = 1'b0;
      if (dd[i].valid && !done && dd[i].is_br) begin
        if (nbr == NPRED) begin
          out_slots[i].valid = 1'b0;
          done         = 1'b1;
          cut_redirect = 1'b1;
          cut_pc       = dd[i].pc;
        end else begin
          t = 1'b0;
          for (int k = 0; k < NPRED; k++) if (nbr == k) t = bp_taken[k];
          if (dd[i].bcond == BC_ALWAYS) t = !dd[i].is_jmp;
          out_slots[i].pred_taken = t;
          nbr++;
          if (t) begin
            done         = 1'b1;
            cut_redirect = 1'b1;
            cut_pc       = dd[i].target;
          end
        end
      end
    end
  end

  assign out_valid  = f_valid && !redir_valid;
  assign d_redirect = out_valid && buf_ready && cut_redirect;

  // ---- IF stage -------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      pc      <= '0;
      f_valid <= 1'b0;
      f_pc    <= '0;
      for (int i = 0; i < FETCH_N; i++) f_insn[i] <= '0;
    end else begin
      if (redir_valid) begin
        pc      <= redir_pc;
        f_valid <= 1'b0;
      end else if (f_valid && !buf_ready) begin
        pc      <= f_pc;          // buffers full: discard and fetch again
        f_valid <= 1'b0;
      end else if (f_valid && cut_redirect) begin
        pc      <= cut_pc;        // predicted taken: discard this cycle's fetch
        f_valid <= 1'b0;
      end else if (!stop) begin
        f_valid <= 1'b1;
        f_pc    <= pc;
        for (int i = 0; i < FETCH_N; i++) f_insn[i] <= ic_insn[i];
        pc      <= {pc[PC_W-1:FOFF], FOFF'(0)} + pc_t'(FETCH_N * 4);
      end else begin
        f_valid <= 1'b0;
      end
    end
  end
endmodule

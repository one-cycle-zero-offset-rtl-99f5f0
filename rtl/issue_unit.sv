// issue_unit: I-stage conflict checks, address-calculation collapsing (ACC)
// and zero-offset load/store advancing (ZA).
//
// The I stage holds one aligned group of W instructions.  Instructions
// issue in order: the first one with a conflict and every younger one wait
// in the I stage.  This unit decides, in one combinational pass over the
// slots, which ones issue and how each memory reference executes.
//
// Timing model (an instruction issued in cycle t): its ALU stage is t+1,
// M t+2, WR t+3.  Operands are normally needed at the start of t+1.  The
// value of a producer is usable from the start of
//   t+1  if it is an ALU operation or an advanced load already in the ALU
//        stage, or anything in M or later;
//   t+2  if it is a normal load in the ALU stage, or an ALU operation or an
//        advanced load issued in the same cycle (older slot);
//   t+3  if it is a normal load issued in the same cycle.
// So ALU latency is one cycle, load latency two, and an advanced load one.
//
// Static checks: the W == 2 model issues no two control transfers together
// and no store together with another memory access in the same cycle; the
// W == 4 model no more than two of either.  With ZA these memory rules
// apply per data-cache cycle, not per group: a normal access uses the
// cache in M (t+2), an advanced one in the ALU stage (t+1), where it meets
// the normal accesses of the group issued one cycle earlier (ex_nld,
// ex_nst).
//
// ZA (za_en): a zero-offset load or store whose operands are usable at
// t+1 is advanced, accessing the cache in the ALU stage; its result is
// carried one more stage so that it still writes in WR.  It is not
// advanced, but issued as an ordinary access and without stalling, when
// the cache has no free port in t+1, when a load would overtake an older
// store, or when a store would overtake any older access.
//
// ACC (acc_en): a zero-offset load or store that is not advanced needs its
// base only at the start of M (t+2), because no address has to be
// computed.  It may therefore issue in the same cycle as an ALU producer
// or one cycle after a load producer.  `late` marks such an instruction:
// its address is taken from the bypass network into the memory address
// register at the end of its ALU stage.
//
// Nonblocking loads: while a missing load still owes its register
// (pend_valid, pend_reg), an instruction that reads or writes that
// register waits (stall_miss); this scoreboard is this design's choice.
//
// The checks, the stage timing and both techniques follow the design.  The
// exact overtaking rules, store data being needed at the start of the ALU
// stage in every case, and the stall classification are this design's
// choices.
module issue_unit
  import zo_pkg::*;
#(
  parameter int unsigned W = 4
) (
  input  dec_t  grp        [W],   // I-stage group (valid per slot)
  input  logic  block_all,        // nothing may issue this cycle
  input  logic  acc_en,
  input  logic  za_en,
  // group now in the ALU stage (issued in the previous cycle)
  input  logic  ex_wr      [W],   // valid and writes ex_dest
  input  reg_t  ex_dest    [W],
  input  logic  ex_slow    [W],   // normal (not advanced) load
  input  logic [2:0] ex_nld,      // its normal loads, which use the cache next cycle
  input  logic [2:0] ex_nst,      // its normal stores
  input  logic  pend_valid,       // a released load miss has not delivered yet
  input  reg_t  pend_reg,         // its destination register
  // decisions
  output logic  issue      [W],
  output logic  adv        [W],   // ZA: access the cache in the ALU stage
  output logic  late       [W],   // ACC: base taken at the end of the ALU stage
  output logic  za_denied  [W],   // could have been advanced but ports/order forbade
  // reason the oldest waiting instruction did not issue
  output logic  stall_static,
  output logic  stall_agi,
  output logic  stall_lui,
  output logic  stall_arith,
  output logic  stall_miss        // waited on the register of a missing load
);
  always_comb begin
    logic blocked;
    int unsigned nbr, g_ld, g_st, a_ld, a_st, n_ld, n_st;
    dec_t d;
    int unsigned av1, av2, n1;
    logic p1_ld, p2_ld, found, mem, ok_static, can_adv, ok_dyn, ports_ok, order_ok, pwait;
    blocked = 1'b0;
    nbr = 0;  g_ld = 0;  g_st = 0;          // older issued memory ops in group
    a_ld = 0; a_st = 0;                      // of them advanced
    n_ld = 0; n_st = 0;                      // of them normal
    stall_static = 1'b0;
    stall_agi    = 1'b0;
    stall_lui    = 1'b0;
    stall_arith  = 1'b0;
    stall_miss   = 1'b0;
    for (int i = 0; i < W; i++) begin
      issue[i]     = 1'b0;
      adv[i]       = 1'b0;
      late[i]      = 1'b0;
      za_denied[i] = 1'b0;
    end

    for (int i = 0; i < W; i++) begin
      d = grp[i];
      av1 = 0; av2 = 0; n1 = 1; p1_ld = 1'b0; p2_ld = 1'b0; found = 1'b0;
      mem = 1'b0; ok_static = 1'b1; ok_dyn = 1'b1; can_adv = 1'b0;
      ports_ok = 1'b0; order_ok = 1'b0; pwait = 1'b0;
      if (d.valid && !blocked) begin
        // ---- when is each operand usable? (start of t+av) ----
        for (int j = W - 1; j >= 0; j--) begin
          if (j < i && !found && issue[j] && grp[j].dest_used && d.src1_used &&
              grp[j].dest == d.src1) begin
            found = 1'b1;
            p1_ld = grp[j].is_ld;
            av1   = (grp[j].is_ld && !adv[j]) ? 3 : 2;
          end
        end
        for (int j = W - 1; j >= 0; j--) begin
          if (!found && ex_wr[j] && d.src1_used && ex_dest[j] == d.src1) begin
            found = 1'b1;
            p1_ld = ex_slow[j];
            av1   = ex_slow[j] ? 2 : 1;
          end
        end
        found = 1'b0;
        for (int j = W - 1; j >= 0; j--) begin
          if (j < i && !found && issue[j] && grp[j].dest_used && d.src2_used &&
              grp[j].dest == d.src2) begin
            found = 1'b1;
            p2_ld = grp[j].is_ld;
            av2   = (grp[j].is_ld && !adv[j]) ? 3 : 2;
          end
        end
        for (int j = W - 1; j >= 0; j--) begin
          if (!found && ex_wr[j] && d.src2_used && ex_dest[j] == d.src2) begin
            found = 1'b1;
            p2_ld = ex_slow[j];
            av2   = ex_slow[j] ? 2 : 1;
          end
        end

        mem = d.is_ld || d.is_st;
        ok_static = 1'b1;
        ok_dyn    = 1'b1;
        n1        = 1;

        // ---- control transfers ----
        if (d.is_br && ((W <= 2) ? (nbr >= 1) : (nbr >= 2))) ok_static = 1'b0;

        // ---- memory references: ZA, then ordinary access with ACC ----
        if (mem) begin
          can_adv = za_en && d.zero_off && av1 <= 1 && av2 <= 1;
          if (can_adv) begin
            ports_ok = mem_fits(W, int'(ex_nld) + a_ld + (d.is_ld ? 1 : 0),
                                   int'(ex_nst) + a_st + (d.is_st ? 1 : 0));
            order_ok = d.is_ld ? (ex_nst == 0 && g_st == 0)
                               : (ex_nld == 0 && ex_nst == 0 && g_ld == 0 && g_st == 0);
            if (ports_ok && order_ok) adv[i] = 1'b1;
            else                      za_denied[i] = 1'b1;
          end
          if (!adv[i]) begin
            if (!mem_fits(W, n_ld + (d.is_ld ? 1 : 0), n_st + (d.is_st ? 1 : 0)))
              ok_static = 1'b0;
            n1 = (acc_en && d.zero_off) ? 2 : 1;
          end
        end

        if (av1 > n1 || av2 > 1) ok_dyn = 1'b0;
        // a register still owed by a missing load may be neither read nor written
        pwait = pend_valid && ((d.src1_used && d.src1 == pend_reg) ||
                               (d.src2_used && d.src2 == pend_reg) ||
                               (d.dest_used && d.dest == pend_reg));
        if (pwait) ok_dyn = 1'b0;

        if (ok_static && ok_dyn && !block_all) begin
          issue[i] = 1'b1;
          late[i]  = mem && !adv[i] && av1 == 2 && n1 == 2;
          if (d.is_br) nbr++;
          if (d.is_ld) g_ld++;
          if (d.is_st) g_st++;
          if (adv[i]) begin
            if (d.is_ld) a_ld++;
            if (d.is_st) a_st++;
          end else begin
            if (d.is_ld) n_ld++;
            if (d.is_st) n_st++;
          end
          if (d.is_halt) blocked = 1'b1;
        end else begin
          blocked   = 1'b1;
          adv[i]    = 1'b0;
          za_denied[i] = 1'b0;
          if (!block_all) begin
            if (!ok_static)                  stall_static = 1'b1;
            else if (pwait)                  stall_miss   = 1'b1;
            else if (mem && av1 > n1)        stall_agi    = 1'b1;
            else if ((av1 > n1 && p1_ld) || (av2 > 1 && p2_ld)) stall_lui = 1'b1;
            else                             stall_arith  = 1'b1;
          end
        end
      end
    end
  end
endmodule

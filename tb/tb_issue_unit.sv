// tb_issue_unit: directed cases for the I-stage decisions, on a four-wide
// and a two-wide unit.  Each case sets an I-stage group and the state of
// the ALU stage and checks which instructions issue, which are advanced
// (ZA), which are collapsed (ACC) and the stall reason, as worked out by
// hand from the stage timing: ALU results usable one cycle after issue,
// load results two cycles after (one when advanced), zero-offset bases
// needed one cycle later under ACC.  A register owed by a missing load
// (pend_*) may be neither read nor written.
module tb_issue_unit;
  import zo_pkg::*;
  dec_t g4 [4];
  dec_t g2 [2];
  logic block_all = 0, acc_en = 0, za_en = 0;
  logic ex_wr [4], ex_slow [4];
  reg_t ex_dest [4];
  logic [2:0] ex_nld = 0, ex_nst = 0;
  logic iss4 [4], adv4 [4], late4 [4], den4 [4];
  logic iss2 [2], adv2 [2], late2 [2], den2 [2];
  logic ex_wr2 [2], ex_slow2 [2];
  reg_t ex_dest2 [2];
  logic s_st4, s_agi4, s_lui4, s_ar4, s_st2, s_agi2, s_lui2, s_ar2, s_m4, s_m2;
  logic pend_valid = 0;
  reg_t pend_reg = 0;
  int checks = 0, failures = 0;

  issue_unit #(.W(4)) dut4 (.grp(g4), .block_all, .acc_en, .za_en, .ex_wr, .ex_dest, .ex_slow,
    .ex_nld, .ex_nst, .pend_valid, .pend_reg, .issue(iss4), .adv(adv4), .late(late4), .za_denied(den4),
    .stall_static(s_st4), .stall_agi(s_agi4), .stall_lui(s_lui4), .stall_arith(s_ar4), .stall_miss(s_m4));
  issue_unit #(.W(2)) dut2 (.grp(g2), .block_all, .acc_en, .za_en, .ex_wr(ex_wr2), .ex_dest(ex_dest2),
    .ex_slow(ex_slow2), .ex_nld, .ex_nst, .pend_valid, .pend_reg, .issue(iss2), .adv(adv2), .late(late2),
    .za_denied(den2), .stall_static(s_st2), .stall_agi(s_agi2), .stall_lui(s_lui2), .stall_arith(s_ar2),
    .stall_miss(s_m2));

  always_comb for (int i = 0; i < 2; i++) begin
    ex_wr2[i] = ex_wr[i]; ex_slow2[i] = ex_slow[i]; ex_dest2[i] = ex_dest[i];
  end

  localparam logic [31:0] NONE = 32'hFFFF_FFFF;

  task automatic set4(logic [31:0] a, logic [31:0] b = NONE, logic [31:0] c = NONE, logic [31:0] d = NONE);
    logic [31:0] w [4];
    w = '{a, b, c, d};
    for (int i = 0; i < 4; i++) g4[i] = decode(w[i], pc_t'(4 * i), w[i] != NONE, 1'b0);
    for (int i = 0; i < 2; i++) g2[i] = g4[i];
  endtask

  task automatic ex_clear();
    for (int i = 0; i < 4; i++) begin ex_wr[i] = 0; ex_slow[i] = 0; ex_dest[i] = 0; end
    ex_nld = 0; ex_nst = 0;
  endtask

  function automatic logic [3:0] v4(logic x [4]);
    return {x[3], x[2], x[1], x[0]};
  endfunction
  function automatic logic [1:0] v2(logic x [2]);
    return {x[1], x[0]};
  endfunction

  task automatic expect4(string name, logic [3:0] i, logic [3:0] a, logic [3:0] l, string why = "");
    #1;
    checks++;
    if (v4(iss4) != i || v4(adv4) != a || v4(late4) != l) begin
      failures++;
      $display("FAIL %s: issue=%b adv=%b late=%b, expected %b %b %b", name, v4(iss4), v4(adv4), v4(late4), i, a, l);
    end
    if (why != "") begin
      logic ok;
      ok = (why == "static") ? s_st4 : (why == "agi") ? s_agi4 : (why == "lui") ? s_lui4 :
           (why == "miss") ? s_m4 : s_ar4;
      checks++;
      if (!ok || (s_st4 + s_agi4 + s_lui4 + s_ar4 + s_m4) != 1) begin
        failures++;
        $display("FAIL %s: stall reason static=%b agi=%b lui=%b arith=%b miss=%b, expected %s", name, s_st4, s_agi4, s_lui4, s_ar4, s_m4, why);
      end
    end
  endtask

  task automatic expect2(string name, logic [1:0] i, logic [1:0] a, logic [1:0] l);
    #1;
    checks++;
    if (v2(iss2) != i || v2(adv2) != a || v2(late2) != l) begin
      failures++;
      $display("FAIL %s (2-way): issue=%b adv=%b late=%b, expected %b %b %b", name, v2(iss2), v2(adv2), v2(late2), i, a, l);
    end
  endtask

  initial begin
    logic [31:0] ADD_R2 = enc_i(OP_ADDI, 5'd2, 5'd1, 16'd8);        // r2 = r1 + 8
    logic [31:0] LD0_R2 = enc_m(OP_LD, 5'd3, 16'd0, 5'd2);          // r3 = M[r2]
    logic [31:0] LD8_R2 = enc_m(OP_LD, 5'd3, 16'd8, 5'd2);          // r3 = M[r2+8]
    logic [31:0] USE_R3 = enc_r(FN_ADD, 5'd4, 5'd3, 5'd3);
    logic [31:0] ST0_R5 = enc_m(OP_ST, 5'd4, 16'd0, 5'd5);
    logic [31:0] LD0_R6 = enc_m(OP_LD, 5'd7, 16'd0, 5'd6);
    logic [31:0] LD8_R6 = enc_m(OP_LD, 5'd8, 16'd8, 5'd6);
    logic [31:0] LD8_R9 = enc_m(OP_LD, 5'd10, 16'd8, 5'd9);
    logic [31:0] BEQ    = enc_b(OP_BEQ, 5'd1, 21'd4);
    ex_clear();

    // ---- ALU producer and zero-offset load in one group (Fig. case a) ----
    set4(ADD_R2, LD0_R2);
    acc_en = 0; za_en = 0; expect4("AGI, baseline", 4'b0001, 4'b0000, 4'b0000, "agi");
    acc_en = 1;            expect4("AGI collapsed by ACC", 4'b0011, 4'b0000, 4'b0010);
    acc_en = 0; za_en = 1; expect4("AGI, ZA alone", 4'b0001, 4'b0000, 4'b0000, "agi");
    set4(ADD_R2, LD8_R2);
    acc_en = 1; za_en = 1; expect4("non-zero offset not collapsed", 4'b0001, 4'b0000, 4'b0000, "agi");

    // ---- load producer issued one cycle earlier (case b) ----
    set4(LD0_R2);
    ex_wr[0] = 1; ex_dest[0] = 5'd2; ex_slow[0] = 1; ex_nld = 1;
    acc_en = 0; za_en = 0; expect4("load-to-base, baseline", 4'b0000, 4'b0000, 4'b0000, "agi");
    acc_en = 1;            expect4("load-to-base, ACC", 4'b0001, 4'b0000, 4'b0001);
    acc_en = 0; za_en = 1; expect4("load-to-base, ZA alone", 4'b0000, 4'b0000, 4'b0000, "agi");

    // ---- base ready: ZA advances ----
    ex_clear();
    ex_wr[0] = 1; ex_dest[0] = 5'd2;                 // ALU result, usable next cycle
    set4(LD0_R2, USE_R3);
    acc_en = 0; za_en = 0; expect4("load-use, baseline", 4'b0001, 4'b0000, 4'b0000, "lui");
    za_en = 1;             expect4("advanced load, use in same group", 4'b0001, 4'b0001, 4'b0000, "lui");
    ex_clear();
    ex_wr[0] = 1; ex_dest[0] = 5'd3; ex_slow[0] = 0; // advanced load now in the ALU stage
    set4(USE_R3);
    expect4("use one cycle after an advanced load", 4'b0001, 4'b0000, 4'b0000);
    ex_slow[0] = 1; ex_nld = 1;                      // ordinary load: one more cycle
    za_en = 0;
    expect4("use one cycle after an ordinary load", 4'b0000, 4'b0000, 4'b0000, "lui");

    // ---- ZA refused: ports, ordering ----
    ex_clear();
    za_en = 1;
    ex_nld = 2;
    set4(LD0_R2);          expect4("no free port for the advanced access", 4'b0001, 4'b0000, 4'b0000);
    checks++; if (!den4[0]) begin failures++; $display("FAIL refused advance not flagged"); end
    ex_nld = 0; ex_nst = 1;
    set4(LD0_R2);          expect4("load may not overtake a store", 4'b0001, 4'b0000, 4'b0000);
    ex_nst = 0;
    set4(ST0_R5, LD0_R6);  expect4("advanced store, younger load stays behind", 4'b0011, 4'b0001, 4'b0000);
    set4(LD8_R6, ST0_R5);  expect4("store may not overtake an older load", 4'b0011, 4'b0000, 4'b0000);

    // ---- issue rules ----
    za_en = 0;
    set4(LD8_R2, LD8_R6, LD8_R9);
    expect4("three memory instructions", 4'b0011, 4'b0000, 4'b0000, "static");
    za_en = 1;
    set4(LD8_R2, LD8_R6, LD0_R6);                    // third one advanced into a free cycle
    expect4("ZA lifts the port rule", 4'b0111, 4'b0100, 4'b0000);
    set4(BEQ, BEQ, BEQ);
    expect4("three branches", 4'b0011, 4'b0000, 4'b0000, "static");
    set4(enc_r(FN_ADD, 5'd1, 5'd2, 5'd2), enc_r(FN_ADD, 5'd4, 5'd1, 5'd1));
    expect4("ALU dependence in one group", 4'b0001, 4'b0000, 4'b0000, "arith");
    set4(INSN_HALT, ADD_R2);
    expect4("nothing after HALT", 4'b0001, 4'b0000, 4'b0000);
    block_all = 1;
    set4(ADD_R2);          expect4("blocked cycle", 4'b0000, 4'b0000, 4'b0000);
    block_all = 0;

    // ---- register owed by a missing load ----
    ex_clear();
    za_en = 0; acc_en = 0;
    pend_valid = 1; pend_reg = 5'd3;
    set4(ADD_R2, USE_R3);  expect4("reader of a missing load's register", 4'b0001, 4'b0000, 4'b0000, "miss");
    set4(ADD_R2, LD8_R2);  expect4("writer of a missing load's register", 4'b0001, 4'b0000, 4'b0000, "miss");
    set4(ADD_R2, LD8_R6, LD8_R2);
    expect4("writer of a missing load's register (independent)", 4'b0011, 4'b0000, 4'b0000, "miss");
    pend_reg = 5'd9;
    set4(ADD_R2, USE_R3);  expect4("other registers are free", 4'b0011, 4'b0000, 4'b0000);
    pend_valid = 0;

    // ---- two-way rules ----
    za_en = 0;
    set4(ST0_R5, LD8_R6);  expect2("store with a load", 2'b01, 2'b00, 2'b00);
    za_en = 1;
    set4(ST0_R5, LD8_R6);  expect2("advanced store with a load", 2'b11, 2'b01, 2'b00);
    set4(BEQ, BEQ);        expect2("two branches", 2'b01, 2'b00, 2'b00);
    set4(LD8_R2, LD8_R6);  expect2("two loads", 2'b11, 2'b00, 2'b00);
    ex_nst = 1;
    set4(LD0_R2);          expect2("advance blocked by a store in the ALU stage", 2'b01, 2'b00, 2'b00);

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #10000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

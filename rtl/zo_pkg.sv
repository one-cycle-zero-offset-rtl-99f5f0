// zo_pkg: types, constants and the instruction decoder shared by the
// zero-offset-load processor.
//
// The processor runs a small load/store instruction set with a single
// addressing mode, base register plus displacement, as the design requires.
// The encoding below is this design's own (the architecture it is modelled
// on is a 64-bit Alpha-like machine); it keeps the Alpha convention that
// register 31 reads as zero and that a memory instruction names its data
// register in field ra and its base register in field rb.
//
//   [31:26] opcode  [25:21] ra  [20:16] rb  [15:0] displacement / immediate
//   register-register ALU:  [15:11] rc (destination)  [3:0] function
//   conditional branch / BR: [20:0] word displacement relative to pc+4
//
// A memory instruction whose displacement is zero is a "zero-offset"
// reference: its effective address equals its base register, which is what
// the address-calculation collapsing (ACC) and zero-offset advancing (ZA)
// techniques exploit.
package zo_pkg;

  localparam int unsigned XLEN   = 64;   // register and memory word width
  localparam int unsigned PC_W   = 32;   // instruction address width
  localparam int unsigned ADDR_W = 32;   // data byte address width
  localparam int unsigned NREGS  = 32;
  localparam int unsigned FETCH_N = 4;   // instructions per half cache block

  typedef logic [XLEN-1:0]   word_t;
  typedef logic [PC_W-1:0]   pc_t;
  typedef logic [4:0]        reg_t;

  typedef enum logic [5:0] {
    OP_NOP  = 6'd0,
    OP_ALU  = 6'd1,   // rc = ra fn rb
    OP_ADDI = 6'd2,   // rb = ra + sext(imm)
    OP_ANDI = 6'd3,
    OP_ORI  = 6'd4,
    OP_XORI = 6'd5,
    OP_LDAH = 6'd6,   // rb = ra + (sext(imm) << 16)
    OP_SLLI = 6'd7,
    OP_SRLI = 6'd8,
    OP_LD   = 6'd9,   // ra = mem[rb + disp]
    OP_ST   = 6'd10,  // mem[rb + disp] = ra
    OP_BEQ  = 6'd11,  // branch on ra
    OP_BNE  = 6'd12,
    OP_BLT  = 6'd13,
    OP_BGE  = 6'd14,
    OP_BR   = 6'd15,  // ra = pc+4, pc = pc+4+disp*4
    OP_JMP  = 6'd16,  // ra = pc+4, pc = rb
    OP_HALT = 6'd63
  } opcode_e;

  typedef enum logic [3:0] {
    FN_ADD = 4'd0, FN_SUB = 4'd1, FN_AND = 4'd2, FN_OR = 4'd3, FN_XOR = 4'd4,
    FN_SLL = 4'd5, FN_SRL = 4'd6, FN_SRA = 4'd7, FN_CMPEQ = 4'd8,
    FN_CMPLT = 4'd9, FN_CMPULT = 4'd10, FN_S4ADD = 4'd11, FN_S8ADD = 4'd12,
    FN_PASSB = 4'd13
  } alu_fn_e;

  typedef enum logic [2:0] {
    BC_NONE = 3'd0, BC_EQ = 3'd1, BC_NE = 3'd2, BC_LT = 3'd3, BC_GE = 3'd4,
    BC_ALWAYS = 3'd5
  } bcond_e;

  // One fetched instruction as it travels from fetch to the I stage.
  typedef struct packed {
    logic  valid;
    pc_t   pc;
    logic [31:0] ir;
    logic  pred_taken;   // D-stage prediction (fetch was redirected)
  } fslot_t;

  // Decoded instruction.
  typedef struct packed {
    logic    valid;
    pc_t     pc;
    logic    pred_taken;
    alu_fn_e fn;
    bcond_e  bcond;
    logic    use_imm;    // second ALU operand is imm
    word_t   imm;
    logic    is_ld;
    logic    is_st;
    logic    is_br;      // any control transfer (BEQ..BGE, BR, JMP)
    logic    is_jmp;     // indirect jump
    logic    is_halt;
    logic    zero_off;   // memory reference with displacement 0
    reg_t    src1;       // ALU operand a, memory base, branch test, jump target
    logic    src1_used;
    reg_t    src2;       // ALU operand b, store data
    logic    src2_used;
    reg_t    dest;
    logic    dest_used;
    pc_t     target;     // direct branch target
  } dec_t;

  function automatic dec_t decode(input logic [31:0] ir, input pc_t pc,
                                  input logic valid, input logic pred_taken);
    dec_t d;
    opcode_e op;
    reg_t ra, rb, rc;
    word_t simm;
    pc_t bdisp;
    op   = opcode_e'(ir[31:26]);
    ra   = ir[25:21];
    rb   = ir[20:16];
    rc   = ir[15:11];
    simm = word_t'(signed'(ir[15:0]));
    bdisp = pc_t'(signed'(ir[20:0])) << 2;
    d = '0;
    d.valid      = valid;
    d.pc         = pc;
    d.pred_taken = pred_taken;
    d.fn         = FN_ADD;
    d.bcond      = BC_NONE;
    d.imm        = simm;
    d.target     = pc + pc_t'(4) + bdisp;
    unique case (op)
      OP_ALU: begin
        d.fn = alu_fn_e'(ir[3:0]);
        d.src1 = ra; d.src2 = rb; d.dest = rc;
        d.src1_used = 1'b1; d.src2_used = 1'b1; d.dest_used = 1'b1;
      end
      OP_ADDI, OP_ANDI, OP_ORI, OP_XORI, OP_LDAH, OP_SLLI, OP_SRLI: begin
        d.fn = (op == OP_ANDI) ? FN_AND : (op == OP_ORI) ? FN_OR :
               (op == OP_XORI) ? FN_XOR : (op == OP_SLLI) ? FN_SLL :
               (op == OP_SRLI) ? FN_SRL : FN_ADD;
        if (op == OP_LDAH) d.imm = simm << 16;
        d.use_imm = 1'b1;
        d.src1 = ra; d.dest = rb;
        d.src1_used = 1'b1; d.dest_used = 1'b1;
      end
      OP_LD: begin
        d.is_ld = 1'b1; d.use_imm = 1'b1; d.zero_off = (ir[15:0] == 16'd0);
        d.src1 = rb; d.src1_used = 1'b1;
        d.dest = ra; d.dest_used = 1'b1;
      end
      OP_ST: begin
        d.is_st = 1'b1; d.use_imm = 1'b1; d.zero_off = (ir[15:0] == 16'd0);
        d.src1 = rb; d.src1_used = 1'b1;
        d.src2 = ra; d.src2_used = 1'b1;
      end
      OP_BEQ, OP_BNE, OP_BLT, OP_BGE: begin
        d.is_br = 1'b1;
        d.bcond = (op == OP_BEQ) ? BC_EQ : (op == OP_BNE) ? BC_NE :
                  (op == OP_BLT) ? BC_LT : BC_GE;
        d.src1 = ra; d.src1_used = 1'b1;
      end
      OP_BR: begin
        d.is_br = 1'b1; d.bcond = BC_ALWAYS;
        d.dest = ra; d.dest_used = 1'b1;
      end
      OP_JMP: begin
        d.is_br = 1'b1; d.is_jmp = 1'b1; d.bcond = BC_ALWAYS;
        d.src1 = rb; d.src1_used = 1'b1;
        d.dest = ra; d.dest_used = 1'b1;
      end
      OP_HALT: d.is_halt = 1'b1;
      default: ;  // OP_NOP and unused opcodes do nothing
    endcase
    // Register 31 always reads as zero and discards writes.
    if (d.src1 == 5'd31) d.src1_used = 1'b0;
    if (d.src2 == 5'd31) d.src2_used = 1'b0;
    if (d.dest == 5'd31) d.dest_used = 1'b0;
    return d;
  endfunction

  // Does a set of data-cache accesses made in one cycle fit the memory
  // system?  Two-way model: two read ports and one write port, a store has
  // the cache to itself.  Four-way model: two read/write ports.
  function automatic logic mem_fits(input int unsigned width,
                                    input int unsigned nld, input int unsigned nst);
    if (width <= 2) return (nst == 0 && nld <= 2) || (nst == 1 && nld == 0);
    else            return (nld + nst) <= 2;
  endfunction

  // Instruction encoders, used by testbenches to build programs.
  function automatic logic [31:0] enc_r(alu_fn_e fn, reg_t rc, reg_t ra, reg_t rb);
    return {OP_ALU, ra, rb, rc, 7'd0, fn};
  endfunction
  function automatic logic [31:0] enc_i(opcode_e op, reg_t rd, reg_t ra, logic [15:0] imm);
    return {op, ra, rd, imm};
  endfunction
  function automatic logic [31:0] enc_m(opcode_e op, reg_t ra, logic [15:0] disp, reg_t rb);
    return {op, ra, rb, disp};
  endfunction
  function automatic logic [31:0] enc_b(opcode_e op, reg_t ra, logic [20:0] disp);
    return {op, ra, disp};
  endfunction
  function automatic logic [31:0] enc_j(reg_t ra, reg_t rb);
    return {OP_JMP, ra, rb, 16'd0};
  endfunction
  localparam logic [31:0] INSN_NOP  = 32'h0000_0000;
  localparam logic [31:0] INSN_HALT = {OP_HALT, 26'd0};

endpackage

// zo_tb_pkg: test programs and an instruction-level reference model for
// the processor testbenches.
//
// The reference model executes a program one instruction at a time with
// the architectural meaning of each instruction (no pipeline), so its
// final registers and memory are the values the processor must reach in
// any configuration.  The program builders emit small kernels of the kind
// the design targets: list traversals through records and through index
// vectors, array copies with zero-offset stores, and a mix of the other
// instructions.
package zo_tb_pkg;
  import zo_pkg::*;

  localparam int unsigned PROG_WORDS = 1024;
  localparam int unsigned MEM_WORDS  = 8192;      // 64 KB of data memory

  logic [31:0] prog [PROG_WORDS];
  int unsigned plen;
  word_t       init_mem [MEM_WORDS];
  word_t       ref_mem  [MEM_WORDS];
  word_t       ref_regs [32];
  int unsigned ref_steps;

  function automatic void clear();
    for (int i = 0; i < PROG_WORDS; i++) prog[i] = 32'd0;
    for (int i = 0; i < MEM_WORDS; i++) init_mem[i] = 64'(i) * 64'h9E37_79B9 ^ 64'h5555;
    plen = 0;
  endfunction

  function automatic void emit(logic [31:0] w);
    prog[plen] = w;
    plen++;
  endfunction

  // word displacement of a branch at the current position to instruction `to`
  function automatic logic [20:0] bdisp(int unsigned to);
    return 21'(int'(to) - int'(plen) - 1);
  endfunction

  function automatic void li(reg_t r, int unsigned v);
    emit(enc_i(OP_ADDI, r, 5'd31, 16'(v)));
  endfunction

  // ---------------------------------------------------------------------
  // Reference model
  // ---------------------------------------------------------------------
  function automatic void run_ref();
    int unsigned pc;
    for (int i = 0; i < MEM_WORDS; i++) ref_mem[i] = init_mem[i];
    for (int r = 0; r < 32; r++) ref_regs[r] = '0;
    pc = 0;
    ref_steps = 0;
    while (ref_steps < 200000) begin
      logic [31:0] ir;
      logic [5:0] op;
      logic [4:0] ra, rb, rc;
      word_t a, b, simm, res, ea;
      logic wr;
      logic [4:0] rd;
      int unsigned npc;
      ir = prog[pc >> 2];
      op = ir[31:26]; ra = ir[25:21]; rb = ir[20:16]; rc = ir[15:11];
      a = ref_regs[ra]; b = ref_regs[rb];
      simm = {{48{ir[15]}}, ir[15:0]};
      npc = pc + 4;
      wr = 1'b0; rd = 5'd31; res = '0;
      ref_steps++;
      if (op == 6'd63) break;
      case (op)
        6'd1: begin
          wr = 1'b1; rd = rc;
          case (ir[3:0])
            4'd0: res = a + b;
            4'd1: res = a - b;
            4'd2: res = a & b;
            4'd3: res = a | b;
            4'd4: res = a ^ b;
            4'd5: res = a << b[5:0];
            4'd6: res = a >> b[5:0];
            4'd7: res = $signed(a) >>> b[5:0];
            4'd8: res = (a == b) ? 1 : 0;
            4'd9: res = ($signed(a) < $signed(b)) ? 1 : 0;
            4'd10: res = (a < b) ? 1 : 0;
            4'd11: res = a * 4 + b;
            4'd12: res = a * 8 + b;
            4'd13: res = b;
            default: res = '0;
          endcase
        end
        6'd2: begin wr = 1'b1; rd = rb; res = a + simm; end
        6'd3: begin wr = 1'b1; rd = rb; res = a & simm; end
        6'd4: begin wr = 1'b1; rd = rb; res = a | simm; end
        6'd5: begin wr = 1'b1; rd = rb; res = a ^ simm; end
        6'd6: begin wr = 1'b1; rd = rb; res = a + simm * 65536; end
        6'd7: begin wr = 1'b1; rd = rb; res = a << simm[5:0]; end
        6'd8: begin wr = 1'b1; rd = rb; res = a >> simm[5:0]; end
        6'd9: begin
          ea = b + simm; wr = 1'b1; rd = ra;
          res = ref_mem[(ea[31:0] >> 3) % MEM_WORDS];
        end
        6'd10: begin
          ea = b + simm;
          ref_mem[(ea[31:0] >> 3) % MEM_WORDS] = a;
        end
        6'd11: if (a == 0) npc = pc + 4 + 4 * int'(signed'(ir[20:0]));
        6'd12: if (a != 0) npc = pc + 4 + 4 * int'(signed'(ir[20:0]));
        6'd13: if ($signed(a) < 0) npc = pc + 4 + 4 * int'(signed'(ir[20:0]));
        6'd14: if ($signed(a) >= 0) npc = pc + 4 + 4 * int'(signed'(ir[20:0]));
        6'd15: begin wr = 1'b1; rd = ra; res = 64'(pc + 4); npc = pc + 4 + 4 * int'(signed'(ir[20:0])); end
        6'd16: begin wr = 1'b1; rd = ra; res = 64'(pc + 4); npc = int'(b[31:0]) & ~3; end
        default: ;
      endcase
      if (wr && rd != 5'd31) ref_regs[rd] = res;
      pc = npc;
    end
  endfunction

  // ---------------------------------------------------------------------
  // Programs.  Data lives at byte addresses 0x2000-0xFFF8.
  // ---------------------------------------------------------------------
  localparam int unsigned RES = 16'h7F00;      // result area

  // Dependent chain of n zero-offset loads: r1 = M[r1] n times.
  function automatic void prog_chain(int unsigned n);
    int unsigned a0;
    clear();
    a0 = 16'h2000;
    for (int unsigned k = 0; k < n; k++)
      init_mem[(a0 + 8 * k) >> 3] = 64'(a0 + 8 * (k + 1));
    li(5'd1, a0);
    li(5'd22, a0 - 8);
    li(5'd6, RES);
    // let the chain's blocks reach the cache first, with independent loads
    for (int unsigned k = 0; k < n; k += 4) emit(enc_m(OP_LD, 5'd20, 16'(8 * k + 8), 5'd22));
    emit(enc_r(FN_ADD, 5'd21, 5'd20, 5'd20));        // waits for the warm-up loads
    emit(enc_i(OP_ADDI, 5'd0, 5'd21, 16'd0));
    for (int unsigned k = 0; k < n; k++) emit(enc_m(OP_LD, 5'd1, 16'd0, 5'd1));
    emit(enc_m(OP_ST, 5'd1, 16'd0, 5'd6));
    emit(INSN_HALT);
  endfunction

  // ALU producer directly followed by the zero-offset load that uses it.
  function automatic void prog_agi(int unsigned n);
    clear();
    li(5'd1, 16'h3000);
    li(5'd6, RES);
    for (int unsigned k = 0; k < 8; k++) emit(enc_m(OP_LD, 5'd20, 16'(32 * k), 5'd1));
    emit(enc_r(FN_ADD, 5'd21, 5'd20, 5'd20));
    emit(enc_i(OP_ADDI, 5'd0, 5'd21, 16'd0));
    for (int unsigned k = 0; k < n; k++) begin
      emit(enc_i(OP_ADDI, 5'd2, 5'd1, 16'(8 * k)));  // s4add-like address
      emit(enc_m(OP_LD, 5'(8 + k % 8), 16'd0, 5'd2));
    end
    for (int unsigned k = 0; k < 8; k++) emit(enc_m(OP_ST, 5'(8 + k), 16'(8 * k), 5'd6));
    emit(INSN_HALT);
  endfunction

  // Linked list of records: next pointer at offset 0, data at offset 8.
  function automatic void prog_list(int unsigned n);
    int unsigned addr, nxt;
    clear();
    for (int unsigned k = 0; k < n; k++) begin
      addr = 16'h2000 + ((k * 7) % n) * 48;
      nxt  = (k + 1 < n) ? 16'h2000 + (((k + 1) * 7) % n) * 48 : 0;
      init_mem[addr >> 3]       = 64'(nxt);
      init_mem[(addr >> 3) + 1] = 64'(k * 3 + 1);
    end
    li(5'd1, 16'h2000);
    li(5'd2, 0);
    li(5'd5, 0);
    li(5'd6, RES);
    // loop:
    emit(enc_m(OP_LD, 5'd3, 16'd8, 5'd1));           // data = node->data
    emit(enc_m(OP_LD, 5'd1, 16'd0, 5'd1));           // node = node->next (zero offset)
    emit(enc_r(FN_ADD, 5'd2, 5'd2, 5'd3));
    emit(enc_i(OP_ADDI, 5'd5, 5'd5, 16'd1));
    emit(enc_b(OP_BNE, 5'd1, bdisp(4)));
    emit(enc_m(OP_ST, 5'd2, 16'd0, 5'd6));
    emit(enc_m(OP_ST, 5'd5, 16'd8, 5'd6));
    emit(INSN_HALT);
  endfunction

  // List held in two vectors: ptr = links[ptr]; sum += data[ptr].
  function automatic void prog_vec(int unsigned n, int unsigned iters);
    clear();
    for (int unsigned k = 0; k < n; k++) begin
      init_mem[(16'h3000 >> 3) + k] = 64'((k * 5 + 3) % n);
      init_mem[(16'h4000 >> 3) + k] = 64'(k * k + 11);
    end
    li(5'd10, 16'h3000);
    li(5'd11, 16'h4000);
    li(5'd1, 0);
    li(5'd2, 0);
    li(5'd5, iters);
    li(5'd6, RES);
    // loop: (index 6)
    emit(enc_r(FN_S8ADD, 5'd4, 5'd1, 5'd10));
    emit(enc_m(OP_LD, 5'd1, 16'd0, 5'd4));
    emit(enc_r(FN_S8ADD, 5'd7, 5'd1, 5'd11));
    emit(enc_m(OP_LD, 5'd3, 16'd0, 5'd7));
    emit(enc_r(FN_ADD, 5'd2, 5'd2, 5'd3));
    emit(enc_i(OP_ADDI, 5'd5, 5'd5, 16'hFFFF));
    emit(enc_b(OP_BNE, 5'd5, bdisp(6)));
    emit(enc_m(OP_ST, 5'd2, 16'd0, 5'd6));
    emit(enc_m(OP_ST, 5'd1, 16'd8, 5'd6));
    emit(INSN_HALT);
  endfunction

  // Copy with zero-offset stores, a read-back of each store, and two
  // stores per iteration, then a burst of stores to 24 blocks, which
  // fills the write buffer.
  function automatic void prog_store(int unsigned n);
    clear();
    li(5'd6, 16'h5000);
    li(5'd7, 16'h2000);
    li(5'd5, n);
    li(5'd2, 0);
    li(5'd9, RES);
    // loop: (index 5)
    emit(enc_m(OP_LD, 5'd3, 16'd0, 5'd7));
    emit(enc_i(OP_ADDI, 5'd3, 5'd3, 16'd1));
    emit(enc_m(OP_ST, 5'd3, 16'd0, 5'd6));
    emit(enc_m(OP_LD, 5'd8, 16'd0, 5'd6));           // must see the store
    emit(enc_m(OP_ST, 5'd8, 16'd8, 5'd6));
    emit(enc_r(FN_ADD, 5'd2, 5'd2, 5'd8));
    emit(enc_i(OP_ADDI, 5'd6, 5'd6, 16'd40));
    emit(enc_i(OP_ADDI, 5'd7, 5'd7, 16'd8));
    emit(enc_i(OP_ADDI, 5'd5, 5'd5, 16'hFFFF));
    emit(enc_b(OP_BNE, 5'd5, bdisp(5)));
    // a burst of stores to 24 different blocks
    li(5'd6, 16'h6000);
    for (int unsigned k = 0; k < 24; k++) emit(enc_m(OP_ST, 5'd2, 16'(32 * k), 5'd6));
    emit(enc_m(OP_ST, 5'd2, 16'd0, 5'd9));
    emit(INSN_HALT);
  endfunction

  // Sum of n words that each sit in their own cache block, with
  // independent work between each load and its use, so that a missing
  // load can complete while the pipeline goes on.
  function automatic void prog_nb(int unsigned n);
    clear();
    for (int unsigned k = 0; k < n; k++) init_mem[(16'h3000 >> 3) + 4 * k] = 64'(k * 9 + 2);
    li(5'd1, 16'h3000);
    li(5'd5, n);
    li(5'd2, 0);
    li(5'd6, RES);
    // loop: (index 4, aligned)
    emit(enc_m(OP_LD, 5'd3, 16'd0, 5'd1));
    emit(enc_i(OP_ADDI, 5'd1, 5'd1, 16'd32));
    emit(enc_i(OP_ADDI, 5'd5, 5'd5, 16'hFFFF));
    emit(enc_i(OP_ADDI, 5'd7, 5'd7, 16'd3));
    emit(enc_i(OP_XORI, 5'd8, 5'd7, 16'd5));
    emit(enc_i(OP_ORI, 5'd9, 5'd8, 16'd1));
    emit(enc_r(FN_ADD, 5'd10, 5'd10, 5'd9));
    emit(enc_i(OP_ADDI, 5'd11, 5'd11, 16'd2));
    emit(enc_r(FN_ADD, 5'd2, 5'd2, 5'd3));
    emit(enc_b(OP_BNE, 5'd5, bdisp(4)));
    emit(enc_m(OP_ST, 5'd2, 16'd0, 5'd6));
    emit(enc_m(OP_ST, 5'd10, 16'd8, 5'd6));
    emit(INSN_HALT);
  endfunction

  // Other instructions: subroutine call and return through BR/JMP,
  // shifts, compares, signed branches, register 31.
  function automatic void prog_misc();
    clear();
    li(5'd6, RES);
    li(5'd1, 16'd100);
    li(5'd2, 16'hFFF0);                              // -16
    li(5'd3, 0);
    // loop: (index 4)
    emit(enc_b(OP_BR, 5'd26, bdisp(24)));            // call sub
    emit(enc_r(FN_ADD, 5'd3, 5'd3, 5'd4));
    emit(enc_i(OP_ADDI, 5'd1, 5'd1, 16'hFFF9));      // r1 -= 7
    emit(enc_b(OP_BGE, 5'd1, bdisp(4)));
    emit(enc_r(FN_SRA, 5'd7, 5'd2, 5'd31));
    emit(enc_r(FN_CMPLT, 5'd8, 5'd2, 5'd1));
    emit(enc_r(FN_CMPULT, 5'd9, 5'd2, 5'd1));
    emit(enc_r(FN_SUB, 5'd10, 5'd31, 5'd3));
    emit(enc_i(OP_SLLI, 5'd11, 5'd3, 16'd5));
    emit(enc_i(OP_SRLI, 5'd12, 5'd11, 16'd2));
    emit(enc_i(OP_LDAH, 5'd13, 5'd31, 16'd3));
    emit(enc_i(OP_XORI, 5'd14, 5'd13, 16'h00FF));
    emit(enc_i(OP_ORI, 5'd15, 5'd14, 16'h0F00));
    emit(enc_i(OP_ANDI, 5'd16, 5'd15, 16'h0FF0));
    emit(enc_r(FN_S4ADD, 5'd17, 5'd16, 5'd1));
    emit(enc_r(FN_CMPEQ, 5'd18, 5'd17, 5'd17));
    emit(enc_m(OP_ST, 5'd3, 16'd0, 5'd6));
    emit(enc_m(OP_ST, 5'd31, 16'd8, 5'd6));
    emit(enc_i(OP_ADDI, 5'd31, 5'd1, 16'd5));          // discarded
    emit(INSN_HALT);
    // sub: (index 24)  r4 = r1 * 3 + (r1 < 50); return
    emit(enc_r(FN_ADD, 5'd4, 5'd1, 5'd1));
    emit(enc_r(FN_ADD, 5'd4, 5'd4, 5'd1));
    emit(enc_i(OP_ADDI, 5'd19, 5'd31, 16'd50));
    emit(enc_r(FN_CMPLT, 5'd19, 5'd1, 5'd19));
    emit(enc_r(FN_OR, 5'd4, 5'd4, 5'd19));
    emit(enc_j(5'd31, 5'd26));
  endfunction
endpackage

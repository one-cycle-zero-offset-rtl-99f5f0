// tb_fetch_unit: fetch and D-stage prediction with the perfect instruction
// cache and a scripted predictor (taken only for the branch at 0x50).
// Checks the sequence of blocks handed to the buffers: aligned blocks of
// four, a cut after a predicted-taken branch with fetch continuing
// mid-block at the target, a cut before a third branch (two predictions
// per cycle), the one-cycle bubble of a D-stage redirect, a block
// discarded and fetched again while the buffers are full, and a restart
// after a redirect from the ALU stage.  A second, random phase loads a
// random program of branches, jumps and plain instructions, drives a
// pseudo-random predictor and random buffer back-pressure, and compares
// every block taken by the buffers with a model that walks the program by
// the same rules (cut after a predicted-taken transfer, cut before a third
// transfer, BR taken, JMP not taken).
module tb_fetch_unit;
  import zo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic stop = 0;
  pc_t  ic_pc;
  logic [31:0] ic_insn [FETCH_N];
  pc_t  bp_pc [2];
  logic bp_taken [2];
  logic out_valid, buf_ready = 1, redir_valid = 0, d_redirect;
  fslot_t out_slots [FETCH_N];
  pc_t  redir_pc = 0;
  logic prog_we = 0;
  pc_t  prog_addr = 0;
  logic [31:0] prog_data = 0;
  int checks = 0, failures = 0;

  icache #(.WORDS(256)) u_ic (.clk, .fetch_pc(ic_pc), .fetch_insn(ic_insn), .prog_we, .prog_addr, .prog_data);
  fetch_unit #(.NPRED(2)) dut (.clk, .rst_n, .stop, .ic_pc, .ic_insn, .bp_pc, .bp_taken,
    .out_valid, .out_slots, .buf_ready, .redir_valid, .redir_pc, .d_redirect);
  always #5 clk = ~clk;

  logic rnd = 0;                                   // random phase
  function automatic logic rnd_pred(pc_t a);
    return a[4] ^ a[6] ^ a[9];
  endfunction
  always_comb for (int k = 0; k < 2; k++) bp_taken[k] = rnd ? rnd_pred(bp_pc[k]) : (bp_pc[k] == 32'h50);

  typedef struct { pc_t pc; logic [3:0] mask; logic [3:0] pred; } push_t;
  push_t got [$];
  int cyc_of [$];
  int cyc = 0;
  always @(posedge clk) if (rst_n) begin
    cyc++;
    if (out_valid && buf_ready) begin
      push_t p;
      p.mask = '0; p.pred = '0; p.pc = '0;
      for (int i = FETCH_N - 1; i >= 0; i--) begin
        p.mask[i] = out_slots[i].valid;
        p.pred[i] = out_slots[i].pred_taken;
        if (out_slots[i].valid) p.pc = out_slots[i].pc;
      end
      got.push_back(p);
      cyc_of.push_back(cyc);
    end
  end

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; $display("FAIL %s", s); end
  endtask

  task automatic put(int i, logic [31:0] w);
    @(negedge clk);
    prog_we = 1; prog_addr = pc_t'(4 * i); prog_data = w;
  endtask

  initial begin
    push_t exp [9];
    for (int i = 0; i < 64; i++) put(i, 32'd0);
    put(5,  enc_b(OP_BR,  5'd31, 21'd7));            // -> word 13
    put(13, enc_b(OP_BEQ, 5'd1, 21'd40));
    put(14, enc_b(OP_BNE, 5'd1, 21'd40));
    put(15, enc_b(OP_BLT, 5'd1, 21'd40));
    put(20, enc_b(OP_BEQ, 5'd2, 21'd7));             // predicted taken -> word 28
    @(negedge clk);
    prog_we = 0;
    rst_n = 1;
    exp[0] = '{32'h00, 4'b1111, 4'b0000};
    exp[1] = '{32'h10, 4'b0011, 4'b0010};
    exp[2] = '{32'h34, 4'b0110, 4'b0000};
    exp[3] = '{32'h3C, 4'b1000, 4'b0000};
    exp[4] = '{32'h40, 4'b1111, 4'b0000};
    exp[5] = '{32'h50, 4'b0001, 4'b0001};
    exp[6] = '{32'h70, 4'b1111, 4'b0000};
    exp[7] = '{32'h80, 4'b1111, 4'b0000};
    exp[8] = '{32'h90, 4'b1111, 4'b0000};
    while (got.size() < 7) @(negedge clk);
    buf_ready = 0;
    repeat (3) @(negedge clk);
    buf_ready = 1;
    while (got.size() < 9) @(negedge clk);
    for (int k = 0; k < 9; k++) begin
      chk(got[k].pc == exp[k].pc && got[k].mask == exp[k].mask && got[k].pred == exp[k].pred,
          $sformatf("push %0d: pc=%h mask=%b pred=%b, expected pc=%h mask=%b pred=%b", k,
                    got[k].pc, got[k].mask, got[k].pred, exp[k].pc, exp[k].mask, exp[k].pred));
    end
    chk(cyc_of[1] == cyc_of[0] + 1, "back-to-back sequential blocks");
    chk(cyc_of[2] == cyc_of[1] + 2, "one bubble after a predicted-taken branch");
    chk(cyc_of[3] == cyc_of[2] + 2, "one bubble after a cut before a third branch");
    chk(cyc_of[6] == cyc_of[5] + 2, "one bubble after a predicted-taken conditional branch");
    // redirect from the ALU stage
    @(negedge clk);
    redir_valid = 1; redir_pc = 32'h0000_0208;
    @(negedge clk);
    redir_valid = 0;
    begin
      int n0; n0 = got.size();
      while (got.size() == n0) @(negedge clk);
      chk(got[n0].pc == 32'h208 && got[n0].mask == 4'b1100, "restart at the redirect address");
    end
    // stop
    stop = 1;
    repeat (3) @(negedge clk);
    begin
      int n1; n1 = got.size();
      repeat (5) @(negedge clk);
      chk(got.size() == n1, "no fetch while stopped");
    end
    // ---- random phase ----
    begin
      logic [31:0] prog [256];
      int n0, bad;
      pc_t p;
      for (int i = 0; i < 256; i++) begin
        int r, t;
        r = $urandom_range(0, 99);
        t = $urandom_range(0, 255);
        if (r < 15)      prog[i] = enc_b(OP_BEQ, 5'd1, 21'(t - i - 1));
        else if (r < 20) prog[i] = enc_b(OP_BR, 5'd31, 21'(t - i - 1));
        else if (r < 25) prog[i] = enc_j(5'd31, 5'd2);
        else             prog[i] = enc_i(OP_ADDI, 5'd3, 5'd3, 16'(i));
        put(i, prog[i]);
      end
      @(negedge clk);
      prog_we = 0;
      rnd = 1;
      redir_valid = 1; redir_pc = '0;
      n0 = got.size();
      @(negedge clk);
      redir_valid = 0;
      stop = 0;
      while (got.size() < n0 + 300) begin
        @(negedge clk);
        buf_ready = ($urandom_range(0, 9) < 7);
      end
      buf_ready = 1;
      // walk the program with the model
      p = '0;
      bad = 0;
      for (int k = n0; k < n0 + 300; k++) begin
        push_t e;
        pc_t base, nextp;
        int nbr;
        base = {p[PC_W-1:4], 4'b0000};
        nextp = base + 16;
        nbr = 0;
        e.pc = p; e.mask = '0; e.pred = '0;
        for (int i = int'(p[3:2]); i < 4; i++) begin
          dec_t d;
          logic tk;
          d = decode(prog[base[9:2] + i], base + pc_t'(4 * i), 1'b1, 1'b0);
          if (!d.is_br) begin
            e.mask[i] = 1'b1;
            continue;
          end
          if (nbr == 2) begin
            nextp = d.pc;
            break;
          end
          tk = d.is_jmp ? 1'b0 : (d.bcond == BC_ALWAYS) ? 1'b1 : rnd_pred(d.pc);
          e.mask[i] = 1'b1;
          e.pred[i] = tk;
          nbr++;
          if (tk) begin
            nextp = d.target;
            break;
          end
        end
        checks++;
        if (got[k].pc != e.pc || got[k].mask != e.mask || got[k].pred != e.pred) begin
          failures++;
          if (bad++ < 4)
            $display("FAIL random push %0d: pc=%h mask=%b pred=%b, expected pc=%h mask=%b pred=%b",
                     k - n0, got[k].pc, got[k].mask, got[k].pred, e.pc, e.mask, e.pred);
        end
        p = nextp;
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (6000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

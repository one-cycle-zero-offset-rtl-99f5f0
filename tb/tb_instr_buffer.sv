// tb_instr_buffer: pushes blocks with random valid patterns into a
// four-entry buffer handing out groups of four and a two-entry buffer
// handing out aligned pairs, pops at random, and compares each handed-out
// group with a queue model (empty aligned groups skipped).  Also checks
// full and flush.
module tb_instr_buffer;
  import zo_pkg::*;
  logic clk = 0, rst_n = 0;
  logic flush = 0;
  logic push_valid = 0;
  fslot_t push_slots [FETCH_N];
  logic ready4, ready2, ov4, ov2, pop4 = 0, pop2 = 0;
  fslot_t o4 [4];
  fslot_t o2 [2];
  int checks = 0, failures = 0;

  instr_buffer #(.ENTRIES(4), .W(4)) dut4 (.clk, .rst_n, .flush, .push_valid, .push_slots,
    .push_ready(ready4), .out_valid(ov4), .out_slots(o4), .pop(pop4));
  instr_buffer #(.ENTRIES(2), .W(2)) dut2 (.clk, .rst_n, .flush, .push_valid, .push_slots,
    .push_ready(ready2), .out_valid(ov2), .out_slots(o2), .pop(pop2));
  always #5 clk = ~clk;

  typedef fslot_t [3:0] grp4_t;
  typedef fslot_t [1:0] grp2_t;
  grp4_t q4 [$];
  grp2_t q2 [$];
  int cnt4, cnt2;      // blocks held (model)
  int left2 [$];       // pairs left in each held block (model, W=2)

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", s); end
  endtask

  initial begin
    int n;
    cnt4 = 0; cnt2 = 0;
    for (int i = 0; i < FETCH_N; i++) push_slots[i] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (n = 0; n < 3000; n++) begin
      bit do_flush, acc4, acc2;
      @(negedge clk);
      do_flush = (n % 500 == 499);
      flush = do_flush;
      push_valid = ($urandom % 2) == 0;
      begin
        int first;
        first = $urandom % 4;
        for (int i = 0; i < FETCH_N; i++) begin
          push_slots[i].valid = (i >= first) && (($urandom % 5) != 0 || i == 3);
          push_slots[i].pc = pc_t'(n * 16 + i * 4);
          push_slots[i].ir = $urandom;
          push_slots[i].pred_taken = $urandom % 2;
        end
      end
      pop4 = ov4 && ($urandom % 2) == 0;
      pop2 = ov2 && ($urandom % 2) == 0;
      #1;
      chk(ready4 == (cnt4 < 4), "full, four-wide");
      chk(ready2 == (cnt2 < 2), "full, two-wide");
      chk(ov4 == (q4.size() != 0), "out_valid, four-wide");
      chk(ov2 == (q2.size() != 0), "out_valid, two-wide");
      if (ov4 && q4.size() != 0) for (int i = 0; i < 4; i++) chk(o4[i] == q4[0][i], "group, four-wide");
      if (ov2 && q2.size() != 0) for (int i = 0; i < 2; i++) chk(o2[i] == q2[0][i], "pair, two-wide");
      acc4 = cnt4 < 4;
      acc2 = cnt2 < 2;
      if (do_flush) begin
        q4.delete(); q2.delete(); left2.delete(); cnt4 = 0; cnt2 = 0;
      end else begin
        if (pop4 && q4.size() != 0) begin void'(q4.pop_front()); cnt4--; end
        if (pop2 && q2.size() != 0) begin
          void'(q2.pop_front());
          left2[0]--;
          if (left2[0] == 0) begin void'(left2.pop_front()); cnt2--; end
        end
        if (push_valid && acc4) begin
          grp4_t g;
          for (int i = 0; i < 4; i++) g[i] = push_slots[i];
          q4.push_back(g); cnt4++;
        end
        if (push_valid && acc2) begin
          int k; k = 0;
          for (int h = 0; h < 2; h++)
            if (push_slots[2*h].valid || push_slots[2*h+1].valid) begin
              grp2_t g;
              g[0] = push_slots[2*h]; g[1] = push_slots[2*h+1];
              q2.push_back(g); k++;
            end
          left2.push_back(k); cnt2++;
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (10000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

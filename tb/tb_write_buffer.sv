// tb_write_buffer: random stores from two ports against a queue model of
// a merging buffer (merge into any entry but the one draining, else a new
// entry at the tail, at most 8 entries), with a memory side that
// acknowledges at random.  Checks readiness, block match and every block
// write (order, address, mask, data); also checks that eight different
// blocks fill the buffer.
module tb_write_buffer;
  import zo_pkg::*;
  localparam int E = 8, BW = 4, NP = 2;
  logic clk = 0, rst_n = 0;
  logic              push_valid [NP];
  logic [ADDR_W-1:0] push_addr  [NP];
  word_t             push_data  [NP];
  logic push_commit, push_ready;
  logic [ADDR_W-1:0] match_addr;
  logic blk_match, empty, mem_wr_req, mem_wr_ack;
  logic [ADDR_W-1:0] mem_wr_addr;
  word_t mem_wr_data [BW];
  logic [BW-1:0] mem_wr_mask;
  int checks = 0, failures = 0;

  typedef struct { int blk; logic [BW-1:0] mask; word_t data [BW]; } ent_t;
  ent_t q [$];

  write_buffer #(.ENTRIES(E), .BLOCK_WORDS(BW), .NP(NP)) dut (.*);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", s); end
  endtask

  initial begin
    bit saw_full;
    saw_full = 0;
    for (int p = 0; p < NP; p++) begin push_valid[p] = 0; push_addr[p] = 0; push_data[p] = 0; end
    push_commit = 0; mem_wr_ack = 0; match_addr = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 4000; n++) begin
      bit ack, fits, exp_ready;
      int need;
      ent_t t [$];
      @(negedge clk);
      // stimulus
      for (int p = 0; p < NP; p++) begin
        push_valid[p] = ($urandom % 3) == 0;
        push_addr[p]  = ADDR_W'((($urandom % ((n < 2000) ? 12 : 4)) * 32) + ($urandom % 4) * 8);
        push_data[p]  = {$urandom, $urandom};
      end
      push_commit = ($urandom % 4) != 0;
      ack = (n < 300) ? 1'b0 : (($urandom % 3) == 0);   // no drain at first: fill up
      mem_wr_ack = ack && mem_wr_req;
      match_addr = ADDR_W'(($urandom % 12) * 32);
      #1;
      // model
      chk(empty == (q.size() == 0), "empty");
      chk(mem_wr_req == (q.size() != 0), "mem_wr_req");
      begin
        bit m; m = 0;
        foreach (q[i]) if (q[i].blk == int'(match_addr >> 5)) m = 1;
        chk(blk_match == m, "blk_match");
      end
      if (q.size() != 0) begin
        chk(mem_wr_addr == ADDR_W'(q[0].blk * 32) && mem_wr_mask == q[0].mask, "drain address/mask");
        for (int w = 0; w < BW; w++)
          if (q[0].mask[w]) chk(mem_wr_data[w] == q[0].data[w], "drain data");
      end
      t = q;
      if (mem_wr_ack && t.size() != 0) void'(t.pop_front());
      fits = 1; need = 0;
      for (int p = 0; p < NP; p++) if (push_valid[p]) begin
        int b, w; bit merged;
        need++;
        b = int'(push_addr[p] >> 5); w = int'(push_addr[p][4:3]); merged = 0;
        for (int i = 1; i < t.size(); i++)
          if (!merged && t[i].blk == b) begin t[i].mask[w] = 1; t[i].data[w] = push_data[p]; merged = 1; end
        if (!merged) begin
          if (t.size() == E) fits = 0;
          else begin
            ent_t e; e.blk = b; e.mask = '0; e.mask[w] = 1; e.data[w] = push_data[p];
            t.push_back(e);
          end
        end
      end
      exp_ready = (q.size() + need <= E) || fits;
      chk(push_ready == exp_ready, "push_ready");
      if (!push_ready) saw_full = 1;
      if (push_commit && exp_ready) q = t;
      else if (mem_wr_ack && q.size() != 0) void'(q.pop_front());
    end
    chk(saw_full, "the buffer filled up");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (20000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

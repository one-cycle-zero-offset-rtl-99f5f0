// tb_branch_predictor: trains random branches and compares every lookup
// with a shadow table of 2-bit saturating counters (weakly not taken after
// reset).  Two branches 1 KB apart share a counter, as a tagless
// 256-entry table must.
module tb_branch_predictor;
  import zo_pkg::*;
  localparam int E = 256;
  logic clk = 0, rst_n = 0;
  pc_t  lookup_pc [2];
  logic lookup_taken [2];
  logic upd_valid [2];
  pc_t  upd_pc [2];
  logic upd_taken [2];
  logic [1:0] shadow [E];
  int checks = 0, failures = 0;

  branch_predictor #(.ENTRIES(E), .NPRED(2), .NUPD(2)) dut (
    .clk, .rst_n, .lookup_pc, .lookup_taken, .upd_valid, .upd_pc, .upd_taken);
  always #5 clk = ~clk;

  initial begin
    for (int e = 0; e < E; e++) shadow[e] = 2'b01;
    for (int u = 0; u < 2; u++) begin upd_valid[u] = 0; upd_pc[u] = 0; upd_taken[u] = 0; lookup_pc[u] = 0; end
    repeat (2) @(negedge clk);
    rst_n = 1;
    // aliasing: pc 0x40 and 0x440 use the same counter
    @(negedge clk);
    upd_valid[0] = 1; upd_pc[0] = 32'h40; upd_taken[0] = 1;
    @(negedge clk);
    upd_pc[0] = 32'h440;
    @(negedge clk);
    upd_valid[0] = 0;
    shadow[16] = 2'b11;
    lookup_pc[0] = 32'h440; lookup_pc[1] = 32'h40;
    #1;
    checks++; if (lookup_taken[0] !== 1'b1 || lookup_taken[1] !== 1'b1) begin failures++; $display("FAIL alias"); end
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int u = 0; u < 2; u++) begin
        upd_valid[u] = ($urandom % 3) != 0;
        upd_pc[u]    = pc_t'(($urandom % 64) * 4);
        upd_taken[u] = ($urandom % 4) != 0;
        lookup_pc[u] = pc_t'(($urandom % 64) * 4);
      end
      if (upd_pc[1][9:2] == upd_pc[0][9:2]) upd_valid[1] = 0;
      #1;
      for (int u = 0; u < 2; u++) begin
        checks++;
        if (lookup_taken[u] !== shadow[lookup_pc[u][9:2]][1]) begin
          failures++;
          if (failures < 5) $display("FAIL pc=%h taken=%b ctr=%0d", lookup_pc[u], lookup_taken[u], shadow[lookup_pc[u][9:2]]);
        end
      end
      for (int u = 0; u < 2; u++)
        if (upd_valid[u]) begin
          if (upd_taken[u] && shadow[upd_pc[u][9:2]] != 3) shadow[upd_pc[u][9:2]]++;
          if (!upd_taken[u] && shadow[upd_pc[u][9:2]] != 0) shadow[upd_pc[u][9:2]]--;
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

// tb_zo_processor: end-to-end test of the processor at its default size
// (four-way issue, 8 KB data cache, 256 predictor counters).
//
// Each program from zo_tb_pkg runs four times: baseline (ACC and ZA off),
// ACC only, ZA only, and both.  After HALT retires and the write buffer has
// drained, all registers and the data memory range the programs use are
// compared with the instruction-level reference model.  Cycle counts are
// checked where the design fixes them: a chain of n dependent zero-offset
// loads takes n-1 fewer cycles with ZA, and with ACC, than in the baseline
// (load latency two cycles against one), and an ALU result feeding a
// zero-offset load is collapsed by ACC, and a loop of strided loads that
// all miss lets every miss go without freezing while the loop goes on
// (nonblocking loads).  Every mechanism (each stall type, advanced loads
// and stores, refused advances, ACC, mispredictions, predicted-taken
// redirects, cache misses, missing loads let go and waits on their
// registers, a full write buffer) is counted
// over the whole run and must occur at least once.  The test takes well
// under a second of simulation.
module tb_zo_processor;
  import zo_pkg::*;
  import zo_perf_pkg::*;
  import zo_tb_pkg::*;

  localparam int unsigned BW = 4;
  localparam int unsigned LO = 16'h2000 >> 3;      // compared word range
  localparam int unsigned HI = 16'h8000 >> 3;

  logic clk = 1'b0;
  logic rst_n = 1'b0;
  logic acc_en = 1'b0, za_en = 1'b0;
  logic prog_we = 1'b0;
  pc_t  prog_addr = '0;
  logic [31:0] prog_data = '0;
  logic              mem_rd_req, mem_rd_valid, mem_wr_req, mem_wr_ack;
  logic [ADDR_W-1:0] mem_rd_addr, mem_wr_addr;
  word_t             mem_rd_data [BW];
  word_t             mem_wr_data [BW];
  logic [BW-1:0]     mem_wr_mask;
  logic              halted, wb_empty;
  perf_t             perf;
  logic              ld_we = 1'b0;
  logic [ADDR_W-1:0] ld_addr = '0;
  word_t             ld_data = '0;

  always #5 clk = ~clk;

  zo_processor dut (
    .clk, .rst_n, .acc_en, .za_en, .prog_we, .prog_addr, .prog_data,
    .mem_rd_req, .mem_rd_addr, .mem_rd_valid, .mem_rd_data,
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_mask, .mem_wr_ack,
    .halted, .wb_empty, .perf
  );

  mem_model #(.WORDS(MEM_WORDS), .BW(BW)) u_mem (
    .clk, .rst_n(1'b1), .rd_req(mem_rd_req), .rd_addr(mem_rd_addr), .rd_valid(mem_rd_valid),
    .rd_data(mem_rd_data), .wr_req(mem_wr_req), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .wr_mask(mem_wr_mask), .wr_ack(mem_wr_ack), .ld_we, .ld_addr, .ld_data
  );

  int checks = 0, failures = 0;
  perf_t total;
  int unsigned wb_full_cycles = 0;
  always @(posedge clk)
    if (rst_n && !dut.u_dcache.wb_ready) wb_full_cycles++;

  task automatic check(input bit ok, input string what);
    checks++;
    if (!ok) begin
      failures++;
      $display("FAIL: %s", what);
    end
  endtask

  // Run the program in zo_tb_pkg::prog; returns the processor's counters.
  task automatic run(input string name, input bit acc, input bit za, output perf_t p);
    int unsigned cyc;
    int unsigned bad;
    rst_n = 1'b0;
    acc_en = acc;
    za_en  = za;
    for (int i = 0; i < int'(plen); i++) begin
      @(negedge clk);
      prog_we = 1'b1; prog_addr = pc_t'(4 * i); prog_data = prog[i];
    end
    for (int unsigned w = LO; w < HI; w++) begin
      @(negedge clk);
      prog_we = 1'b0;
      ld_we = 1'b1; ld_addr = ADDR_W'(w * 8); ld_data = init_mem[w];
    end
    @(negedge clk);
    prog_we = 1'b0; ld_we = 1'b0;
    repeat (2) @(negedge clk);
    rst_n = 1'b1;
    cyc = 0;
    while (!(halted && wb_empty) && cyc < 100000) begin
      @(negedge clk);
      cyc++;
    end
    p = perf;
    check(halted && wb_empty, $sformatf("%s acc=%0d za=%0d: did not halt", name, acc, za));
    bad = 0;
    for (int r = 0; r < 31; r++)
      if (dut.u_rf.regs[r] != ref_regs[r]) begin
        if (bad < 4) $display("  %s acc=%0d za=%0d r%0d = %h, expected %h", name, acc, za, r,
                              dut.u_rf.regs[r], ref_regs[r]);
        bad++;
      end
    check(bad == 0, $sformatf("%s acc=%0d za=%0d: %0d registers differ", name, acc, za, bad));
    bad = 0;
    for (int unsigned w = LO; w < HI; w++)
      if (u_mem.mem[w] != ref_mem[w]) begin
        if (bad < 4) $display("  %s acc=%0d za=%0d mem[%h] = %h, expected %h", name, acc, za,
                              w * 8, u_mem.mem[w], ref_mem[w]);
        bad++;
      end
    check(bad == 0, $sformatf("%s acc=%0d za=%0d: %0d memory words differ", name, acc, za, bad));
    check(p.retired == ref_steps, $sformatf("%s acc=%0d za=%0d: retired %0d, expected %0d",
                                            name, acc, za, p.retired, ref_steps));
    $display("%-6s acc=%0d za=%0d cycles=%0d retired=%0d IPC=%0.3f branch=%0d static=%0d arith=%0d agi=%0d lui=%0d agi0=%0d lui0=%0d za_ld=%0d za_st=%0d denied=%0d acc=%0d mispred=%0d dredir=%0d miss=%0d freeze=%0d nb=%0d mwait=%0d",
             name, acc, za, p.cycles, p.retired, real'(p.retired) / real'(p.cycles),
             p.stall_branch, p.stall_static, p.stall_arith, p.stall_agi, p.stall_lui, p.stall_agi0, p.stall_lui0, p.za_loads, p.za_stores,
             p.za_denied, p.acc_used, p.mispredicts, p.d_redirects, p.dc_misses, p.freeze_cycles,
             p.nb_loads, p.stall_miss);
    total.stall_static  += p.stall_static;
    total.stall_branch  += p.stall_branch;
    total.stall_arith   += p.stall_arith;
    total.stall_agi     += p.stall_agi;
    total.stall_lui     += p.stall_lui;
    total.stall_agi0    += p.stall_agi0;
    total.stall_lui0    += p.stall_lui0;
    check(p.stall_agi0 <= p.stall_agi && p.stall_lui0 <= p.stall_lui,
          "zero-offset interlocks are a part of all interlocks");
    total.za_loads      += p.za_loads;
    total.za_stores     += p.za_stores;
    total.za_denied     += p.za_denied;
    total.acc_used      += p.acc_used;
    total.mispredicts   += p.mispredicts;
    total.d_redirects   += p.d_redirects;
    total.dc_misses     += p.dc_misses;
    total.freeze_cycles += p.freeze_cycles;
    total.nb_loads      += p.nb_loads;
    total.stall_miss    += p.stall_miss;
  endtask

  task automatic run4(input string name, output perf_t pb, output perf_t pa,
                      output perf_t pz, output perf_t pazc);
    run_ref();
    run(name, 1'b0, 1'b0, pb);
    run(name, 1'b1, 1'b0, pa);
    run(name, 1'b0, 1'b1, pz);
    run(name, 1'b1, 1'b1, pazc);
  endtask

  initial begin
    perf_t b, a, z, az;
    total = '0;

    prog_chain(16);
    run4("chain", b, a, z, az);
    // 16 load-to-use edges (15 to the next load, one to the final store):
    // ZA shortens all of them, ACC only those ending in a zero-offset base.
    check(b.cycles - z.cycles == 16, $sformatf("chain: ZA saves %0d cycles, expected 16", b.cycles - z.cycles));
    check(b.cycles - a.cycles == 15, $sformatf("chain: ACC saves %0d cycles, expected 15", b.cycles - a.cycles));
    check(z.za_loads >= 16, "chain: every chained load advanced");
    check(b.za_loads == 0 && b.acc_used == 0, "chain: baseline uses neither technique");

    prog_agi(16);
    run4("agi", b, a, z, az);
    check(a.acc_used >= 8, $sformatf("agi: ACC collapsed %0d loads", a.acc_used));
    check(a.cycles < b.cycles, "agi: ACC is faster than the baseline");
    check(a.stall_agi < b.stall_agi, "agi: ACC removes address-generation interlocks");

    prog_list(24);
    run4("list", b, a, z, az);
    check(z.za_loads >= 24, "list: every next-pointer load advanced");
    check(az.cycles <= b.cycles, "list: ACC+ZA is not slower than the baseline");

    prog_vec(32, 40);
    run4("vec", b, a, z, az);
    check(az.cycles < b.cycles, "vec: ACC+ZA is faster than the baseline");

    prog_store(20);
    run4("store", b, a, z, az);
    check(z.za_stores > 0 && z.cycles < b.cycles, "store: ZA advances stores and saves cycles");

    prog_misc();
    run4("misc", b, a, z, az);

    prog_nb(16);
    run4("nb", b, a, z, az);
    // each element is in its own block: every load misses and, with its
    // use two groups later, completes without freezing the pipeline
    check(b.nb_loads == 16, $sformatf("nb: %0d of 16 missing loads let go", b.nb_loads));
    check(b.freeze_cycles < 16, $sformatf("nb: %0d frozen cycles", b.freeze_cycles));

    $display("mechanisms: static=%0d arith=%0d agi=%0d lui=%0d agi0=%0d lui0=%0d za_ld=%0d za_st=%0d denied=%0d acc=%0d mispred=%0d dredir=%0d miss=%0d freeze=%0d nb=%0d mwait=%0d wb_full=%0d",
             total.stall_static, total.stall_arith, total.stall_agi, total.stall_lui, total.stall_agi0, total.stall_lui0,
             total.za_loads, total.za_stores, total.za_denied, total.acc_used, total.mispredicts,
             total.d_redirects, total.dc_misses, total.freeze_cycles, total.nb_loads,
             total.stall_miss, wb_full_cycles);
    check(total.stall_static  > 0, "an issue-rule stall happened");
    check(total.stall_arith   > 0, "an arithmetic interlock happened");
    check(total.stall_agi     > 0, "an address-generation interlock happened");
    check(total.stall_lui     > 0, "a load-use interlock happened");
    check(total.stall_branch  > 0, "the I stage ran empty after a misprediction or fetch delay");
    check(total.stall_agi0    > 0, "an AGI on a zero-offset access happened");
    check(total.stall_lui0    > 0, "an LUI on a zero-offset load happened");
    check(total.za_loads      > 0, "a zero-offset load was advanced");
    check(total.za_stores     > 0, "a zero-offset store was advanced");
    check(total.za_denied     > 0, "an advance was refused");
    check(total.acc_used      > 0, "ACC collapsed an address calculation");
    check(total.mispredicts   > 0, "a misprediction happened");
    check(total.d_redirects   > 0, "a predicted-taken redirect happened");
    check(total.dc_misses     > 0, "a data-cache miss happened");
    check(wb_full_cycles      > 0, "the write buffer filled up");
    check(total.nb_loads      > 0, "a missing load was let go (nonblocking)");
    check(total.stall_miss    > 0, "an instruction waited for a missing load");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_dcache: the data cache with a memory model behind it.
//  * a load to a cold block stalls for exactly MISS_LATENCY (6) cycles and
//    then hits with memory's data;
//  * random loads and stores on both ports, held while the cache stalls,
//    return the values of a shadow memory (stores apply in port order);
//  * after the write buffer drains, memory equals the shadow (write
//    through), and a store miss does not allocate a block;
//  * a load on a port with nb_ok that misses is let go without a stall,
//    and its word is delivered on fill_valid exactly MISS_LATENCY-1 cycles
//    later; meanwhile a hit is served, while a store to the block being
//    filled and a second miss stall;
//  * a load sees an older store of the same cycle (lower port) to its word.
module tb_dcache;
  import zo_pkg::*;
  localparam int NP = 2, BW = 4, MW = 2048;
  logic clk = 0, rst_n = 0;
  logic req_valid [NP], req_we [NP];
  logic [ADDR_W-1:0] req_addr [NP];
  word_t req_wdata [NP], rsp_rdata [NP];
  logic rsp_hit [NP];
  logic commit, stall, miss_busy, wb_empty;
  logic nb_ok [NP];
  logic miss_release, fill_valid;
  logic [0:0] release_port;
  word_t fill_word;
  logic mem_rd_req, mem_rd_valid, mem_wr_req, mem_wr_ack;
  logic [ADDR_W-1:0] mem_rd_addr, mem_wr_addr;
  word_t mem_rd_data [BW], mem_wr_data [BW];
  logic [BW-1:0] mem_wr_mask;
  logic ld_we = 0;
  logic [ADDR_W-1:0] ld_addr = 0;
  word_t ld_data = 0;
  word_t shadow [MW];
  int checks = 0, failures = 0;

  dcache #(.SIZE_BYTES(8192), .BLOCK_BYTES(32), .MISS_LATENCY(6), .WB_ENTRIES(8), .NP(NP)) dut (.*);
  mem_model #(.WORDS(MW), .BW(BW)) u_mem (
    .clk, .rst_n(1'b1), .rd_req(mem_rd_req), .rd_addr(mem_rd_addr), .rd_valid(mem_rd_valid),
    .rd_data(mem_rd_data), .wr_req(mem_wr_req), .wr_addr(mem_wr_addr), .wr_data(mem_wr_data),
    .wr_mask(mem_wr_mask), .wr_ack(mem_wr_ack), .ld_we, .ld_addr, .ld_data);
  always #5 clk = ~clk;

  task automatic chk(bit ok, string s);
    checks++;
    if (!ok) begin failures++; if (failures < 8) $display("FAIL %s", s); end
  endtask

  initial begin
    int stalls;
    for (int p = 0; p < NP; p++) begin req_valid[p] = 0; req_we[p] = 0; req_addr[p] = 0; req_wdata[p] = 0; end
    commit = 1;
    nb_ok[0] = 0; nb_ok[1] = 0;
    for (int w = 0; w < MW; w++) begin
      @(negedge clk);
      shadow[w] = {32'(w), $urandom};
      ld_we = 1; ld_addr = ADDR_W'(w * 8); ld_data = shadow[w];
    end
    @(negedge clk);
    ld_we = 0;
    rst_n = 1;
    // ---- miss latency ----
    @(negedge clk);
    req_valid[0] = 1; req_addr[0] = 32'h0000_0128;
    stalls = 0;
    #1;
    while (stall) begin
      @(negedge clk);
      stalls++;
      #1;
    end
    chk(stalls == 6, $sformatf("miss stalled %0d cycles, expected 6", stalls));
    chk(rsp_hit[0] && rsp_rdata[0] == shadow[32'h128 >> 3], "filled word");
    // ---- store miss does not allocate ----
    @(negedge clk);
    req_valid[0] = 1; req_we[0] = 1; req_addr[0] = 32'h0000_0400; req_wdata[0] = 64'hABCD;
    shadow[32'h400 >> 3] = 64'hABCD;
    @(negedge clk);
    req_we[0] = 0;
    #1;
    chk(!rsp_hit[0] && stall, "store miss leaves the block out of the cache");
    while (stall) begin @(negedge clk); #1; end
    chk(rsp_rdata[0] == 64'hABCD, "load after store miss sees the stored word");
    // ---- nonblocking load ----
    @(negedge clk);
    req_we[0] = 0; req_valid[0] = 1; req_addr[0] = 32'h0000_0800; nb_ok[0] = 1;
    #1;
    chk(!stall && miss_release && release_port == 0 && !rsp_hit[0], "miss on an nb_ok port is let go");
    begin
      int fill_at; fill_at = -1;
      for (int k = 1; k <= 8; k++) begin
        @(negedge clk);
        req_valid[0] = 0; req_we[0] = 0; nb_ok[0] = 0;
        if (k == 1) begin req_valid[0] = 1; req_addr[0] = 32'h0000_0128; end
        if (k == 2) begin req_valid[0] = 1; req_we[0] = 1; req_addr[0] = 32'h0000_0808; req_wdata[0] = 64'h77; end
        if (k == 3) begin req_valid[0] = 1; req_addr[0] = 32'h0000_0A00; nb_ok[0] = 1; end
        #1;
        if (k == 1) chk(!stall && rsp_hit[0] && rsp_rdata[0] == shadow[32'h128 >> 3], "hit under miss");
        if (k == 2) chk(stall, "store to the block being filled waits");
        if (k == 3) chk(stall && !miss_release, "second miss stalls while the first is served");
        if (fill_valid && fill_at < 0) begin
          fill_at = k;
          chk(fill_word == shadow[32'h800 >> 3], "released load's word");
        end
      end
      chk(fill_at == 5, $sformatf("released word after %0d cycles, expected 5", fill_at));
    end
    @(negedge clk);
    req_valid[0] = 1; req_we[0] = 0; req_addr[0] = 32'h0000_0800;
    #1;
    chk(!stall && rsp_hit[0] && rsp_rdata[0] == shadow[32'h800 >> 3], "filled block hits");
    // ---- same-cycle store to load forwarding ----
    @(negedge clk);
    req_valid[0] = 1; req_we[0] = 1; req_addr[0] = 32'h0000_0128; req_wdata[0] = 64'h1234_5678;
    req_valid[1] = 1; req_we[1] = 0; req_addr[1] = 32'h0000_0128;
    #1;
    chk(!stall && rsp_rdata[1] == 64'h1234_5678, "load sees the older store of its cycle");
    shadow[32'h128 >> 3] = 64'h1234_5678;
    @(negedge clk);
    req_valid[0] = 0; req_valid[1] = 0;
    // ---- random traffic ----
    for (int n = 0; n < 3000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NP; p++) begin
        req_valid[p] = ($urandom % 2) == 0;
        req_we[p]    = ($urandom % 3) == 0;
        req_addr[p]  = ADDR_W'(($urandom % 256) * 8 + ((n > 1500) ? 32'h2000 : 0));
        req_wdata[p] = {$urandom, $urandom};
      end
      #1;
      while (stall) begin @(negedge clk); #1; end
      // port order is program order: a load sees the stores of lower ports
      for (int p = 0; p < NP; p++) begin
        if (req_valid[p] && !req_we[p])
          chk(rsp_rdata[p] == shadow[req_addr[p] >> 3], $sformatf("load %h", req_addr[p]));
        if (req_valid[p] && req_we[p])
          shadow[req_addr[p] >> 3] = req_wdata[p];
      end
    end
    @(negedge clk);
    for (int p = 0; p < NP; p++) req_valid[p] = 0;
    while (!wb_empty) @(negedge clk);
    repeat (2) @(negedge clk);
    begin
      int bad; bad = 0;
      for (int w = 0; w < MW; w++) if (u_mem.mem[w] != shadow[w]) bad++;
      chk(bad == 0, $sformatf("%0d memory words differ after drain", bad));
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (100000) @(posedge clk);
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

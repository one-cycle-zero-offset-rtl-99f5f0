// dcache: direct-mapped, write-through, no-write-allocate data cache with
// NP access ports, a one-miss controller with nonblocking loads and a
// merging write buffer.
//
// Geometry follows the design: SIZE_BYTES = 8 KB, BLOCK_BYTES = 32-byte
// blocks, direct mapped, MISS_LATENCY = 6 cycles, two ports, and an
// 8-block merging write buffer (write_buffer).  Accesses are whole XLEN
// words; the low address bits below the word are ignored.
//
// Ports are served in the same cycle: a load reads the array
// combinationally and reports hit; a store writes the word when it hits
// and always enters the write buffer (write through, no allocate).  Port
// order is program order, so when two stores in one cycle write the same
// word the higher port wins.  Writes take effect only when `commit` is
// high, which the processor drives low while it is frozen.
//
// Misses: the controller serves one miss at a time ("Blocking cache" in
// the document).  It waits until no write-buffer entry holds the block (so
// memory is up to date), requests the block on the memory read channel and
// writes it into the array MISS_LATENCY-1 cycles after the miss was seen,
// so a load that retries hits MISS_LATENCY cycles after its first attempt.
//
// Nonblocking loads ("Nonblocking loads" in the document; the rules here
// are this design's choice): when the controller is idle, exactly one
// load misses, the processor marks that port nb_ok and no store of the
// same cycle touches the block, the load is let go: miss_release and
// release_port report it in that cycle, `stall` stays low, and
// MISS_LATENCY-1 cycles later fill_valid carries its word in fill_word.
// Any other load miss raises `stall` until it hits.  `stall` is also
// raised by a store to the block being filled and when the write buffer
// cannot take this cycle's stores.  A load reads a word written by an
// older (lower-port) store of the same cycle.
//
// Memory interface: read channel mem_rd_req/mem_rd_addr, answered by
// mem_rd_valid with the whole block; write channel from the write buffer.
module dcache
  import zo_pkg::*;
#(
  parameter int unsigned SIZE_BYTES   = 8192,
  parameter int unsigned BLOCK_BYTES  = 32,
  parameter int unsigned MISS_LATENCY = 6,
  parameter int unsigned WB_ENTRIES   = 8,
  parameter int unsigned NP           = 2
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              req_valid [NP],
  input  logic              req_we    [NP],
  input  logic [ADDR_W-1:0] req_addr  [NP],
  input  word_t             req_wdata [NP],
  output word_t             rsp_rdata [NP],
  output logic              rsp_hit   [NP],
  input  logic              commit,
  input  logic              nb_ok     [NP],   // a miss on this port may complete later
  output logic              stall,
  output logic              miss_release,          // a load miss was let go this cycle
  output logic [$clog2(NP > 1 ? NP : 2)-1:0] release_port,
  output logic              fill_valid,       // the released load's word arrives
  output word_t             fill_word,
  output logic              miss_busy,
  output logic              wb_empty,
  // memory read channel
  output logic              mem_rd_req,
  output logic [ADDR_W-1:0] mem_rd_addr,
  input  logic              mem_rd_valid,
  input  word_t             mem_rd_data [BLOCK_BYTES / (XLEN / 8)],
  // memory write channel
  output logic              mem_wr_req,
  output logic [ADDR_W-1:0] mem_wr_addr,
  output word_t             mem_wr_data [BLOCK_BYTES / (XLEN / 8)],
  output logic [BLOCK_BYTES / (XLEN / 8) - 1:0] mem_wr_mask,
  input  logic              mem_wr_ack
);
  localparam int unsigned BW    = BLOCK_BYTES / (XLEN / 8);   // words per block
  localparam int unsigned LINES = SIZE_BYTES / BLOCK_BYTES;
  localparam int unsigned WOFF  = $clog2(XLEN / 8);
  localparam int unsigned BOFF  = $clog2(BLOCK_BYTES);
  localparam int unsigned IW    = $clog2(LINES);
  localparam int unsigned TW    = ADDR_W - BOFF - IW;
  localparam int unsigned LW    = $clog2(MISS_LATENCY + 1);

  logic [TW-1:0] tags  [LINES];
  logic          valid [LINES];
  word_t         data  [LINES * BW];

  function automatic logic [IW-1:0] idx_of(logic [ADDR_W-1:0] a);
    return a[BOFF +: IW];
  endfunction
  function automatic logic [TW-1:0] tag_of(logic [ADDR_W-1:0] a);
    return a[ADDR_W-1 -: TW];
  endfunction
  function automatic logic [IW+$clog2(BW)-1:0] widx_of(logic [ADDR_W-1:0] a);
    return a[WOFF +: IW + $clog2(BW)];
  endfunction

  // ---- lookup ----------------------------------------------------------
  // A load sees the data of an older store to the same word in the same
  // cycle (lower port = older).
  logic any_load_miss;
  logic [ADDR_W-1:0] miss_addr;
  int unsigned n_miss, miss_port;
  always_comb begin
    any_load_miss = 1'b0;
    miss_addr     = '0;
    n_miss        = 0;
    miss_port     = 0;
    for (int p = 0; p < NP; p++) begin
      rsp_hit[p]   = valid[idx_of(req_addr[p])] && tags[idx_of(req_addr[p])] == tag_of(req_addr[p]);
      rsp_rdata[p] = data[widx_of(req_addr[p])];
      for (int q = 0; q < NP; q++)
        if (q < p && req_valid[q] && req_we[q] &&
            req_addr[q][ADDR_W-1:WOFF] == req_addr[p][ADDR_W-1:WOFF])
          rsp_rdata[p] = req_wdata[q];
      if (req_valid[p] && !req_we[p] && !rsp_hit[p]) begin
        if (!any_load_miss) begin
          miss_addr = req_addr[p];
          miss_port = p;
        end
        any_load_miss = 1'b1;
        n_miss++;
      end
    end
  end

  // ---- write buffer ------------------------------------------------------
  logic push_valid [NP];
  logic wb_ready, wb_match;
  logic [ADDR_W-1:0] fill_addr;
  always_comb
    for (int p = 0; p < NP; p++) push_valid[p] = req_valid[p] && req_we[p];

  write_buffer #(.ENTRIES(WB_ENTRIES), .BLOCK_WORDS(BW), .NP(NP)) u_wb (
    .clk, .rst_n,
    .push_valid, .push_addr(req_addr), .push_data(req_wdata),
    .push_commit(commit && !stall), .push_ready(wb_ready),
    .match_addr(fill_addr), .blk_match(wb_match), .empty(wb_empty),
    .mem_wr_req, .mem_wr_addr, .mem_wr_data, .mem_wr_mask, .mem_wr_ack
  );

  // ---- miss release and stall ----------------------------------------------
  // A single missing load is let go (nonblocking) when the controller is
  // free, the processor allows it (nb_ok) and no store of the same cycle
  // touches its block; otherwise the pipeline stalls until it hits.  While
  // a block is being filled, a store to that block waits, so that the fill
  // cannot overwrite newer data in the array.
  typedef enum logic { MC_IDLE, MC_FILL } mc_state_e;
  mc_state_e state;
  logic rel_cand, st_conflict;
  always_comb begin
    rel_cand    = (state == MC_IDLE) && n_miss == 1;
    st_conflict = 1'b0;
    for (int p = 0; p < NP; p++) begin
      if (p == miss_port && !nb_ok[p]) rel_cand = 1'b0;
      if (req_valid[p] && req_we[p]) begin
        if (req_addr[p][ADDR_W-1:BOFF] == miss_addr[ADDR_W-1:BOFF]) rel_cand = 1'b0;
        if (state == MC_FILL && req_addr[p][ADDR_W-1:BOFF] == fill_addr[ADDR_W-1:BOFF])
          st_conflict = 1'b1;
      end
    end
  end

  assign stall        = (any_load_miss && !rel_cand) || !wb_ready || st_conflict;
  assign miss_release      = rel_cand && !stall;
  assign release_port = ($bits(release_port))'(miss_port);

  // ---- miss controller ---------------------------------------------------
  logic [LW-1:0] cnt;
  logic          got;
  logic          rel_q;               // the miss being served was released
  word_t         fill_buf [BW];

  assign miss_busy   = (state == MC_FILL);
  assign mem_rd_req  = (state == MC_FILL) && !got && !wb_match;
  assign mem_rd_addr = {fill_addr[ADDR_W-1:BOFF], BOFF'(0)};

  logic fill_done;
  assign fill_done = (state == MC_FILL) && (cnt >= LW'(MISS_LATENCY - 1)) &&
                     (got || (mem_rd_req && mem_rd_valid));

  // the released load's word, from the block as it is written
  always_comb begin
    fill_valid = fill_done && rel_q;
    fill_word  = '0;
    for (int w = 0; w < BW; w++)
      if (w == int'(fill_addr[WOFF +: $clog2(BW)]))
        fill_word = got ? fill_buf[w] : mem_rd_data[w];
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rel_q     <= 1'b0;
      state     <= MC_IDLE;
      cnt       <= '0;
      got       <= 1'b0;
      fill_addr <= '0;
      for (int w = 0; w < BW; w++) fill_buf[w] <= '0;
    end else begin
      unique case (state)
        MC_IDLE: if (any_load_miss) begin
          state     <= MC_FILL;
          fill_addr <= miss_addr;
          rel_q     <= miss_release;
          cnt       <= LW'(1);
          got       <= 1'b0;
        end
        MC_FILL: begin
          if (cnt < LW'(MISS_LATENCY - 1)) cnt <= cnt + LW'(1);
          if (mem_rd_req && mem_rd_valid) begin
            got <= 1'b1;
            for (int w = 0; w < BW; w++) fill_buf[w] <= mem_rd_data[w];
          end
          if (fill_done) state <= MC_IDLE;
        end
        default: state <= MC_IDLE;
      endcase
    end
  end

  // ---- arrays --------------------------------------------------------------
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int l = 0; l < LINES; l++) begin
        valid[l] <= 1'b0;
        tags[l]  <= '0;
      end
    end else if (fill_done) begin
      valid[idx_of(fill_addr)] <= 1'b1;
      tags[idx_of(fill_addr)]  <= tag_of(fill_addr);
    end
  end

  always_ff @(posedge clk) begin
    if (fill_done) begin
      for (int w = 0; w < BW; w++)
        data[{idx_of(fill_addr), $clog2(BW)'(w)}] <= got ? fill_buf[w] : mem_rd_data[w];
    end else if (commit && !stall) begin
      for (int p = 0; p < NP; p++)
        if (req_valid[p] && req_we[p] && rsp_hit[p]) data[widx_of(req_addr[p])] <= req_wdata[p];
    end
    // A store in the cycle a block arrives writes the array too, unless it
    // hit the line being replaced.
    if (fill_done && commit && !stall) begin
      for (int p = 0; p < NP; p++)
        if (req_valid[p] && req_we[p] && rsp_hit[p] && idx_of(req_addr[p]) != idx_of(fill_addr))
          data[widx_of(req_addr[p])] <= req_wdata[p];
    end
  end

  a_mem_valid_req: assert property (@(posedge clk) disable iff (!rst_n)
    mem_rd_valid |-> mem_rd_req);
endmodule

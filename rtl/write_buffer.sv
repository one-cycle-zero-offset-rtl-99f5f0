// write_buffer: merging write buffer between the write-through data cache
// and memory.
//
// ENTRIES entries, each one cache block of BLOCK_WORDS words with a
// per-word valid mask.  A store whose block is already held by an entry
// merges into it; otherwise it takes a new entry at the tail.  Entries
// drain in order of allocation, one block write per memory handshake
// (mem_wr_req held until mem_wr_ack).  The entry being drained (always
// entry 0) takes no more merges, so a store to that block opens a new
// entry.  The entry count, the block size and merging follow the design;
// the drain order, the lock on the draining entry and the handshake are
// this design's choices.
//
// Up to NP stores arrive per cycle (push_valid, in program order).
// push_ready says whether all of this cycle's stores fit; they are
// entered only when push_commit is also high.  blk_match reports whether
// any entry holds the block of match_addr, which the cache checks before
// it fetches a block from memory.
module write_buffer
  import zo_pkg::*;
#(
  parameter int unsigned ENTRIES     = 8,
  parameter int unsigned BLOCK_WORDS = 4,
  parameter int unsigned NP          = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  logic                push_valid [NP],
  input  logic [ADDR_W-1:0]   push_addr  [NP],
  input  word_t               push_data  [NP],
  input  logic                push_commit,
  output logic                push_ready,
  input  logic [ADDR_W-1:0]   match_addr,
  output logic                blk_match,
  output logic                empty,
  output logic                mem_wr_req,
  output logic [ADDR_W-1:0]   mem_wr_addr,
  output word_t               mem_wr_data [BLOCK_WORDS],
  output logic [BLOCK_WORDS-1:0] mem_wr_mask,
  input  logic                mem_wr_ack
);
  localparam int unsigned OFF = $clog2(BLOCK_WORDS * (XLEN / 8));
  localparam int unsigned WOFF = $clog2(XLEN / 8);
  localparam int unsigned CW = $clog2(ENTRIES + 1);
  typedef logic [ADDR_W-OFF-1:0] blk_t;

  typedef struct packed {
    blk_t                   blk;
    logic [BLOCK_WORDS-1:0] mask;
    word_t [BLOCK_WORDS-1:0] data;
  } entry_t;

  entry_t        ent   [ENTRIES];
  logic [CW-1:0] count;

  entry_t        ent_n [ENTRIES];
  logic [CW-1:0] count_n;
  logic          fits;

  assign empty       = (count == '0);
  assign mem_wr_req  = !empty;
  assign mem_wr_addr = {ent[0].blk, OFF'(0)};
  assign mem_wr_mask = ent[0].mask;
  always_comb
    for (int w = 0; w < BLOCK_WORDS; w++) mem_wr_data[w] = ent[0].data[w];

  always_comb begin
    blk_match = 1'b0;
    for (int e = 0; e < ENTRIES; e++)
      if (CW'(e) < count && ent[e].blk == match_addr[ADDR_W-1:OFF]) blk_match = 1'b1;
  end

  // Next state: drain first, then enter this cycle's stores in order.
  always_comb begin
    logic merged;
    logic [$clog2(BLOCK_WORDS)-1:0] wi;
    merged  = 1'b0;
    wi      = '0;
    ent_n   = ent;
    count_n = count;
    fits    = 1'b1;
    if (mem_wr_ack && !empty) begin
      for (int e = 0; e < ENTRIES - 1; e++) ent_n[e] = ent[e+1];
      ent_n[ENTRIES-1] = '0;
      count_n = count - CW'(1);
    end
    for (int p = 0; p < NP; p++) begin
      merged = 1'b0;
      if (push_valid[p]) begin
        wi = push_addr[p][WOFF +: $clog2(BLOCK_WORDS)];
        // Entry 0 is being drained whenever the buffer is not empty.
        for (int e = 1; e < ENTRIES; e++) begin
          if (!merged && CW'(e) < count_n && ent_n[e].blk == push_addr[p][ADDR_W-1:OFF]) begin
            ent_n[e].mask[wi] = 1'b1;
            ent_n[e].data[wi] = push_data[p];
            merged = 1'b1;
          end
        end
        if (!merged) begin
          if (count_n == CW'(ENTRIES)) begin
            fits = 1'b0;
          end else begin
            for (int e = 0; e < ENTRIES; e++) begin
              if (CW'(e) == count_n) begin
                ent_n[e].blk  = push_addr[p][ADDR_W-1:OFF];
                ent_n[e].mask = '0;
                ent_n[e].mask[wi] = 1'b1;
                ent_n[e].data[wi] = push_data[p];
              end
            end
            count_n = count_n + CW'(1);
          end
        end
      end
    end
  end

  // Readiness does not depend on the drain of this cycle.
  always_comb begin
    int unsigned need;
    need = 0;
    for (int p = 0; p < NP; p++) if (push_valid[p]) need++;
    push_ready = (int'(count) + int'(need) <= int'(ENTRIES)) || fits;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      count <= '0;
      for (int e = 0; e < ENTRIES; e++) ent[e] <= '0;
    end else begin
      if (push_commit && push_ready) begin
        ent   <= ent_n;
        count <= count_n;
      end else if (mem_wr_ack && !empty) begin
        for (int e = 0; e < ENTRIES - 1; e++) ent[e] <= ent[e+1];
        ent[ENTRIES-1] <= '0;
        count <= count - CW'(1);
      end
    end
  end

  // The memory side must not acknowledge a write that was not requested.
  a_ack_req: assert property (@(posedge clk) disable iff (!rst_n) mem_wr_ack |-> mem_wr_req);
endmodule

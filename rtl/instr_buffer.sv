// instr_buffer: the instruction buffers of the D stage.
//
// ENTRIES half-cache-block buffers (two in the two-way model, four in the
// four-way model) hold fetched blocks in fetch order.  When the I stage is
// empty it takes the oldest aligned group of W instructions: the whole
// oldest block when W = 4, or its first or second aligned pair when W = 2
// (an aligned group with no valid instruction is skipped).  A block leaves
// the buffers when its last group has been taken.  `flush` empties the
// buffers after a misprediction.  Entry count and the aligned hand-over
// follow the design; the FIFO organisation is this design's choice.
//
// Interface: push_valid/push_slots enter a block when push_ready (not
// full).  out_valid/out_slots present the next group; `pop` takes it.
module instr_buffer
  import zo_pkg::*;
#(
  parameter int unsigned ENTRIES = 4,
  parameter int unsigned W       = 4
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   flush,
  input  logic   push_valid,
  input  fslot_t push_slots [FETCH_N],
  output logic   push_ready,
  output logic   out_valid,
  output fslot_t out_slots [W],
  input  logic   pop
);
  localparam int unsigned NSG = FETCH_N / W;       // aligned groups per block
  localparam int unsigned PW  = (ENTRIES > 1) ? $clog2(ENTRIES) : 1;
  localparam int unsigned CW  = $clog2(ENTRIES + 1);
  localparam int unsigned SW  = (NSG > 1) ? $clog2(NSG) : 1;

  fslot_t        ent [ENTRIES][FETCH_N];
  logic [PW-1:0] head, tail;
  logic [CW-1:0] count;
  logic [SW-1:0] sg;

  logic [SW-1:0] sel;       // group handed over this cycle
  logic          more;      // a later nonempty group remains in the block
  logic          found;     // the head block still has a nonempty group
  always_comb begin
    found = 1'b0;
    sel   = sg;
    more  = 1'b0;
    for (int g = 0; g < NSG; g++) begin
      logic any;
      any = 1'b0;
      for (int i = 0; i < W; i++) any |= ent[head][g * W + i].valid;
      if (g >= int'(sg) && any) begin
        if (!found) begin
          found = 1'b1;
          sel   = SW'(g);
        end else begin
          more = 1'b1;
        end
      end
    end
    out_valid = (count != '0) && found;
    for (int i = 0; i < W; i++) out_slots[i] = ent[head][int'(sel) * W + i];
  end

  assign push_ready = (count != CW'(ENTRIES));

  logic do_push, do_pop_blk;
  assign do_push    = push_valid && push_ready;
  assign do_pop_blk = (count != '0) && ((pop && out_valid && !more) || !found);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      sg    <= '0;
      for (int e = 0; e < ENTRIES; e++)
        for (int i = 0; i < FETCH_N; i++) ent[e][i] <= '0;
    end else if (flush) begin
      head  <= '0;
      tail  <= '0;
      count <= '0;
      sg    <= '0;
    end else begin
      if (do_push) begin
        for (int i = 0; i < FETCH_N; i++) ent[tail][i] <= push_slots[i];
        tail <= (tail == PW'(ENTRIES - 1)) ? '0 : tail + PW'(1);
      end
      if (do_pop_blk) begin
        head <= (head == PW'(ENTRIES - 1)) ? '0 : head + PW'(1);
        sg   <= '0;
      end else if (pop && out_valid) begin
        sg   <= sel + SW'(1);
      end
      count <= count + CW'(do_push) - CW'(do_pop_blk);
    end
  end

  a_pop_valid: assert property (@(posedge clk) disable iff (!rst_n) pop |-> out_valid);
endmodule

// branch_predictor: table of 2-bit saturating counters, direct mapped and
// without tags.
//
// ENTRIES counters are indexed by the word address of a branch
// (pc[2 +: log2(ENTRIES)]).  A counter value of 2 or 3 predicts taken.
// NPRED lookups are served per cycle (one in the two-way model, two in the
// four-way model) and NUPD resolved conditional branches update the table
// per cycle, incrementing on taken and decrementing on not taken.  Lookups
// are combinational; updates take effect at the clock edge.  The table
// size, the organisation and the prediction counts follow the design; the
// reset value (weakly not taken) and the update ports are this design's
// choices.
module branch_predictor
  import zo_pkg::*;
#(
  parameter int unsigned ENTRIES = 256,
  parameter int unsigned NPRED   = 2,
  parameter int unsigned NUPD    = 2
) (
  input  logic clk,
  input  logic rst_n,
  input  pc_t  lookup_pc    [NPRED],
  output logic lookup_taken [NPRED],
  input  logic upd_valid    [NUPD],
  input  pc_t  upd_pc       [NUPD],
  input  logic upd_taken    [NUPD]
);
  localparam int unsigned IW = $clog2(ENTRIES);
  logic [1:0] ctr [ENTRIES];

  always_comb
    for (int i = 0; i < NPRED; i++)
      lookup_taken[i] = ctr[lookup_pc[i][2 +: IW]][1];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int e = 0; e < ENTRIES; e++) ctr[e] <= 2'b01;
    end else begin
      for (int u = 0; u < NUPD; u++) begin
        if (upd_valid[u]) begin
          if (upd_taken[u] && ctr[upd_pc[u][2 +: IW]] != 2'b11)
            ctr[upd_pc[u][2 +: IW]] <= ctr[upd_pc[u][2 +: IW]] + 2'b01;
          else if (!upd_taken[u] && ctr[upd_pc[u][2 +: IW]] != 2'b00)
            ctr[upd_pc[u][2 +: IW]] <= ctr[upd_pc[u][2 +: IW]] - 2'b01;
        end
      end
    end
  end
endmodule

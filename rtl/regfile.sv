// regfile: integer register file, written in the WR stage.
//
// NREGS x XLEN registers with NR read ports (two per issue slot) and NW
// write ports (one per issue slot).  Register 31 reads as zero.  A write
// is visible to a read of the same cycle (write-through), so an operand
// written in WR is read correctly by an instruction issued in that cycle.
// When several ports write the same register in one cycle the highest
// numbered port, which carries the youngest instruction, wins.  Port
// counts follow the issue width; write-through and the port priority are
// this design's choices.
module regfile
  import zo_pkg::*;
#(
  parameter int unsigned NR = 8,
  parameter int unsigned NW = 4
) (
  input  logic         clk,
  input  logic         rst_n,
  input  reg_t         raddr [NR],
  output word_t        rdata [NR],
  input  logic         we    [NW],
  input  reg_t         waddr [NW],
  input  word_t        wdata [NW]
);
  word_t regs [NREGS];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int r = 0; r < NREGS; r++) regs[r] <= '0;
    end else begin
      for (int p = 0; p < NW; p++)
        if (we[p] && waddr[p] != 5'd31) regs[waddr[p]] <= wdata[p];
    end
  end

  always_comb begin
    for (int q = 0; q < NR; q++) begin
      rdata[q] = regs[raddr[q]];
      for (int p = 0; p < NW; p++)
        if (we[p] && waddr[p] == raddr[q]) rdata[q] = wdata[p];
      if (raddr[q] == 5'd31) rdata[q] = '0;
    end
  end
endmodule

// icache: perfect instruction cache.
//
// The processor model assumes an instruction cache that always hits, so it
// is built as an instruction store of WORDS 32-bit words that returns the
// four aligned instructions of the half cache block holding fetch_pc in the
// same cycle.  Addresses past the store read as zero, which encodes NOP.  A
// write port (prog_*) loads the program before reset is released; it has
// no counterpart in the design and exists only to fill the store.
module icache
  import zo_pkg::*;
#(
  parameter int unsigned WORDS = 4096
) (
  input  logic        clk,
  input  pc_t         fetch_pc,
  output logic [31:0] fetch_insn [FETCH_N],
  input  logic        prog_we,
  input  pc_t         prog_addr,
  input  logic [31:0] prog_data
);
  localparam int unsigned AW = $clog2(WORDS);
  logic [31:0] mem [WORDS];

  always_ff @(posedge clk)
    if (prog_we) mem[prog_addr[2 +: AW]] <= prog_data;

  always_comb begin
    for (int i = 0; i < FETCH_N; i++) begin
      logic [AW-1:0] wa;
      wa = {fetch_pc[2 +: AW] & ~AW'(FETCH_N - 1)} | AW'(i);
      fetch_insn[i] = (fetch_pc[PC_W-1:2] < (PC_W-2)'(WORDS)) ? mem[wa] : 32'd0;
    end
  end
endmodule

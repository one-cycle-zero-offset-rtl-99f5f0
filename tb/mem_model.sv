// mem_model: behavioural main memory for the testbenches (not part of the
// design).  WORDS XLEN-bit words.  A block read request is answered one
// cycle later with mem_rd_valid for one cycle; a block write is performed
// and acknowledged one cycle after it is requested.  ld_* writes single
// words to set up the initial contents.  The processor's
// cache adds the rest of the miss latency.
module mem_model
  import zo_pkg::*;
#(
  parameter int unsigned WORDS = 8192,
  parameter int unsigned BW    = 4
) (
  input  logic              clk,
  input  logic              rst_n,
  input  logic              rd_req,
  input  logic [ADDR_W-1:0] rd_addr,
  output logic              rd_valid,
  output word_t             rd_data [BW],
  input  logic              wr_req,
  input  logic [ADDR_W-1:0] wr_addr,
  input  word_t             wr_data [BW],
  input  logic [BW-1:0]     wr_mask,
  output logic              wr_ack,
  // initial contents, one word per cycle
  input  logic              ld_we,
  input  logic [ADDR_W-1:0] ld_addr,
  input  word_t             ld_data
);
  localparam int unsigned AW = $clog2(WORDS);
  word_t mem [WORDS];
  int unsigned writes;

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      rd_valid <= 1'b0;
      wr_ack   <= 1'b0;
      writes   <= 0;
      for (int w = 0; w < BW; w++) rd_data[w] <= '0;
    end else begin
      rd_valid <= rd_req && !rd_valid;
      if (rd_req)
        for (int w = 0; w < BW; w++) rd_data[w] <= mem[(AW'(rd_addr >> 3) & ~AW'(BW - 1)) | AW'(w)];
      wr_ack <= wr_req && !wr_ack;
      if (ld_we) mem[AW'(ld_addr >> 3)] <= ld_data;
      if (wr_req && wr_ack) begin
        writes <= writes + 1;
        for (int w = 0; w < BW; w++)
          if (wr_mask[w]) mem[(AW'(wr_addr >> 3) & ~AW'(BW - 1)) | AW'(w)] <= wr_data[w];
      end
    end
  end
endmodule

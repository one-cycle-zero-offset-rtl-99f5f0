// tb_regfile: random writes and reads against a shadow copy; checks that a
// write is visible to a read in the same cycle, that register 31 reads as
// zero, and that the highest write port wins a same-register collision.
module tb_regfile;
  import zo_pkg::*;
  localparam int NR = 8, NW = 4;
  logic clk = 0, rst_n = 0;
  reg_t  raddr [NR];
  word_t rdata [NR];
  logic  we    [NW];
  reg_t  waddr [NW];
  word_t wdata [NW];
  word_t shadow [32];
  int checks = 0, failures = 0;

  regfile #(.NR(NR), .NW(NW)) dut (.clk, .rst_n, .raddr, .rdata, .we, .waddr, .wdata);
  always #5 clk = ~clk;

  initial begin
    for (int r = 0; r < 32; r++) shadow[r] = '0;
    for (int p = 0; p < NW; p++) begin we[p] = 0; waddr[p] = 0; wdata[p] = 0; end
    for (int q = 0; q < NR; q++) raddr[q] = 0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int n = 0; n < 2000; n++) begin
      @(negedge clk);
      for (int p = 0; p < NW; p++) begin
        we[p]    = ($urandom % 2) == 0;
        waddr[p] = reg_t'((n % 50 == 0) ? 5 : $urandom % 32);
        wdata[p] = {$urandom, $urandom};
      end
      for (int q = 0; q < NR; q++) raddr[q] = reg_t'($urandom % 32);
      if (n % 50 == 0) raddr[0] = 5'd5;
      #1;
      for (int q = 0; q < NR; q++) begin
        word_t exp;
        exp = shadow[raddr[q]];
        for (int p = 0; p < NW; p++) if (we[p] && waddr[p] == raddr[q]) exp = wdata[p];
        if (raddr[q] == 5'd31) exp = '0;
        checks++;
        if (rdata[q] !== exp) begin
          failures++;
          if (failures < 5) $display("FAIL r%0d = %h, expected %h", raddr[q], rdata[q], exp);
        end
      end
      for (int p = 0; p < NW; p++) if (we[p] && waddr[p] != 5'd31) shadow[waddr[p]] = wdata[p];
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

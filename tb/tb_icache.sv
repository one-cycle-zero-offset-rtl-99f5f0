// tb_icache: loads a program and checks that every fetch address returns
// the four instructions of its aligned half block in the same cycle.
module tb_icache;
  import zo_pkg::*;
  localparam int WORDS = 256;
  logic clk = 0;
  pc_t  fetch_pc;
  logic [31:0] fetch_insn [FETCH_N];
  logic prog_we = 0;
  pc_t  prog_addr = 0;
  logic [31:0] prog_data = 0;
  int checks = 0, failures = 0;

  icache #(.WORDS(WORDS)) dut (.clk, .fetch_pc, .fetch_insn, .prog_we, .prog_addr, .prog_data);
  always #5 clk = ~clk;

  function automatic logic [31:0] word_at(int i);
    return 32'(i) * 32'h0101_0007 + 32'h1234;
  endfunction

  initial begin
    fetch_pc = 0;
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk);
      prog_we = 1; prog_addr = pc_t'(4 * i); prog_data = word_at(i);
    end
    @(negedge clk);
    prog_we = 0;
    for (int n = 0; n < 600; n++) begin
      int base;
      fetch_pc = pc_t'(($urandom % (WORDS + 16)) * 4);
      #1;
      base = int'(fetch_pc >> 2) & ~3;
      for (int i = 0; i < FETCH_N; i++) begin
        checks++;
        if (fetch_insn[i] !== ((base + i < WORDS) ? word_at(base + i) : 32'd0)) begin
          failures++;
          if (failures < 5) $display("FAIL pc=%h slot %0d = %h", fetch_pc, i, fetch_insn[i]);
        end
      end
      #4;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #200000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// alu: one-cycle integer functional unit of the ALU stage.
//
// Computes arithmetic and logic results, effective addresses (a + imm) and
// branch conditions, all in one cycle, as the ALU stage does.  The
// processor holds one ALU per issue slot.  The operation set (adds, shifts,
// compares and the scaled adds S4ADD/S8ADD used for array subscripts) is
// this design's choice, modelled on the instructions the address
// arithmetic of integer codes uses.
//
// Interface: purely combinational.  fn selects y; bcond tests a for the
// branch decision `taken` (BC_ALWAYS for unconditional transfers).
module alu
  import zo_pkg::*;
(
  input  alu_fn_e fn,
  input  bcond_e  bcond,
  input  word_t   a,
  input  word_t   b,
  output word_t   y,
  output logic    taken
);
  always_comb begin
    unique case (fn)
      FN_ADD:    y = a + b;
      FN_SUB:    y = a - b;
      FN_AND:    y = a & b;
      FN_OR:     y = a | b;
      FN_XOR:    y = a ^ b;
      FN_SLL:    y = a << b[5:0];
      FN_SRL:    y = a >> b[5:0];
      FN_SRA:    y = word_t'($signed(a) >>> b[5:0]);
      FN_CMPEQ:  y = word_t'(a == b);
      FN_CMPLT:  y = word_t'($signed(a) < $signed(b));
      FN_CMPULT: y = word_t'(a < b);
      FN_S4ADD:  y = (a << 2) + b;
      FN_S8ADD:  y = (a << 3) + b;
      FN_PASSB:  y = b;
      default:   y = '0;
    endcase
  end

  always_comb begin
    unique case (bcond)
      BC_EQ:     taken = (a == '0);
      BC_NE:     taken = (a != '0);
      BC_LT:     taken = a[XLEN-1];
      BC_GE:     taken = !a[XLEN-1];
      BC_ALWAYS: taken = 1'b1;
      default:   taken = 1'b0;
    endcase
  end
endmodule

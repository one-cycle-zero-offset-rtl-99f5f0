// tb_alu: checks every ALU function and branch condition against values
// computed here from random and corner operands.
module tb_alu;
  import zo_pkg::*;
  alu_fn_e fn;
  bcond_e  bcond;
  word_t   a, b, y;
  logic    taken;
  int checks = 0, failures = 0;

  alu dut (.fn, .bcond, .a, .b, .y, .taken);

  function automatic word_t model(alu_fn_e f, word_t x, word_t z);
    case (f)
      FN_ADD:    return x + z;
      FN_SUB:    return x + ~z + 1;
      FN_AND:    return x & z;
      FN_OR:     return x | z;
      FN_XOR:    return x ^ z;
      FN_SLL:    return x * (64'd1 << z[5:0]);
      FN_SRL:    return x / (64'd1 << z[5:0]);
      FN_SRA:    begin
                   word_t r; r = x;
                   for (int k = 0; k < int'(z[5:0]); k++) r = {r[63], r[63:1]};
                   return r;
                 end
      FN_CMPEQ:  return (x == z) ? 64'd1 : 64'd0;
      FN_CMPLT:  return ((x[63] && !z[63]) || (x[63] == z[63] && x < z)) ? 64'd1 : 64'd0;
      FN_CMPULT: return (x < z) ? 64'd1 : 64'd0;
      FN_S4ADD:  return x * 4 + z;
      FN_S8ADD:  return x * 8 + z;
      FN_PASSB:  return z;
      default:   return '0;
    endcase
  endfunction

  function automatic logic bmodel(bcond_e c, word_t x);
    case (c)
      BC_EQ: return x == 0;
      BC_NE: return x != 0;
      BC_LT: return x[63];
      BC_GE: return !x[63];
      BC_ALWAYS: return 1'b1;
      default: return 1'b0;
    endcase
  endfunction

  initial begin
    word_t vals [6] = '{64'd0, 64'd1, 64'hFFFF_FFFF_FFFF_FFFF, 64'h8000_0000_0000_0000,
                        64'h7FFF_FFFF_FFFF_FFFF, 64'd63};
    for (int n = 0; n < 3000; n++) begin
      fn    = alu_fn_e'(n % 14);
      bcond = bcond_e'(n % 6);
      if (n < 14 * 36) begin
        a = vals[(n / 14) % 6];
        b = vals[(n / 84) % 6];
      end else begin
        a = {$urandom, $urandom};
        b = {$urandom, $urandom};
      end
      #1;
      checks++;
      if (y !== model(fn, a, b)) begin
        failures++;
        if (failures < 5) $display("FAIL fn=%s a=%h b=%h y=%h", fn.name(), a, b, y);
      end
      checks++;
      if (taken !== bmodel(bcond, a)) begin
        failures++;
        if (failures < 5) $display("FAIL bcond=%s a=%h taken=%b", bcond.name(), a, taken);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    #100000;
    failures++;
    $display("watchdog expired");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

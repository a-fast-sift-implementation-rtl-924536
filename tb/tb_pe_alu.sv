// tb_pe_alu: random self-check of the PE arithmetic/logic/shift unit against
// a reference written with SystemVerilog operators.
module tb_pe_alu;
  import simd_pkg::*;
  alu_op_e op; word_t a, b, y, exp_y;
  int checks = 0, failures = 0;
  pe_alu dut (.op(op), .a(a), .b(b), .y(y));

  function automatic word_t ref_alu(alu_op_e o, word_t x, word_t z);
    longint sx = longint'($signed(x));
    int sh = int'(z % 32);
    case (o)
      ALU_ADD:  return word_t'(longint'(x) + longint'(z));
      ALU_SUB:  return word_t'(longint'(x) - longint'(z));
      ALU_AND:  return x & z;
      ALU_OR:   return x | z;
      ALU_XOR:  return x ^ z;
      ALU_SHL:  return word_t'(longint'(x) * (64'd1 << sh));
      ALU_SHRA: return word_t'(sx / (64'sd1 <<< sh) - ((sx < 0 && (sx % (64'sd1 <<< sh)) != 0) ? 1 : 0));
      ALU_SHRL: return word_t'(longint'(x) / (64'd1 << sh));
      default:  return '0;
    endcase
  endfunction

  initial begin
    #100000; failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 4000; i++) begin
      op = alu_op_e'(i % 8);
      a = $urandom; b = (i % 3 == 0) ? word_t'($urandom % 32) : $urandom;
      if (i < 8) begin a = 32'h8000_0001; b = 32'd31; end
      #1;
      exp_y = ref_alu(op, a, b);
      checks++;
      if (y !== exp_y) begin
        failures++;
        if (failures < 10) $display("FAIL op=%s a=%h b=%h y=%h exp=%h", op.name(), a, b, y, exp_y);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

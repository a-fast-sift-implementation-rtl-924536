// pe_alu: arithmetic, logical and shift unit of a processing element.
//
// Purely combinational. It adds or subtracts, forms bitwise AND/OR/XOR, and
// shifts operand a by a barrel shifter (left, arithmetic right, logical
// right) by the low five bits of operand b. The published design lists an
// adder/subtractor and a barrel shifter in the PE data path; the logic
// operations come from the unit's name ("Arithmetic, Logical and Shift
// Unit"). The operation set and its encoding are this design's choice.
//
// Interface: op selects the operation, a and b are the operands, y is the
// result in the same cycle.
module pe_alu
  import simd_pkg::*;
(
  input  alu_op_e op,
  input  word_t   a,
  input  word_t   b,
  output word_t   y
);
  logic [4:0] shamt;
  assign shamt = b[4:0];

  always_comb begin
    unique case (op)
      ALU_ADD:  y = a + b;
      ALU_SUB:  y = a - b;
      ALU_AND:  y = a & b;
      ALU_OR:   y = a | b;
      ALU_XOR:  y = a ^ b;
      ALU_SHL:  y = a << shamt;
      ALU_SHRA: y = word_t'($signed(a) >>> shamt);
      ALU_SHRL: y = a >> shamt;
      default:  y = '0;
    endcase
  end
endmodule

// pe_decoder: instruction decoder of a processing element.
//
// Turns the broadcast instruction word into the control bundle of the PE
// (pe_ctrl_t). It is combinational and ignores the activity flag: the PE
// gates the write enables with it afterwards. An invalid cycle, a scalar
// opcode (these never leave the ACU) or an unknown opcode decodes as a NOP.
// The encoding is this design's own (see simd_pkg).
module pe_decoder
  import simd_pkg::*;
(
  input  logic     valid,
  input  instr_t   instr,
  output pe_ctrl_t ctrl
);
  always_comb begin
    ctrl           = '0;
    ctrl.rd        = instr.rd;
    ctrl.ra        = instr.ra;
    ctrl.rb        = instr.rb;
    ctrl.wb_sel    = WB_ALU;
    ctrl.alu_op    = ALU_ADD;
    ctrl.mask_op   = MASK_NONE;
    ctrl.dir       = dir_e'(instr.imm[1:0]);
    ctrl.imm       = word_t'($signed(instr.imm));
    if (valid) begin
      unique case (instr.op)
        OP_ADD:  begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_ADD; end
        OP_SUB:  begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_SUB; end
        OP_AND:  begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_AND; end
        OP_OR:   begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_OR;  end
        OP_XOR:  begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_XOR; end
        OP_ADDI: begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_ADD;  ctrl.alu_b_imm = 1'b1; end
        OP_SHL:  begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_SHL;  ctrl.alu_b_imm = 1'b1; end
        OP_SHRA: begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_SHRA; ctrl.alu_b_imm = 1'b1; end
        OP_SHRL: begin ctrl.rf_we = 1'b1; ctrl.alu_op = ALU_SHRL; ctrl.alu_b_imm = 1'b1; end
        OP_LI:   begin ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_IMM; end
        OP_MUL:  begin ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_MACC; ctrl.macc_en = 1'b1; end
        OP_MAC:  begin ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_MACC; ctrl.macc_en = 1'b1;
                       ctrl.macc_acc = 1'b1; end
        OP_LD:   begin ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_MEM; end
        OP_ST:   ctrl.mem_we = 1'b1;
        OP_COMM: begin ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_COMM; end
        OP_WAKE: ctrl.mask_op = MASK_WAKE;
        OP_MGTZ: ctrl.mask_op = MASK_GTZ;
        OP_MLTZ: ctrl.mask_op = MASK_LTZ;
        OP_MEQZ: ctrl.mask_op = MASK_EQZ;
        OP_MINV: ctrl.mask_op = MASK_INV;
        OP_SAMPLE: ctrl.sample = 1'b1;
        OP_PIX:  begin ctrl.rf_we = 1'b1; ctrl.wb_sel = WB_PIX; end
        OP_OUT:  ctrl.out_we = 1'b1;
        default: ;
      endcase
    end
  end
endmodule

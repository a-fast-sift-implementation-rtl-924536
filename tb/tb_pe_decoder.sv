// tb_pe_decoder: every opcode is decoded and its control fields compared with
// a table written from the instruction list; invalid cycles and scalar
// opcodes must decode to no action.
module tb_pe_decoder;
  import simd_pkg::*;
  logic valid;
  instr_t instr;
  pe_ctrl_t ctrl;
  int checks = 0, failures = 0;
  pe_decoder dut (.*);

  task automatic expect_eq(string what, int got, int exp);
    checks++;
    if (got != exp) begin
      failures++;
      $display("FAIL %s op=%s got=%0d exp=%0d", what, instr.op.name(), got, exp);
    end
  endtask

  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int o = 0; o < 64; o++) begin
      for (int v = 0; v < 2; v++) begin
        int we, wbs, aop, bimm, men, mac, mwe, smp, owe, mop;
        valid = v[0];
        instr = mk_instr(opcode_e'(o), $urandom % 16, $urandom % 16, $urandom % 16, $urandom % 16384);
        #1;
        we = 0; wbs = -1; aop = -1; bimm = 0; men = 0; mac = 0; mwe = 0; smp = 0; owe = 0; mop = 0;
        if (v) case (o)
          1: begin we = 1; wbs = 0; aop = 0; end
          2: begin we = 1; wbs = 0; aop = 1; end
          3: begin we = 1; wbs = 0; aop = 2; end
          4: begin we = 1; wbs = 0; aop = 3; end
          5: begin we = 1; wbs = 0; aop = 4; end
          6: begin we = 1; wbs = 0; aop = 0; bimm = 1; end
          7: begin we = 1; wbs = 1; end
          8: begin we = 1; wbs = 0; aop = 5; bimm = 1; end
          9: begin we = 1; wbs = 0; aop = 6; bimm = 1; end
          10: begin we = 1; wbs = 0; aop = 7; bimm = 1; end
          11: begin we = 1; wbs = 2; men = 1; end
          12: begin we = 1; wbs = 2; men = 1; mac = 1; end
          16: begin we = 1; wbs = 3; end
          17: mwe = 1;
          20: begin we = 1; wbs = 4; end
          24: mop = 1;
          25: mop = 2;
          26: mop = 3;
          27: mop = 4;
          28: mop = 5;
          32: smp = 1;
          33: begin we = 1; wbs = 5; end
          34: owe = 1;
          default: ;
        endcase
        expect_eq("rf_we", int'(ctrl.rf_we), we);
        if (wbs >= 0) expect_eq("wb_sel", int'(ctrl.wb_sel), wbs);
        if (aop >= 0) expect_eq("alu_op", int'(ctrl.alu_op), aop);
        if (we) expect_eq("alu_b_imm", int'(ctrl.alu_b_imm), bimm);
        expect_eq("macc_en", int'(ctrl.macc_en), men);
        if (men) expect_eq("macc_acc", int'(ctrl.macc_acc), mac);
        expect_eq("mem_we", int'(ctrl.mem_we), mwe);
        expect_eq("sample", int'(ctrl.sample), smp);
        expect_eq("out_we", int'(ctrl.out_we), owe);
        expect_eq("mask_op", int'(ctrl.mask_op), mop);
        expect_eq("rd", int'(ctrl.rd), int'(instr.rd));
        expect_eq("ra", int'(ctrl.ra), int'(instr.ra));
        expect_eq("imm", int'(ctrl.imm), int'($signed(instr.imm)));
        expect_eq("dir", int'(ctrl.dir), int'(instr.imm[1:0]));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

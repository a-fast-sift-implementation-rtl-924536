// tb_pe: one PE driven by a random stream of vector instructions, with random
// neighbour values and detector inputs, compared every cycle with the
// instruction-level reference model. The value the PE sends on the network
// exposes register ra of each instruction, so register contents are checked
// continuously; SP output and activity flag are checked too.
module tb_pe;
  import simd_pkg::*;
  import simd_ref_pkg::*;
  localparam int unsigned MEM_WORDS = 256, NPIX = 16;
  logic clk = 0, rst_n = 0, valid = 0;
  instr_t instr;
  word_t net_tx, sp_out;
  word_t nbr_in [4];
  pix_t det_in [NPIX];
  pix_t det_flat [];
  logic sp_valid, active;
  int checks = 0, failures = 0;
  int n_sleep_cycles = 0, n_comm = 0, n_mac = 0;
  simd_model m;
  opcode_e ops [] = '{OP_ADD, OP_SUB, OP_AND, OP_OR, OP_XOR, OP_ADDI, OP_LI, OP_SHL, OP_SHRA,
                      OP_SHRL, OP_MUL, OP_MAC, OP_LD, OP_ST, OP_COMM, OP_WAKE, OP_MGTZ, OP_MLTZ,
                      OP_MEQZ, OP_MINV, OP_SAMPLE, OP_PIX, OP_OUT, OP_NOP, OP_LI, OP_ST, OP_LD,
                      OP_WAKE, OP_OUT};

  pe #(.MEM_WORDS(MEM_WORDS), .NPIX(NPIX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m = new(1, 1, MEM_WORDS, NPIX);
    m.use_ext = 1;
    det_flat = new[NPIX];
    instr = '0;
    foreach (nbr_in[k]) nbr_in[k] = '0;
    foreach (det_in[k]) det_in[k] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Fill the memory so every later load reads a defined word.
    for (int a = 0; a < MEM_WORDS; a++) begin
      @(negedge clk);
      valid = 1; instr = mk_instr(OP_ST, 0, 0, 0, a);
      @(posedge clk); m.step(instr, det_flat);
    end
    for (int n = 0; n < 20000; n++) begin
      @(negedge clk);
      valid = ($urandom % 16) != 0;
      instr = mk_instr(ops[$urandom % ops.size()], $urandom % 16, $urandom % 16, $urandom % 16,
                       $urandom % 16384);
      if (instr.op == OP_LI || instr.op == OP_ADDI) instr.imm = 14'($signed(int'($urandom % 200) - 100));
      foreach (nbr_in[k]) nbr_in[k] = $urandom;
      foreach (det_in[k]) det_in[k] = pix_t'($urandom);
      if (instr.op == OP_PIX) instr.imm = 14'($urandom % 20);
      #1;
      checks++;
      if (net_tx !== m.rf[0][instr.ra]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d net_tx r%0d=%h exp %h", n, instr.ra, net_tx, m.rf[0][instr.ra]);
      end
      foreach (nbr_in[k]) m.ext_nbr[k] = nbr_in[k];
      foreach (det_in[k]) det_flat[k] = det_in[k];
      @(posedge clk);
      if (valid) begin
        if (instr.op == OP_COMM && m.act[0]) n_comm++;
        if (instr.op == OP_MAC && m.act[0]) n_mac++;
        m.step(instr, det_flat);
      end
      if (!m.act[0]) n_sleep_cycles++;
      #1;
      checks += 3;
      if (sp_out !== m.sp[0] || sp_valid !== m.spv[0] || active !== m.act[0]) begin
        failures++;
        if (failures < 10) $display("FAIL n=%0d op=%s sp=%h/%h v=%0d/%0d act=%0d/%0d", n, instr.op.name(),
                                    sp_out, m.sp[0], sp_valid, m.spv[0], active, m.act[0]);
      end
    end
    checks++;
    if (n_sleep_cycles == 0 || n_comm == 0 || n_mac == 0) begin
      failures++; $display("FAIL coverage sleep=%0d comm=%0d mac=%0d", n_sleep_cycles, n_comm, n_mac);
    end
    $display("coverage: sleep cycles=%0d comm=%0d mac=%0d", n_sleep_cycles, n_comm, n_mac);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

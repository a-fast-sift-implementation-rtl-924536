// tb_pe_array: a 3 x 4 torus (not square, so rows and columns cannot be
// confused) runs a random instruction stream rich in COMM in all four
// directions, OUT and MASK instructions. After every cycle the SP outputs
// and activity flags of all PEs are compared with the reference model, which
// wires the torus independently. Transfers that wrap around the array edge
// are counted and must occur.
module tb_pe_array;
  import simd_pkg::*;
  import simd_ref_pkg::*;
  localparam int unsigned ROWS = 3, COLS = 4, MEM_WORDS = 64, NPIX = 16, N = ROWS*COLS;
  logic clk = 0, rst_n = 0, valid = 0;
  instr_t instr;
  pix_t det_in [N][NPIX];
  pix_t det_flat [];
  word_t sp_out [N];
  logic sp_valid [N], active [N];
  int checks = 0, failures = 0, n_wrap = 0, n_sleep = 0;
  simd_model m;
  opcode_e ops [] = '{OP_COMM, OP_COMM, OP_COMM, OP_OUT, OP_OUT, OP_ADD, OP_SUB, OP_ADDI, OP_LI,
                      OP_LI, OP_MAC, OP_MUL, OP_SHRA, OP_LD, OP_ST, OP_PIX, OP_SAMPLE, OP_WAKE,
                      OP_WAKE, OP_MGTZ, OP_MLTZ, OP_MINV, OP_XOR};

  pe_array #(.ROWS(ROWS), .COLS(COLS), .MEM_WORDS(MEM_WORDS), .NPIX(NPIX)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (200000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  initial begin
    m = new(ROWS, COLS, MEM_WORDS, NPIX);
    det_flat = new[N*NPIX];
    instr = '0;
    for (int p = 0; p < N; p++) for (int k = 0; k < NPIX; k++) det_in[p][k] = pix_t'(p*16 + k);
    repeat (2) @(posedge clk);
    rst_n = 1;
    // Clear the local memories, then load each PE's own index into r1 (SAMPLE + PIX of pixel 0) so COMM results identify the sender.
    for (int n = -2 - MEM_WORDS; n < 8000; n++) begin
      @(negedge clk);
      valid = 1;
      if (n < -2) instr = mk_instr(OP_ST, 0, 0, 0, n + 2 + MEM_WORDS);  // clear the memories
      else if (n == -2) instr = mk_instr(OP_SAMPLE);
      else if (n == -1) instr = mk_instr(OP_PIX, 1, 0, 0, 0);
      else begin
        instr = mk_instr(ops[$urandom % ops.size()], $urandom % 16, $urandom % 16, $urandom % 16,
                         $urandom % 16384);
        if (instr.op == OP_LI || instr.op == OP_ADDI) instr.imm = 14'($signed(int'($urandom % 64) - 32));
        if (instr.op == OP_PIX) instr.imm = 14'($urandom % NPIX);
        if (n % 50 == 0) instr = mk_instr(OP_WAKE);
        if (instr.op == OP_SAMPLE)
          for (int p = 0; p < N; p++) for (int k = 0; k < NPIX; k++) det_in[p][k] = pix_t'($urandom);
      end
      for (int p = 0; p < N; p++) for (int k = 0; k < NPIX; k++) det_flat[p*NPIX + k] = det_in[p][k];
      @(posedge clk);
      if (instr.op == OP_COMM)
        for (int p = 0; p < N; p++) begin
          int r, c, d;
          r = p / COLS; c = p % COLS; d = int'(instr.imm[1:0]);
          if (m.act[p] && ((d == 0 && r == 0) || (d == 2 && r == ROWS-1) ||
                           (d == 1 && c == COLS-1) || (d == 3 && c == 0))) n_wrap++;
        end
      m.step(instr, det_flat);
      #1;
      for (int p = 0; p < N; p++) begin
        if (!m.act[p]) n_sleep++;
        checks++;
        if (sp_out[p] !== m.sp[p] || sp_valid[p] !== m.spv[p] || active[p] !== m.act[p]) begin
          failures++;
          if (failures < 10) $display("FAIL n=%0d pe=%0d op=%s sp=%h/%h act=%0d/%0d", n, p,
                                      instr.op.name(), sp_out[p], m.sp[p], active[p], m.act[p]);
        end
      end
    end
    checks++;
    if (n_wrap == 0 || n_sleep == 0) begin failures++; $display("FAIL coverage"); end
    $display("coverage: wrap-around transfers=%0d sleeping PE-cycles=%0d", n_wrap, n_sleep);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

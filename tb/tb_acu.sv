// tb_acu: loads a program with nested counted loops, runs it, and compares
// the broadcast vector instructions, in order, with the reference ACU. It
// also checks the issue rate: one instruction, scalar or vector, per cycle,
// so start-to-done takes exactly (vector + scalar) cycles; and that nothing
// is broadcast before start or after HALT. The program is run twice to check
// restart.
module tb_acu;
  import simd_pkg::*;
  import simd_ref_pkg::*;
  localparam int unsigned DEPTH = 256;
  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, busy, done, bcast_valid;
  logic [7:0] prog_addr = 0;
  instr_t prog_data = '0, bcast_instr;
  instr_t prog [];
  instr_t exp_q [$];
  int n_scalar, checks = 0, failures = 0;

  acu #(.PROG_DEPTH(DEPTH)) dut (.*);
  always #5 clk = ~clk;

  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  task automatic check(bit cond, string msg);
    checks++;
    if (!cond) begin failures++; $display("FAIL %s", msg); end
  endtask

  initial begin
    instr_t p [$];
    // s1 = 3: outer loop; s2 = 4: inner loop; vector instructions tag the
    // iteration in their immediates.
    p.push_back(mk_instr(OP_SLI, 1, 0, 0, 3));
    p.push_back(mk_instr(OP_LI, 1, 0, 0, 100));       // 1
    p.push_back(mk_instr(OP_SLI, 2, 0, 0, 4));        // 2: outer body
    p.push_back(mk_instr(OP_ADDI, 2, 2, 0, 1));       // 3: inner body
    p.push_back(mk_instr(OP_COMM, 3, 2, 0, 1));       // 4
    p.push_back(mk_instr(OP_SADDI, 2, 0, 0, -1));     // 5
    p.push_back(mk_instr(OP_SBNZ, 0, 2, 0, 3));       // 6
    p.push_back(mk_instr(OP_OUT, 0, 2, 0, 0));        // 7
    p.push_back(mk_instr(OP_SADDI, 1, 0, 0, -1));     // 8
    p.push_back(mk_instr(OP_SBNZ, 0, 1, 0, 2));       // 9
    p.push_back(mk_instr(OP_MINV));                   // 10
    p.push_back(mk_instr(OP_HALT));                   // 11
    p.push_back(mk_instr(OP_LI, 5, 0, 0, 7));         // never issued
    prog = new[DEPTH];
    foreach (prog[k]) prog[k] = mk_instr(OP_HALT);
    foreach (p[k]) prog[k] = p[k];
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int k = 0; k < p.size(); k++) begin
      @(negedge clk); prog_we = 1; prog_addr = 8'(k); prog_data = p[k];
    end
    @(negedge clk); prog_we = 0;
    repeat (3) @(posedge clk);
    check(!bcast_valid && !busy && !done, "idle before start");
    acu_run(prog, exp_q, n_scalar);
    $display("reference: %0d vector, %0d scalar instructions", exp_q.size(), n_scalar);
    for (int run = 0; run < 2; run++) begin
      int cyc, got;
      cyc = 0; got = 0;
      @(negedge clk); start = 1;
      @(negedge clk); start = 0;
      while (!done && cyc < 10000) begin
        @(posedge clk); #1;
        cyc++;
        if (bcast_valid) begin
          check(got < exp_q.size(), "too many broadcasts");
          if (got < exp_q.size())
            check(bcast_instr == exp_q[got], $sformatf("broadcast %0d: %h exp %h", got, bcast_instr, exp_q[got]));
          got++;
        end else begin
          check(bcast_instr == '0, "idle broadcast is not a NOP");
        end
      end
      check(got == exp_q.size(), $sformatf("broadcast count %0d exp %0d", got, exp_q.size()));
      check(cyc == exp_q.size() + n_scalar, $sformatf("cycles %0d exp %0d", cyc, exp_q.size() + n_scalar));
      repeat (5) begin
        @(posedge clk); #1;
        check(!bcast_valid && done && !busy, "quiet after HALT");
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

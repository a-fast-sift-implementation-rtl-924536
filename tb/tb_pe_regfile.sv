// tb_pe_regfile: random writes and two-port reads against a reference array.
module tb_pe_regfile;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0, we = 0;
  reg_idx_t ra = 0, rb = 0, wa = 0;
  word_t qa, qb, wd = 0;
  word_t model [16];
  int checks = 0, failures = 0;
  pe_regfile dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (model[i]) model[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      ra = reg_idx_t'($urandom); rb = reg_idx_t'($urandom);
      we = $urandom % 2; wa = reg_idx_t'($urandom); wd = $urandom;
      #1;
      checks += 2;
      if (qa !== model[ra]) begin failures++; $display("FAIL qa r%0d %h exp %h", ra, qa, model[ra]); end
      if (qb !== model[rb]) begin failures++; $display("FAIL qb r%0d %h exp %h", rb, qb, model[rb]); end
      @(posedge clk);
      if (we) model[wa] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pe_sp_io: the output register loads only when enabled, and the valid
// flag rises with the first load.
module tb_pe_sp_io;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0, we = 0, sp_valid;
  word_t wd = 0, sp_out, model = 0;
  logic mvalid = 0;
  int checks = 0, failures = 0;
  pe_sp_io dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 1000; i++) begin
      @(negedge clk);
      checks += 2;
      if (sp_out !== model) begin failures++; $display("FAIL out %h exp %h", sp_out, model); end
      if (sp_valid !== mvalid) begin failures++; $display("FAIL valid"); end
      we = (i > 5) && ($urandom % 3 == 0); wd = $urandom;
      @(posedge clk);
      if (we) begin model = wd; mvalid = 1; end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

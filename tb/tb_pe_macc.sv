// tb_pe_macc: checks MUL (new sum) and MAC (accumulate) against a reference
// accumulator, including disabled cycles that must hold the sum.
module tb_pe_macc;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0, en = 0, acc_mode = 0;
  word_t a = 0, b = 0, result;
  longint model = 0;
  int checks = 0, failures = 0;
  pe_macc dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int i = 0; i < 3000; i++) begin
      @(negedge clk);
      en = ($urandom % 4) != 0;
      acc_mode = ($urandom % 5) != 0;
      a = $urandom; b = $urandom;
      #1;
      begin
        longint p, e;
        p = longint'($signed(a[15:0])) * longint'($signed(b[15:0]));
        e = acc_mode ? model + p : p;
        checks++;
        if (result !== word_t'(e)) begin
          failures++;
          if (failures < 10) $display("FAIL i=%0d a=%h b=%h mode=%0d res=%h exp=%h", i, a, b, acc_mode, result, word_t'(e));
        end
        if (en) model = longint'(word_t'(e));
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

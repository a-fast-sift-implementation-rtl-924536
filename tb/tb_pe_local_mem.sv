// tb_pe_local_mem: fills all 256 words, then mixes random writes and reads,
// comparing every read with a reference array.
module tb_pe_local_mem;
  import simd_pkg::*;
  localparam int unsigned WORDS = 256;
  logic clk = 0, we = 0;
  logic [7:0] addr = 0;
  word_t wd = 0, rd;
  word_t model [WORDS];
  int checks = 0, failures = 0;
  pe_local_mem #(.WORDS(WORDS)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < WORDS; i++) begin
      @(negedge clk); addr = 8'(i); we = 1; wd = $urandom; model[i] = wd;
    end
    for (int i = 0; i < 4000; i++) begin
      @(negedge clk);
      addr = 8'($urandom); we = $urandom % 2; wd = $urandom;
      #1;
      checks++;
      if (rd !== model[addr]) begin
        failures++;
        if (failures < 10) $display("FAIL addr=%0d rd=%h exp=%h", addr, rd, model[addr]);
      end
      @(posedge clk);
      if (we) model[addr] = wd;
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

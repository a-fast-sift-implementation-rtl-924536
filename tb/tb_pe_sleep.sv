// tb_pe_sleep: random MASK operation sequence against a reference flag.
module tb_pe_sleep;
  import simd_pkg::*;
  logic clk = 0, rst_n = 0, active;
  mask_op_e op = MASK_NONE;
  word_t val = 0;
  logic model = 1;
  int checks = 0, failures = 0;
  int n_sleep = 0;
  pe_sleep dut (.*);
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
      checks++;
      if (active !== model) begin failures++; $display("FAIL i=%0d active=%0d exp=%0d", i, active, model); end
      op = mask_op_e'($urandom % 6);
      case ($urandom % 3)
        0: val = '0;
        1: val = word_t'(-($urandom % 100 + 1));
        default: val = $urandom % 100 + 1;
      endcase
      case (op)
        MASK_WAKE: model = 1;
        MASK_GTZ:  model = model && $signed(val) > 0;
        MASK_LTZ:  model = model && $signed(val) < 0;
        MASK_EQZ:  model = model && val == 0;
        MASK_INV:  model = !model;
        default: ;
      endcase
      if (!model) n_sleep++;
    end
    checks++;
    if (n_sleep == 0) failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// tb_pe_pixel_buf: values are taken only on sample, held while the inputs
// change, and read back by index; indices beyond the block read zero.
module tb_pe_pixel_buf;
  import simd_pkg::*;
  localparam int unsigned NPIX = 16;
  logic clk = 0, rst_n = 0, sample = 0;
  pix_t det_in [NPIX];
  pix_t model [NPIX];
  logic [7:0] idx = 0;
  word_t pix;
  int checks = 0, failures = 0;
  pe_pixel_buf #(.NPIX(NPIX)) dut (.*);
  always #5 clk = ~clk;
  initial begin
    repeat (100000) @(posedge clk);
    failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    foreach (model[i]) model[i] = '0;
    foreach (det_in[i]) det_in[i] = '0;
    repeat (2) @(posedge clk);
    rst_n = 1;
    for (int round = 0; round < 50; round++) begin
      @(negedge clk);
      foreach (det_in[i]) det_in[i] = pix_t'($urandom);
      sample = (round % 3) != 2;
      @(posedge clk);
      if (sample) model = det_in;
      @(negedge clk);
      sample = 0;
      foreach (det_in[i]) det_in[i] = pix_t'($urandom);
      for (int k = 0; k < 20; k++) begin
        idx = 8'(k); #1;
        checks++;
        if (pix !== ((k < NPIX) ? word_t'(model[k]) : '0)) begin
          failures++;
          if (failures < 10) $display("FAIL idx=%0d pix=%h", k, pix);
        end
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

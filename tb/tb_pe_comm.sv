// tb_pe_comm: the received value must be the one offered by the neighbour
// named by dir, and the sent value must reach the network unchanged.
module tb_pe_comm;
  import simd_pkg::*;
  dir_e dir; word_t send, tx, rx;
  word_t nbr_in [4];
  int checks = 0, failures = 0;
  pe_comm dut (.*);
  initial begin
    #100000; failures++; $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end
  initial begin
    for (int i = 0; i < 1000; i++) begin
      dir = dir_e'(i % 4); send = $urandom;
      foreach (nbr_in[k]) nbr_in[k] = $urandom;
      #1;
      checks += 2;
      if (rx !== nbr_in[i % 4]) begin failures++; $display("FAIL dir=%0d rx=%h", i % 4, rx); end
      if (tx !== send) begin failures++; $display("FAIL tx"); end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

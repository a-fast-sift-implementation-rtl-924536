// pe_regfile: the PE register file, 16 words of 32 bits with two read ports
// and one write port, as the PE diagram prints it.
//
// Reads are combinational; the write happens at the rising clock edge when
// we is high. A read of the register being written returns the old value.
// Reset clears all registers (a choice of this design).
module pe_regfile
  import simd_pkg::*;
(
  input  logic     clk,
  input  logic     rst_n,
  input  reg_idx_t ra,
  input  reg_idx_t rb,
  output word_t    qa,
  output word_t    qb,
  input  logic     we,
  input  reg_idx_t wa,
  input  word_t    wd
);
  word_t regs [NREG];

  assign qa = regs[ra];
  assign qb = regs[rb];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we) begin
      regs[wa] <= wd;
    end
  end
endmodule

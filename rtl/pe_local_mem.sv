// pe_local_mem: local data memory of one processing element.
//
// WORDS words of 32 bits (256 in the evaluated configuration; the prose
// description of the PE mentions 64). Asynchronous read, synchronous write at
// the rising clock edge, so a load completes within the single cycle of its
// instruction. The address wraps modulo WORDS. The memory is not reset;
// programs write before they read.
module pe_local_mem
  import simd_pkg::*;
#(
  parameter int unsigned WORDS = 256
) (
  input  logic                     clk,
  input  logic [$clog2(WORDS)-1:0] addr,
  input  logic                     we,
  input  word_t                    wd,
  output word_t                    rd
);
  word_t mem [WORDS];

  assign rd = mem[addr];

  always_ff @(posedge clk) begin
    if (we) mem[addr] <= wd;
  end
endmodule

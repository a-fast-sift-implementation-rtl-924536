// pe_sp_io: special-purpose output register of a processing element.
//
// The PE diagram shows "SP Registers & I/O" without detail. Here it is one
// 32-bit register that an OUT instruction loads from a general register and
// that drives the PE's result port out of the array, together with a flag
// that says it has been written since reset. Both are this design's reading
// of the name. The register loads at the rising clock edge when we is high.
module pe_sp_io
  import simd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  we,
  input  word_t wd,
  output word_t sp_out,
  output logic  sp_valid
);
  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      sp_out   <= '0;
      sp_valid <= 1'b0;
    end else if (we) begin
      sp_out   <= wd;
      sp_valid <= 1'b1;
    end
  end
endmodule

// pe_macc: multiply-accumulate unit of a processing element.
//
// Multiplies the low MUL_W (16) bits of both operands as signed numbers and
// either starts a new sum with the product (acc_mode = 0) or adds it to the
// accumulator (acc_mode = 1). The 16-bit operands follow the 16-bit PE data
// path of the published design; the 32-bit accumulator matches the 32-bit register
// file word. Saturation is not applied: the sum wraps modulo 2^32.
//
// Timing: when en is high the accumulator is updated at the rising clock
// edge; result shows the value it will take (the new sum) combinationally,
// so the PE writes the same value into its destination register in the same
// cycle. Reset clears the accumulator.
module pe_macc
  import simd_pkg::*;
(
  input  logic  clk,
  input  logic  rst_n,
  input  logic  en,
  input  logic  acc_mode,
  input  word_t a,
  input  word_t b,
  output word_t result
);
  word_t acc_q;
  logic signed [2*MUL_W-1:0] prod;

  assign prod   = $signed(a[MUL_W-1:0]) * $signed(b[MUL_W-1:0]);
  assign result = acc_mode ? acc_q + word_t'(prod) : word_t'(prod);

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n)  acc_q <= '0;
    else if (en) acc_q <= result;
  end
endmodule

// pe_pixel_buf: sample-and-hold of the detector values of one PE.
//
// The converters deliver one 8-bit value per detector on det_in. A SAMPLE
// instruction (sample = 1) copies all of them at once at the rising clock
// edge, so the whole image across the array is captured in one cycle. A
// PIXEL instruction then reads the held value of detector idx
// (combinational, zero-extended to the word). The original lets a PE address
// up to 16 x 16 detectors; NPIX is how many this PE has (16 = 4 x 4 in the
// evaluated system, numbered row-major). Indices at or above NPIX read zero.
module pe_pixel_buf
  import simd_pkg::*;
#(
  parameter int unsigned NPIX = 16
) (
  input  logic       clk,
  input  logic       rst_n,
  input  logic       sample,
  input  pix_t       det_in [NPIX],
  input  logic [7:0] idx,
  output word_t      pix
);
  pix_t held [NPIX];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NPIX; i++) held[i] <= '0;
    end else if (sample) begin
      held <= det_in;
    end
  end

  always_comb begin
    pix = '0;
    for (int i = 0; i < NPIX; i++)
      if (idx == 8'(i)) pix = word_t'(held[i]);
  end
endmodule

// pe_array: ROWS x COLS processing elements on a torus.
//
// Every PE is joined to its north, east, south and west neighbours; the
// opposite rows and columns of the mesh are joined as well, so the network
// closes into a torus and a transfer at the array edge wraps around. All PEs
// receive the same broadcast instruction. The evaluated system has 4,096 PEs;
// a 64 x 64 square arrangement is this design's choice (the published design gives
// only the count and the 256 x 256 image with 4 x 4 pixels per PE).
//
// PE (r, c) has flat index r*COLS + c. Its detector block is det_in[r*COLS+c];
// with 4 x 4 pixels per PE, image pixel (y, x) sits in PE (y/4, x/4) at pixel
// index (y%4)*4 + x%4. sp_out/sp_valid/active bring out each PE's SP output
// register and activity flag.
module pe_array
  import simd_pkg::*;
#(
  parameter int unsigned ROWS      = 64,
  parameter int unsigned COLS      = 64,
  parameter int unsigned MEM_WORDS = 256,
  parameter int unsigned NPIX      = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid,
  input  instr_t instr,
  input  pix_t   det_in   [ROWS*COLS][NPIX],
  output word_t  sp_out   [ROWS*COLS],
  output logic   sp_valid [ROWS*COLS],
  output logic   active   [ROWS*COLS]
);
  word_t tx [ROWS*COLS];

  for (genvar r = 0; r < ROWS; r++) begin : g_row
    for (genvar c = 0; c < COLS; c++) begin : g_col
      localparam int unsigned ME = r*COLS + c;
      localparam int unsigned N  = ((r + ROWS - 1) % ROWS)*COLS + c;
      localparam int unsigned S  = ((r + 1) % ROWS)*COLS + c;
      localparam int unsigned E  = r*COLS + (c + 1) % COLS;
      localparam int unsigned W  = r*COLS + (c + COLS - 1) % COLS;
      word_t nbr [4];
      assign nbr[0] = tx[N];
      assign nbr[1] = tx[E];
      assign nbr[2] = tx[S];
      assign nbr[3] = tx[W];

      pe #(.MEM_WORDS(MEM_WORDS), .NPIX(NPIX)) u_pe (
        .clk(clk), .rst_n(rst_n), .valid(valid), .instr(instr),
        .net_tx(tx[ME]), .nbr_in(nbr), .det_in(det_in[ME]),
        .sp_out(sp_out[ME]), .sp_valid(sp_valid[ME]), .active(active[ME])
      );
    end
  end
endmodule

// simd_top: the SIMD pixel processor, array control unit plus PE array.
//
// The ACU runs a program from its own memory and broadcasts each vector
// instruction to all ROWS x COLS processing elements, which execute it in
// lockstep on their local data and exchange values over a torus network. In
// the evaluated configuration 4,096 PEs each own a 4 x 4 pixel block of a
// 256 x 256 image, sampled in one cycle by the SAMPLE instruction.
//
// The detectors and their sigma-delta converters are analog and are not
// modelled: their 8-bit outputs enter on det_in, one block of NPIX values per
// PE (PE r*COLS+c, pixel index row-major within the 4 x 4 block). Results
// leave through each PE's SP output register (sp_out, sp_valid); the
// activity flags are visible on active.
//
// Program loading and start follow the ACU: write words with
// prog_we/prog_addr/prog_data, pulse start, wait for done.
module simd_top
  import simd_pkg::*;
#(
  parameter int unsigned ROWS       = 64,
  parameter int unsigned COLS       = 64,
  parameter int unsigned MEM_WORDS  = 256,
  parameter int unsigned NPIX       = 16,
  parameter int unsigned PROG_DEPTH = 8192
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_data,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  input  pix_t                          det_in   [ROWS*COLS][NPIX],
  output word_t                         sp_out   [ROWS*COLS],
  output logic                          sp_valid [ROWS*COLS],
  output logic                          active   [ROWS*COLS]
);
  logic   bvalid;
  instr_t binstr;

  acu #(.PROG_DEPTH(PROG_DEPTH)) u_acu (
    .clk(clk), .rst_n(rst_n),
    .prog_we(prog_we), .prog_addr(prog_addr), .prog_data(prog_data),
    .start(start), .busy(busy), .done(done),
    .bcast_valid(bvalid), .bcast_instr(binstr)
  );

  pe_array #(.ROWS(ROWS), .COLS(COLS), .MEM_WORDS(MEM_WORDS), .NPIX(NPIX)) u_array (
    .clk(clk), .rst_n(rst_n), .valid(bvalid), .instr(binstr),
    .det_in(det_in), .sp_out(sp_out), .sp_valid(sp_valid), .active(active)
  );
endmodule

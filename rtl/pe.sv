// pe: one processing element of the SIMD pixel processor.
//
// Each PE receives the same instruction as every other PE (lockstep, single
// instruction stream) and executes it on its own data in one clock cycle.
// Its parts follow the PE diagram: decoder, register file (16 x 32 bit, two
// read and one write port), arithmetic/logic/shift unit, multiply-accumulate
// unit, local memory, communication unit with its four torus neighbours,
// sleep (activity) unit, sample-and-hold of its detectors, and an SP output
// register. The single-cycle execution, the operand routing and the write-back
// multiplexer are this design's choices.
//
// Timing: instr/valid are registered by the ACU; the register, memory,
// accumulator, activity and output writes happen at the next rising edge.
// While the PE sleeps (active = 0) it executes only MASK instructions and
// SAMPLE, but it still sends its source register on the network during COMM
// so that active neighbours can receive from it.
//
// Ports: net_tx is the value this PE offers on the torus, nbr_in[d] the value
// offered by the neighbour in direction d (N, E, S, W). det_in are the 8-bit
// converted detector values; sp_out/sp_valid the SP output register.
module pe
  import simd_pkg::*;
#(
  parameter int unsigned MEM_WORDS = 256,
  parameter int unsigned NPIX      = 16
) (
  input  logic   clk,
  input  logic   rst_n,
  input  logic   valid,
  input  instr_t instr,
  output word_t  net_tx,
  input  word_t  nbr_in [4],
  input  pix_t   det_in [NPIX],
  output word_t  sp_out,
  output logic   sp_valid,
  output logic   active
);
  localparam int unsigned AW = $clog2(MEM_WORDS);

  pe_ctrl_t ctrl;
  word_t    qa, qb, alu_b, alu_y, macc_y, mem_rd, comm_rx, pix_y, wb;
  logic [AW-1:0] mem_addr;

  pe_decoder u_dec (.valid(valid), .instr(instr), .ctrl(ctrl));

  pe_regfile u_rf (
    .clk(clk), .rst_n(rst_n),
    .ra(ctrl.ra), .rb(ctrl.rb), .qa(qa), .qb(qb),
    .we(ctrl.rf_we & active), .wa(ctrl.rd), .wd(wb)
  );

  assign alu_b = ctrl.alu_b_imm ? ctrl.imm : qb;
  pe_alu u_alu (.op(ctrl.alu_op), .a(qa), .b(alu_b), .y(alu_y));

  pe_macc u_macc (
    .clk(clk), .rst_n(rst_n), .en(ctrl.macc_en & active), .acc_mode(ctrl.macc_acc),
    .a(qa), .b(qb), .result(macc_y)
  );

  assign mem_addr = AW'(qa + ctrl.imm);
  pe_local_mem #(.WORDS(MEM_WORDS)) u_mem (
    .clk(clk), .addr(mem_addr), .we(ctrl.mem_we & active), .wd(qb), .rd(mem_rd)
  );

  pe_comm u_comm (.dir(ctrl.dir), .send(qa), .nbr_in(nbr_in), .tx(net_tx), .rx(comm_rx));

  pe_sleep u_sleep (.clk(clk), .rst_n(rst_n), .op(ctrl.mask_op), .val(qa), .active(active));

  pe_pixel_buf #(.NPIX(NPIX)) u_pix (
    .clk(clk), .rst_n(rst_n), .sample(ctrl.sample), .det_in(det_in),
    .idx(ctrl.imm[7:0]), .pix(pix_y)
  );

  pe_sp_io u_sp (
    .clk(clk), .rst_n(rst_n), .we(ctrl.out_we & active), .wd(qa),
    .sp_out(sp_out), .sp_valid(sp_valid)
  );

  always_comb begin
    unique case (ctrl.wb_sel)
      WB_ALU:  wb = alu_y;
      WB_IMM:  wb = ctrl.imm;
      WB_MACC: wb = macc_y;
      WB_MEM:  wb = mem_rd;
      WB_COMM: wb = comm_rx;
      WB_PIX:  wb = pix_y;
      default: wb = alu_y;
    endcase
  end
endmodule

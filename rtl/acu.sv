// acu: array control unit of the SIMD pixel processor.
//
// Holds the program and issues one instruction per clock cycle. Scalar
// instructions (SLI, SADDI, SBNZ, HALT) control the program flow and run here
// on NSREG scalar registers of SREG_W bits: with them a program counts loops
// and branches. Every other instruction is a vector instruction and is put
// on the broadcast register, from which all PEs execute it in the following
// cycle. The published design gives the ACU's role (stores the program, broadcasts
// each instruction to every node in lockstep) and the scalar/vector split;
// the scalar instruction set, the program memory size and the load port are
// this design's choices.
//
// Interface and timing:
//   prog_we/prog_addr/prog_data write one program word per cycle while the
//   ACU is not running. A one-cycle start pulse sets pc to 0 and runs. Each
//   cycle executes the word at pc: a vector word appears on bcast_instr with
//   bcast_valid high one cycle later; a scalar word leaves bcast_valid low.
//   HALT stops the ACU: busy falls and done rises and stays until the next
//   start. A cycle that issues nothing drives a NOP on bcast_instr.
module acu
  import simd_pkg::*;
#(
  parameter int unsigned PROG_DEPTH = 8192,
  parameter int unsigned NSREG      = 16,
  parameter int unsigned SREG_W     = 16
) (
  input  logic                          clk,
  input  logic                          rst_n,
  input  logic                          prog_we,
  input  logic [$clog2(PROG_DEPTH)-1:0] prog_addr,
  input  instr_t                        prog_data,
  input  logic                          start,
  output logic                          busy,
  output logic                          done,
  output logic                          bcast_valid,
  output instr_t                        bcast_instr
);
  localparam int unsigned PCW = $clog2(PROG_DEPTH);

  typedef enum logic [1:0] {S_IDLE, S_RUN, S_DONE} state_e;

  state_e  state;
  logic [PCW-1:0]    pc;
  instr_t            pmem [PROG_DEPTH];
  instr_t            cur;
  logic [SREG_W-1:0] sreg [NSREG];
  logic [SREG_W-1:0] simm;

  assign cur  = pmem[pc];
  assign simm = SREG_W'($signed(cur.imm));
  assign busy = (state == S_RUN);
  assign done = (state == S_DONE);

  always_ff @(posedge clk) begin
    if (prog_we) pmem[prog_addr] <= prog_data;
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      state       <= S_IDLE;
      pc          <= '0;
      bcast_valid <= 1'b0;
      bcast_instr <= '0;
      for (int i = 0; i < NSREG; i++) sreg[i] <= '0;
    end else begin
      bcast_valid <= 1'b0;
      bcast_instr <= '0;
      if (state != S_RUN) begin
        if (start) begin
          state <= S_RUN;
          pc    <= '0;
        end
      end else if (is_scalar(cur.op)) begin
        pc <= pc + 1'b1;
        unique case (cur.op)
          OP_SLI:   sreg[cur.rd] <= simm;
          OP_SADDI: sreg[cur.rd] <= sreg[cur.rd] + simm;
          OP_SBNZ:  if (sreg[cur.ra] != '0) pc <= PCW'(cur.imm);
          OP_HALT:  state <= S_DONE;
          default:  ;
        endcase
      end else begin
        bcast_valid <= 1'b1;
        bcast_instr <= cur;
        pc          <= pc + 1'b1;
      end
    end
  end

  // The program must not change under a running ACU.
  a_no_load_while_running: assert property (@(posedge clk) disable iff (!rst_n)
    busy |-> !prog_we);
endmodule

// simd_pkg: shared word sizes, instruction format and control types of the
// SIMD pixel processor.
//
// The array control unit (ACU) fetches 32-bit instructions. Scalar
// instructions (loop counters, branches, halt) run in the ACU itself; vector
// instructions are broadcast unchanged to every processing element (PE),
// which decodes them locally. The instruction classes follow the ones the
// performance breakdown of the processor uses: ALU, MEM, COMM, MASK and
// PIXEL. The binary encoding, the opcode list and the field layout are this
// design's own; only the unit list (adder/subtractor, barrel shifter, MACC,
// local memory, communication, sleep) and the sizes come from the processor
// description.
//
// Instruction word (MSB first):
//   op[31:26] rd[25:22] ra[21:18] rb[17:14] imm[13:0]
package simd_pkg;

  // Register and memory word width (register file "16 by 32 bit", 32-bit
  // local memory words).
  localparam int unsigned WORD_W = 32;
  // Multiplier operand width: the 16-bit data path of the PE.
  localparam int unsigned MUL_W = 16;
  // Register file depth, fixed by the 4-bit register fields.
  localparam int unsigned NREG = 16;
  // Detector sample width (8-bit sigma-delta converter).
  localparam int unsigned PIX_W = 8;
  localparam int unsigned IMM_W = 14;

  typedef logic [WORD_W-1:0] word_t;
  typedef logic [3:0]        reg_idx_t;
  typedef logic [PIX_W-1:0]  pix_t;

  typedef enum logic [5:0] {
    // vector, ALU class
    OP_NOP    = 6'd0,
    OP_ADD    = 6'd1,   // rd = ra + rb
    OP_SUB    = 6'd2,   // rd = ra - rb
    OP_AND    = 6'd3,
    OP_OR     = 6'd4,
    OP_XOR    = 6'd5,
    OP_ADDI   = 6'd6,   // rd = ra + sext(imm)
    OP_LI     = 6'd7,   // rd = sext(imm)
    OP_SHL    = 6'd8,   // rd = ra << imm[4:0]
    OP_SHRA   = 6'd9,   // rd = ra >>> imm[4:0]
    OP_SHRL   = 6'd10,  // rd = ra >> imm[4:0]
    OP_MUL    = 6'd11,  // acc = ra[15:0]*rb[15:0] (signed); rd = acc
    OP_MAC    = 6'd12,  // acc = acc + ra[15:0]*rb[15:0];    rd = acc
    // vector, MEM class
    OP_LD     = 6'd16,  // rd = mem[ra + imm]
    OP_ST     = 6'd17,  // mem[ra + imm] = rb
    // vector, COMM class
    OP_COMM   = 6'd20,  // every PE sends ra; rd = value sent by neighbour imm[1:0]
    // vector, MASK class
    OP_WAKE   = 6'd24,  // active = 1
    OP_MGTZ   = 6'd25,  // active = active & (ra >  0)
    OP_MLTZ   = 6'd26,  // active = active & (ra <  0)
    OP_MEQZ   = 6'd27,  // active = active & (ra == 0)
    OP_MINV   = 6'd28,  // active = ~active
    // vector, PIXEL class
    OP_SAMPLE = 6'd32,  // all PEs latch their detector values
    OP_PIX    = 6'd33,  // rd = pixel[imm]
    OP_OUT    = 6'd34,  // SP output register = ra
    // scalar, executed in the ACU
    OP_SLI    = 6'd48,  // s[rd] = sext(imm)
    OP_SADDI  = 6'd49,  // s[rd] = s[rd] + sext(imm)
    OP_SBNZ   = 6'd50,  // if (s[ra] != 0) pc = imm
    OP_HALT   = 6'd63
  } opcode_e;

  typedef struct packed {
    opcode_e          op;
    reg_idx_t         rd;
    reg_idx_t         ra;
    reg_idx_t         rb;
    logic [IMM_W-1:0] imm;
  } instr_t;

  // Scalar instructions occupy the top quarter of the opcode space.
  function automatic logic is_scalar(opcode_e op);
    return op[5:4] == 2'b11;
  endfunction

  // Torus directions, as seen by the receiving PE.
  typedef enum logic [1:0] {DIR_N = 2'd0, DIR_E = 2'd1, DIR_S = 2'd2, DIR_W = 2'd3} dir_e;

  typedef enum logic [2:0] {
    ALU_ADD, ALU_SUB, ALU_AND, ALU_OR, ALU_XOR, ALU_SHL, ALU_SHRA, ALU_SHRL
  } alu_op_e;

  typedef enum logic [2:0] {
    MASK_NONE, MASK_WAKE, MASK_GTZ, MASK_LTZ, MASK_EQZ, MASK_INV
  } mask_op_e;

  // Source of the register file write-back.
  typedef enum logic [2:0] {
    WB_ALU, WB_IMM, WB_MACC, WB_MEM, WB_COMM, WB_PIX
  } wb_sel_e;

  // Decoded control of one PE for one instruction.
  typedef struct packed {
    logic      rf_we;
    reg_idx_t  rd;
    reg_idx_t  ra;
    reg_idx_t  rb;
    wb_sel_e   wb_sel;
    alu_op_e   alu_op;
    logic      alu_b_imm;   // ALU operand b is the immediate
    logic      macc_en;
    logic      macc_acc;    // 1: accumulate, 0: start a new sum
    logic      mem_we;
    logic      sample;
    logic      out_we;
    mask_op_e  mask_op;
    dir_e      dir;
    word_t     imm;         // sign-extended immediate
  } pe_ctrl_t;

  // Helper used by testbench assemblers and the ACU.
  function automatic instr_t mk_instr(opcode_e op, int rd = 0, int ra = 0, int rb = 0, int imm = 0);
    instr_t i;
    i.op  = op;
    i.rd  = reg_idx_t'(rd);
    i.ra  = reg_idx_t'(ra);
    i.rb  = reg_idx_t'(rb);
    i.imm = IMM_W'(imm);
    return i;
  endfunction

endpackage

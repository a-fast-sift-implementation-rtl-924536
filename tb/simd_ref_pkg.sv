// simd_ref_pkg: instruction-level reference model of the SIMD pixel processor
// for the testbenches. It keeps the architectural state of every PE in plain
// arrays and executes one broadcast instruction at a time, written
// independently of the RTL structure. The ACU part runs a whole program and
// returns the sequence of vector instructions it issues.
package simd_ref_pkg;
  import simd_pkg::*;

  class simd_model;
    int rows, cols, words, npix;
    word_t rf [][16];
    word_t mem [][];
    word_t acc [];
    bit    act [];
    pix_t  held [][];
    word_t sp [];
    bit    spv [];
    // With use_ext set (single PE tests) COMM reads ext_nbr instead of the array.
    bit    use_ext;
    word_t ext_nbr [4];

    function new(int r, int c, int w, int n);
      rows = r; cols = c; words = w; npix = n;
      rf = new[r*c]; mem = new[r*c]; acc = new[r*c]; act = new[r*c];
      held = new[r*c]; sp = new[r*c]; spv = new[r*c];
      for (int p = 0; p < r*c; p++) begin
        foreach (rf[p][k]) rf[p][k] = '0;
        mem[p] = new[w];
        foreach (mem[p][k]) mem[p][k] = '0;
        held[p] = new[n];
        foreach (held[p][k]) held[p][k] = '0;
        acc[p] = '0; act[p] = 1; sp[p] = '0; spv[p] = 0;
      end
      use_ext = 0;
    endfunction

    function int nbr(int p, int d);
      int r = p / cols, c = p % cols;
      case (d)
        0: r = (r + rows - 1) % rows;
        1: c = (c + 1) % cols;
        2: r = (r + 1) % rows;
        default: c = (c + cols - 1) % cols;
      endcase
      return r*cols + c;
    endfunction

    // Execute one vector instruction on every PE. det holds the converter
    // outputs, used by SAMPLE (flat: det[p*npix + k]).
    function void step(instr_t i, pix_t det []);
      word_t tx [] = new[rows*cols];
      for (int p = 0; p < rows*cols; p++) tx[p] = rf[p][i.ra];
      for (int p = 0; p < rows*cols; p++) begin
        word_t a = rf[p][i.ra], b = rf[p][i.rb];
        word_t imm = word_t'($signed(i.imm));
        longint prod = longint'($signed(a[15:0])) * longint'($signed(b[15:0]));
        bit en = act[p];
        int addr = int'((a + imm) % words);
        case (i.op)
          OP_ADD:  if (en) rf[p][i.rd] = a + b;
          OP_SUB:  if (en) rf[p][i.rd] = a - b;
          OP_AND:  if (en) rf[p][i.rd] = a & b;
          OP_OR:   if (en) rf[p][i.rd] = a | b;
          OP_XOR:  if (en) rf[p][i.rd] = a ^ b;
          OP_ADDI: if (en) rf[p][i.rd] = a + imm;
          OP_LI:   if (en) rf[p][i.rd] = imm;
          OP_SHL:  if (en) rf[p][i.rd] = a << imm[4:0];
          OP_SHRA: if (en) rf[p][i.rd] = word_t'($signed(a) >>> imm[4:0]);
          OP_SHRL: if (en) rf[p][i.rd] = a >> imm[4:0];
          OP_MUL:  if (en) begin acc[p] = word_t'(prod); rf[p][i.rd] = acc[p]; end
          OP_MAC:  if (en) begin acc[p] = acc[p] + word_t'(prod); rf[p][i.rd] = acc[p]; end
          OP_LD:   if (en) rf[p][i.rd] = mem[p][addr];
          OP_ST:   if (en) mem[p][addr] = b;
          OP_COMM: if (en) rf[p][i.rd] = use_ext ? ext_nbr[i.imm[1:0]] : tx[nbr(p, int'(i.imm[1:0]))];
          OP_WAKE: act[p] = 1;
          OP_MGTZ: act[p] = act[p] && ($signed(a) > 0);
          OP_MLTZ: act[p] = act[p] && ($signed(a) < 0);
          OP_MEQZ: act[p] = act[p] && (a == 0);
          OP_MINV: act[p] = !act[p];
          OP_SAMPLE: for (int k = 0; k < npix; k++) held[p][k] = det[p*npix + k];
          OP_PIX:  if (en) rf[p][i.rd] = (int'(i.imm[7:0]) < npix) ? word_t'(held[p][i.imm[7:0]]) : '0;
          OP_OUT:  if (en) begin sp[p] = a; spv[p] = 1; end
          default: ;
        endcase
      end
    endfunction
  endclass

  // Runs the ACU program; returns the vector instructions in issue order and
  // the number of scalar instructions executed (HALT included).
  function automatic void acu_run(instr_t prog [], output instr_t issued [$], output int n_scalar);
    logic [15:0] s [16];
    int pc = 0;
    foreach (s[k]) s[k] = '0;
    issued = {};
    n_scalar = 0;
    while (1) begin
      instr_t i = prog[pc];
      if (i.op[5:4] == 2'b11) begin
        n_scalar++;
        pc++;
        case (i.op)
          OP_SLI:   s[i.rd] = 16'($signed(i.imm));
          OP_SADDI: s[i.rd] = s[i.rd] + 16'($signed(i.imm));
          OP_SBNZ:  if (s[i.ra] != 0) pc = int'(i.imm);
          OP_HALT:  return;
          default: ;
        endcase
      end else begin
        issued.push_back(i);
        pc++;
      end
      if (issued.size() > 1000000) return;
    end
  endfunction
endpackage

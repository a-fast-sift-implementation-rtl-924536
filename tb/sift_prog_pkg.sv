// sift_prog_pkg: the DoG (difference of Gaussian) workload for the SIMD
// pixel processor, as a program generator and an independent golden model.
//
// Every PE owns a B x B pixel block: B = 4 in octave 1 (the sampled image),
// 2 in octave 2 and 1 in octave 3 (each octave works on the image halved by
// the previous one). For each octave the program
//   1. octave 1: samples the image (SAMPLE) and copies the 16 pixels to local
//      memory; later octaves: takes the halved image of the previous octave;
//   2. if B > 1, halves the image for the next octave: the mean of each
//      horizontal pixel pair, then of each vertical pair of those;
//   3. builds four blur levels A1..A4 from A0 = image, level j applying
//      PASSES[j-1] = 1, 1, 2, 4 blur passes to level j-1 in a loop run by
//      the ACU's scalar counter, so the variance doubles per level (scale
//      factor k = sqrt 2). Each pass is the separable integer 7-tap Gaussian
//      1 6 15 20 15 6 1 (/64), stored as the half kernel {20, 15, 6, 1}: a
//      row pass and a column pass, each first fetching the three pixels it
//      needs beyond the block edge from the west/east (north/south) PEs over
//      the torus, in as many hops as the block size requires;
//   4. forms the three differences D1 = A1 - A2, D2 = A2 - A3, D3 = A3 - A4;
//   5. gathers each D layer with a one-pixel border from the neighbours
//      (corners in two hops);
//   6. marks every pixel of D2 that is above (1) or below (2) all 26
//      neighbours in D1, D2 and D3, using MASK instructions: each comparison
//      puts to sleep the PEs whose pixel fails it, and only the PEs still
//      awake store the mark. Two nested ACU loops walk over the pixels with
//      register-indirect addressing;
//   7. sends out, through the SP register, the B*B marks, the B*B D2 values
//      and, if B > 1, the (B/2)^2 halved pixels, in that order.
// Image borders wrap around, as the torus does. The golden model computes
// the same quantities directly on the whole image of each octave.
package sift_prog_pkg;
  import simd_pkg::*;

  localparam int KH [4] = '{20, 15, 6, 1};
  // Blur passes from one level to the next: the variance doubles per level.
  localparam int PASSES [4] = '{1, 1, 2, 4};

  // local memory map (words)
  localparam int EXT = 16, A0 = 56, TMP = 184, FLAG = 200, DOWN = 216, DH = 220;
  function automatic int a_base(int j); return A0 + 16*j; endfunction
  function automatic int d_base(int j); return 136 + 16*(j-1); endfunction
  function automatic int e_base(int l); return 36*(l-1); endfunction

  function automatic int blk(int oct); return 4 >> (oct - 1); endfunction

  // number of values each PE sends out for octaves 1..noct
  function automatic int out_count(int noct);
    int n = 0;
    for (int o = 1; o <= noct; o++) begin
      int b;
      b = blk(o);
      n += 2*b*b + (b > 1 ? (b/2)*(b/2) : 0);
    end
    return n;
  endfunction

  function automatic void emit(ref instr_t p [$], input opcode_e op, input int rd = 0,
                               input int ra = 0, input int rb = 0, input int imm = 0);
    p.push_back(mk_instr(op, rd, ra, rb, imm));
  endfunction

  // One 7-tap pass over a B x B block. src is read at [rs + soff], the
  // result written at [rdst + doff]; vert selects the column pass.
  function automatic void pass(ref instr_t p [$], input int B, input bit vert, input int rs,
                               input int soff, input int rdst, input int doff);
    // ext buffer: row pass ext(y, j) = EXT + y*(B+6) + j; column pass ext(j, x) = EXT + j*B + x
    for (int y = 0; y < B; y++)
      for (int x = 0; x < B; x++) begin
        emit(p, OP_LD, 1, rs, 0, soff + y*B + x);
        emit(p, OP_ST, 0, 0, 1, vert ? EXT + (y+3)*B + x : EXT + y*(B+6) + x + 3);
      end
    for (int a = 0; a < B; a++)
      for (int o = 1; o <= 3; o++) begin
        int h, idx;
        h = (o + B - 1) / B;
        // from the west (north): pixel B*h - o of the PE h hops away -> ext 3 - o
        idx = B*h - o;
        emit(p, OP_LD, 1, rs, 0, vert ? soff + idx*B + a : soff + a*B + idx);
        for (int k = 0; k < h; k++) emit(p, OP_COMM, 1, 1, 0, vert ? int'(DIR_N) : int'(DIR_W));
        emit(p, OP_ST, 0, 0, 1, vert ? EXT + (3-o)*B + a : EXT + a*(B+6) + 3 - o);
        // from the east (south): pixel o-1-B*(h-1) of the PE h hops away -> ext B+2+o
        idx = o - 1 - B*(h-1);
        emit(p, OP_LD, 1, rs, 0, vert ? soff + idx*B + a : soff + a*B + idx);
        for (int k = 0; k < h; k++) emit(p, OP_COMM, 1, 1, 0, vert ? int'(DIR_S) : int'(DIR_E));
        emit(p, OP_ST, 0, 0, 1, vert ? EXT + (B+2+o)*B + a : EXT + a*(B+6) + B + 2 + o);
      end
    for (int y = 0; y < B; y++)
      for (int x = 0; x < B; x++) begin
        int c, st;
        c = vert ? EXT + (y+3)*B + x : EXT + y*(B+6) + x + 3;
        st = vert ? B : 1;
        emit(p, OP_LD, 1, 0, 0, c);
        emit(p, OP_MUL, 5, 1, 10);
        for (int d = 1; d <= 3; d++) begin
          emit(p, OP_LD, 1, 0, 0, c - d*st);
          emit(p, OP_LD, 2, 0, 0, c + d*st);
          emit(p, OP_ADD, 3, 1, 2);
          emit(p, OP_MAC, 5, 3, 10 + d);
        end
        emit(p, OP_ADDI, 5, 5, 0, 32);
        emit(p, OP_SHRA, 5, 5, 0, 6);
        emit(p, OP_ST, 0, rdst, 5, doff + y*B + x);
      end
  endfunction

  function automatic void octave(ref instr_t p [$], input int oct);
    int B, loop_pc, row_pc, E;
    B = blk(oct);
    E = B + 2;
    // 1. image of this octave into A0
    if (oct == 1) begin
      emit(p, OP_SAMPLE);
      for (int k = 0; k < 16; k++) begin
        emit(p, OP_PIX, 1, 0, 0, k);
        emit(p, OP_ST, 0, 0, 1, A0 + k);
      end
    end else begin
      for (int k = 0; k < B*B; k++) begin
        emit(p, OP_LD, 1, 0, 0, DOWN + k);
        emit(p, OP_ST, 0, 0, 1, A0 + k);
      end
    end
    // 2. halve: left, then bottom
    if (B > 1) begin
      for (int y = 0; y < B; y++)
        for (int i = 0; i < B/2; i++) begin
          emit(p, OP_LD, 1, 0, 0, A0 + y*B + 2*i);
          emit(p, OP_LD, 2, 0, 0, A0 + y*B + 2*i + 1);
          emit(p, OP_ADD, 3, 1, 2);
          emit(p, OP_SHRA, 3, 3, 0, 1);
          emit(p, OP_ST, 0, 0, 3, DH + y*(B/2) + i);
        end
      for (int j = 0; j < B/2; j++)
        for (int i = 0; i < B/2; i++) begin
          emit(p, OP_LD, 1, 0, 0, DH + (2*j)*(B/2) + i);
          emit(p, OP_LD, 2, 0, 0, DH + (2*j+1)*(B/2) + i);
          emit(p, OP_ADD, 3, 1, 2);
          emit(p, OP_SHRA, 3, 3, 0, 1);
          emit(p, OP_ST, 0, 0, 3, DOWN + j*(B/2) + i);
        end
    end
    // 3. levels; r8 = source base, r9 = destination base. After the first
    //    pass of a level the blur runs in place (a pass reads all of its
    //    input before writing).
    for (int d = 0; d < 4; d++) emit(p, OP_LI, 10 + d, 0, 0, KH[d]);
    emit(p, OP_ADDI, 9, 0, 0, A0);
    for (int j = 1; j <= 4; j++) begin
      emit(p, OP_ADD, 8, 9, 0);
      emit(p, OP_ADDI, 9, 9, 0, 16);
      emit(p, OP_SLI, 1, 0, 0, PASSES[j-1]);
      loop_pc = p.size();
      pass(p, B, 0, 8, 0, 0, TMP);
      pass(p, B, 1, 0, TMP, 9, 0);
      emit(p, OP_ADD, 8, 9, 0);
      emit(p, OP_SADDI, 1, 0, 0, -1);
      emit(p, OP_SBNZ, 0, 1, 0, loop_pc);
    end
    // 4. differences
    for (int j = 1; j <= 3; j++)
      for (int k = 0; k < B*B; k++) begin
        emit(p, OP_LD, 1, 0, 0, a_base(j) + k);
        emit(p, OP_LD, 2, 0, 0, a_base(j+1) + k);
        emit(p, OP_SUB, 3, 1, 2);
        emit(p, OP_ST, 0, 0, 3, d_base(j) + k);
      end
    // 5. bordered copies E(l) ((B+2) x (B+2)) of the three D layers
    for (int l = 1; l <= 3; l++) begin
      int eb, db;
      eb = e_base(l); db = d_base(l);
      for (int k = 0; k < B*B; k++) begin
        emit(p, OP_LD, 1, 0, 0, db + k);
        emit(p, OP_ST, 0, 0, 1, eb + (k/B + 1)*E + k%B + 1);
      end
      for (int y = 0; y < B; y++) begin
        emit(p, OP_LD, 1, 0, 0, db + y*B + B - 1);
        emit(p, OP_COMM, 2, 1, 0, int'(DIR_W));
        emit(p, OP_ST, 0, 0, 2, eb + (y+1)*E);
        emit(p, OP_LD, 1, 0, 0, db + y*B);
        emit(p, OP_COMM, 2, 1, 0, int'(DIR_E));
        emit(p, OP_ST, 0, 0, 2, eb + (y+1)*E + B + 1);
      end
      for (int c = 0; c < E; c++) begin
        emit(p, OP_LD, 1, 0, 0, eb + B*E + c);
        emit(p, OP_COMM, 2, 1, 0, int'(DIR_N));
        emit(p, OP_ST, 0, 0, 2, eb + c);
        emit(p, OP_LD, 1, 0, 0, eb + 1*E + c);
        emit(p, OP_COMM, 2, 1, 0, int'(DIR_S));
        emit(p, OP_ST, 0, 0, 2, eb + (B+1)*E + c);
      end
    end
    // 6. extrema of D2 against its 26 neighbours; r7 = offset of the pixel
    //    in the bordered layers, r6 = its index k. s3 counts rows, s2 columns.
    emit(p, OP_ADDI, 7, 0, 0, E + 1);
    emit(p, OP_ADDI, 6, 0, 0, 0);
    emit(p, OP_SLI, 3, 0, 0, B);
    row_pc = p.size();
    emit(p, OP_SLI, 2, 0, 0, B);
    loop_pc = p.size();
    emit(p, OP_WAKE);
    emit(p, OP_ST, 0, 6, 0, FLAG);
    for (int pol = 0; pol < 2; pol++) begin
      emit(p, OP_LD, 4, 7, 0, e_base(2));
      for (int l = 1; l <= 3; l++)
        for (int dy = -1; dy <= 1; dy++)
          for (int dx = -1; dx <= 1; dx++)
            if (!(l == 2 && dy == 0 && dx == 0)) begin
              emit(p, OP_LD, 1, 7, 0, e_base(l) + dy*E + dx);
              emit(p, OP_SUB, 3, 4, 1);
              emit(p, pol == 0 ? OP_MGTZ : OP_MLTZ, 0, 3);
            end
      emit(p, OP_LI, 1, 0, 0, pol + 1);
      emit(p, OP_ST, 0, 6, 1, FLAG);
      emit(p, OP_WAKE);
    end
    emit(p, OP_ADDI, 7, 7, 0, 1);
    emit(p, OP_ADDI, 6, 6, 0, 1);
    emit(p, OP_SADDI, 2, 0, 0, -1);
    emit(p, OP_SBNZ, 0, 2, 0, loop_pc);
    emit(p, OP_ADDI, 7, 7, 0, 2);
    emit(p, OP_SADDI, 3, 0, 0, -1);
    emit(p, OP_SBNZ, 0, 3, 0, row_pc);
    // 7. results out
    for (int k = 0; k < B*B; k++) begin emit(p, OP_LD, 1, 0, 0, FLAG + k);     emit(p, OP_OUT, 0, 1); end
    for (int k = 0; k < B*B; k++) begin emit(p, OP_LD, 1, 0, 0, d_base(2) + k); emit(p, OP_OUT, 0, 1); end
    if (B > 1)
      for (int k = 0; k < (B/2)*(B/2); k++) begin emit(p, OP_LD, 1, 0, 0, DOWN + k); emit(p, OP_OUT, 0, 1); end
  endfunction

  function automatic void build_program(input int noct, output instr_t p [$]);
    p = {};
    for (int o = 1; o <= noct; o++) octave(p, o);
    emit(p, OP_HALT);
  endfunction

  // Golden model of one octave on an H x W image (img[y*W + x]) held B x B
  // per PE. Appends, per PE (row-major over the PE grid), the values the
  // program sends out, and returns the halved image.
  function automatic void golden_octave(input int H, input int W, input int B, input int img [],
                                        ref int expv [][$], output int half [],
                                        inout int n_max, inout int n_min);
    int a [5][];
    int t [];
    int d [4][];
    int pc = W / B;
    for (int j = 0; j < 4; j++) d[j] = new[H*W];
    t = new[H*W];
    a[0] = img;
    for (int j = 1; j <= 4; j++) begin
      a[j] = a[j-1];
      for (int n = 0; n < PASSES[j-1]; n++) begin
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            int s = KH[0] * a[j][y*W + x];
            for (int k = 1; k <= 3; k++)
              s += KH[k] * (a[j][y*W + (x+k)%W] + a[j][y*W + (x-k+3*W)%W]);
            t[y*W + x] = (s + 32) >>> 6;
          end
        for (int y = 0; y < H; y++)
          for (int x = 0; x < W; x++) begin
            int s = KH[0] * t[y*W + x];
            for (int k = 1; k <= 3; k++)
              s += KH[k] * (t[((y+k)%H)*W + x] + t[((y-k+3*H)%H)*W + x]);
            a[j][y*W + x] = (s + 32) >>> 6;
          end
      end
    end
    for (int j = 1; j <= 3; j++)
      for (int i = 0; i < H*W; i++) d[j][i] = a[j][i] - a[j+1][i];
    // marks, then D2, PE by PE in pixel order
    for (int pass_ = 0; pass_ < 2; pass_++)
      for (int p = 0; p < (H/B)*(W/B); p++)
        for (int k = 0; k < B*B; k++) begin
          int y, x, v;
          bit is_max, is_min;
          y = (p / pc)*B + k / B; x = (p % pc)*B + k % B;
          v = d[2][y*W + x];
          is_max = 1; is_min = 1;
          for (int l = 1; l <= 3; l++)
            for (int dy = -1; dy <= 1; dy++)
              for (int dx = -1; dx <= 1; dx++)
                if (!(l == 2 && dy == 0 && dx == 0)) begin
                  int n = d[l][((y+dy+H)%H)*W + (x+dx+W)%W];
                  if (!(v > n)) is_max = 0;
                  if (!(v < n)) is_min = 0;
                end
          if (pass_ == 0) begin
            expv[p].push_back(is_max ? 1 : (is_min ? 2 : 0));
            n_max += int'(is_max); n_min += int'(is_min);
          end else expv[p].push_back(v);
        end
    half = new[(H/2)*(W/2)];
    for (int y = 0; y < H/2; y++)
      for (int x = 0; x < W/2; x++) begin
        int h0, h1;
        h0 = (img[(2*y)*W + 2*x] + img[(2*y)*W + 2*x + 1]) >>> 1;
        h1 = (img[(2*y+1)*W + 2*x] + img[(2*y+1)*W + 2*x + 1]) >>> 1;
        half[y*(W/2) + x] = (h0 + h1) >>> 1;
      end
    if (B > 1)
      for (int p = 0; p < (H/B)*(W/B); p++)
        for (int k = 0; k < (B/2)*(B/2); k++) begin
          int y, x;
          y = (p / pc)*(B/2) + k / (B/2); x = (p % pc)*(B/2) + k % (B/2);
          expv[p].push_back(half[y*(W/2) + x]);
        end
  endfunction

  // Golden model of octaves 1..noct on the H x W sampled image.
  function automatic void golden(input int H, input int W, input int noct, input int img [],
                                 output int expv [][$], output int n_max, output int n_min);
    int cur [];
    int half [];
    int h, w;
    expv = new[(H/4)*(W/4)];
    n_max = 0; n_min = 0;
    cur = img; h = H; w = W;
    for (int o = 1; o <= noct; o++) begin
      golden_octave(h, w, blk(o), cur, expv, half, n_max, n_min);
      cur = half; h = h/2; w = w/2;
    end
  endfunction
endpackage

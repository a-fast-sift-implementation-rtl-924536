// tb_simd_top_full: the DoG workload of tb_simd_top (octaves 1 to 3) on the
// processor at its default size, 64 x 64 PEs with a 256 x 256 image, which is
// the evaluated configuration. The top keeps its default parameters; the
// local sizes below only mirror them. The lock-step reference model is left
// out for speed: the values sent out are compared with the golden model, the
// cycle count with the reference ACU, and the same mechanisms are counted.
module tb_simd_top_full;
  import simd_pkg::*;
  import simd_ref_pkg::*;
  import sift_prog_pkg::*;
  localparam int unsigned ROWS = 64, COLS = 64, NPIX = 16, MEM_WORDS = 256, PROG_DEPTH = 8192;
  localparam int unsigned N = ROWS*COLS, H = 4*ROWS, W = 4*COLS;
  localparam bit LOCKSTEP = 0;
  localparam int NOCT = 3;

  logic clk = 0, rst_n = 0, prog_we = 0, start = 0, busy, done;
  logic [$clog2(PROG_DEPTH)-1:0] prog_addr = '0;
  instr_t prog_data = '0;
  pix_t det_in [N][NPIX];
  word_t sp_out [N];
  logic sp_valid [N], active [N];

  simd_top dut (.*);
  always #5 clk = ~clk;

  int checks = 0, failures = 0;
  int n_sample = 0, n_comm [4] = '{0, 0, 0, 0}, n_mac = 0, n_sleep = 0, n_branch = 0, n_out = 0, n_busy = 0;
  int got [N][$];
  simd_model m;
  pix_t det_flat [];

  initial begin
    repeat (400000) @(posedge clk);
    failures++; $display("watchdog"); $display("TB_RESULT checks=%0d failures=%0d", checks, failures); $finish;
  end

  // Capture SP outputs after every OUT; count mechanisms; lock-step model.
  always @(posedge clk) begin
    logic was_out, bv;
    instr_t bi;
    bv = dut.bvalid && rst_n; bi = dut.binstr;
    was_out = bv && bi.op == OP_OUT;
    if (busy) n_busy++;
    if (dut.u_acu.state == dut.u_acu.S_RUN && dut.u_acu.cur.op == OP_SBNZ &&
        dut.u_acu.sreg[dut.u_acu.cur.ra] != 0) n_branch++;
    if (bv) begin
      if (bi.op == OP_SAMPLE) n_sample++;
      if (bi.op == OP_COMM) n_comm[bi.imm[1:0]]++;
      if (bi.op == OP_MAC) n_mac++;
    end
    #1;
    if (LOCKSTEP && bv) begin
      m.step(bi, det_flat);
      for (int p = 0; p < N; p++) begin
        checks++;
        if (sp_out[p] !== m.sp[p] || active[p] !== m.act[p] || sp_valid[p] !== m.spv[p]) begin
          failures++;
          if (failures < 10) $display("FAIL lockstep op=%s pe=%0d sp=%h/%h act=%0d/%0d", bi.op.name(), p,
                                      sp_out[p], m.sp[p], active[p], m.act[p]);
        end
      end
    end
    for (int p = 0; p < N; p++) if (!active[p]) n_sleep++;
    if (was_out) begin
      n_out++;
      for (int p = 0; p < N; p++) got[p].push_back(int'($signed(sp_out[p])));
    end
  end

  initial begin
    instr_t prog [$];
    instr_t full [];
    instr_t issued [$];
    int img [];
    int expv [][$];
    int n_scalar, n_max, n_min, cyc, found_max, found_min, n_val;
    int mark_oct [$];
    int oct_max [4], oct_min [4];

    if (LOCKSTEP) m = new(ROWS, COLS, MEM_WORDS, NPIX);
    det_flat = new[N*NPIX];
    img = new[H*W];
    // image: flat grey with 5 x 5 bright and dark squares every 8 pixels
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++)
        img[y*W + x] = (y % 8 >= 2 && y % 8 <= 6 && x % 8 >= 2 && x % 8 <= 6) ?
                       (((y/8) % 2 != 0) ? 0 : 255) : 100;
    for (int y = 0; y < H; y++)
      for (int x = 0; x < W; x++) begin
        det_in[(y/4)*COLS + x/4][(y%4)*4 + x%4] = pix_t'(img[y*W + x]);
        det_flat[((y/4)*COLS + x/4)*NPIX + (y%4)*4 + x%4] = pix_t'(img[y*W + x]);
      end
    build_program(NOCT, prog);
    full = new[PROG_DEPTH];
    foreach (full[k]) full[k] = mk_instr(OP_HALT);
    foreach (prog[k]) full[k] = prog[k];
    acu_run(full, issued, n_scalar);
    golden(H, W, NOCT, img, expv, n_max, n_min);
    $display("program: %0d words, %0d vector + %0d scalar instructions executed; golden: %0d maxima, %0d minima",
             prog.size(), issued.size(), n_scalar, n_max, n_min);

    repeat (3) @(posedge clk);
    rst_n = 1;
    foreach (prog[k]) begin
      @(negedge clk); prog_we = 1; prog_addr = $bits(prog_addr)'(k); prog_data = prog[k];
    end
    @(negedge clk); prog_we = 0;
    @(negedge clk); start = 1;
    @(negedge clk); start = 0;
    wait (done);
    repeat (3) @(posedge clk);
    cyc = n_busy;
    checks++;
    if (cyc != issued.size() + n_scalar) begin
      failures++; $display("FAIL cycles %0d, expected %0d", cyc, issued.size() + n_scalar);
    end
    $display("run: %0d cycles", cyc);

    // positions of the marks in each PE's output stream
    for (int o = 1; o <= NOCT; o++) begin
      int b;
      b = blk(o);
      for (int k = 0; k < b*b; k++) mark_oct.push_back(o);
      for (int k = 0; k < b*b + (b > 1 ? (b/2)*(b/2) : 0); k++) mark_oct.push_back(0);
    end
    n_val = out_count(NOCT);
    found_max = 0; found_min = 0;
    foreach (oct_max[o]) begin oct_max[o] = 0; oct_min[o] = 0; end
    for (int p = 0; p < N; p++) begin
      checks++;
      if (got[p].size() != n_val) begin
        failures++; $display("FAIL pe %0d sent %0d values", p, got[p].size());
        continue;
      end
      for (int k = 0; k < n_val; k++) begin
        checks++;
        if (got[p][k] != expv[p][k]) begin
          failures++;
          if (failures < 20) $display("FAIL pe %0d value %0d: %0d expected %0d", p, k, got[p][k], expv[p][k]);
        end
        if (mark_oct[k] != 0 && got[p][k] == 1) begin found_max++; oct_max[mark_oct[k]]++; end
        if (mark_oct[k] != 0 && got[p][k] == 2) begin found_min++; oct_min[mark_oct[k]]++; end
      end
    end
    $display("mechanisms: sample=%0d comm N/E/S/W=%0d/%0d/%0d/%0d mac=%0d sleeping PE-cycles=%0d loop branches=%0d outs=%0d maxima=%0d minima=%0d",
             n_sample, n_comm[0], n_comm[1], n_comm[2], n_comm[3], n_mac, n_sleep, n_branch, n_out,
             found_max, found_min);
    for (int o = 1; o <= NOCT; o++)
      $display("octave %0d (%0d x %0d pixels per PE): %0d maxima, %0d minima", o, blk(o), blk(o), oct_max[o], oct_min[o]);
    foreach (n_comm[d]) begin checks++; if (n_comm[d] == 0) begin failures++; $display("FAIL no COMM in direction %0d", d); end end
    checks += 7;
    if (n_sample == 0) begin failures++; $display("FAIL no SAMPLE"); end
    if (n_mac == 0) begin failures++; $display("FAIL no MAC"); end
    if (n_sleep == 0) begin failures++; $display("FAIL no sleeping PE"); end
    if (n_branch == 0) begin failures++; $display("FAIL no loop branch"); end
    if (n_out == 0) begin failures++; $display("FAIL no OUT"); end
    if (found_max == 0) begin failures++; $display("FAIL no maximum"); end
    if (found_min == 0) begin failures++; $display("FAIL no minimum"); end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// arith_processor_tb: end-to-end test of the arithmetic processor at its
// default size (10 PEs, 8 local memories, 5-stage networks).
// Nine jobs, each a different arithmetic network set up by reconfiguration:
//   A  loop with an IF merged into one network (branch merging):
//        X = A*C - B*D;  Y = (X <= 0) ? A*B + C*D : A*B - C*D
//   B  E = (A + B + C) / D: one PE adds, two PEs form 1/D, one multiplies;
//        the adder's result waits in a routing-network noncompute delay
//   C  FFT butterfly with cos(phi), sin(phi) from the register file
//   D  interval multiply: two multiplier PEs, four compare PEs
//   E  complex divide on eight PEs (c = 4), with a 36-cycle routing delay
//   F  polynomial by Horner's rule, coefficients from the register file
//   G  inner product accumulated through a PE's feedback path (c = 0)
//   H  the network of B again, on N = 4096 operand blocks (a full memory)
//   I  interval divide on all ten PEs (c = 4), operands waiting 24 cycles
//        on port C
// For every job the results read back from memory are compared with real
// arithmetic (N = 64 except in H), the reconfiguration takes M + K cycles,
// and the job time equals
//   ALPHA + (c+1)*7 + (c+2)*BETA + N - 1 + 5
// for the job's critical path of c routing hops (c = 0, 1, 2 and 4 occur).
// Each mechanism (reconfiguration, port-C and routing noncompute delays,
// reciprocal, register operands, both branch sides, compare both ways,
// complex divide, polynomial chain, feedback accumulation) is counted and
// must occur.  All parameters of the processor are at their defaults.
module arith_processor_tb;
  import arith_pkg::*;
  import tb_pkg::*;

  localparam int M = 10, K = 8, BETA = 5, KPE = 7;
  localparam int ALPHA = M + K;
  localparam int N = 64;
  localparam int DEPTH = 4096;      // words per local memory at the default size

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pe_we = 0, rt_we = 0, ar_we = 0, aw_we = 0, lm_we = 0, rf_we = 0, h_we = 0, start = 0;
  logic [7:0]  pe_idx, rt_idx, ar_idx, aw_idx, lm_idx, rf_idx, h_lm;
  pe_cfg_t     pe_data;
  route_cfg_t  rt_data;
  alloc_cfg_t  ar_data, aw_data;
  lm_cfg_t     lm_data;
  word_t       rf_wdata, h_wdata, h_rdata;
  logic [15:0] h_addr, n;
  logic        busy, done;
  logic [31:0] cycles;
  logic [15:0] cfg_cycles;

  arith_processor dut (.*);

  int checks = 0, failures = 0;
  int n_reconf = 0, n_delay = 0, n_cdelay = 0, n_recip = 0, n_rf = 0, n_take = 0, n_nottake = 0;
  int n_cmp_swap = 0, n_cmp_keep = 0, n_cdiv = 0, n_horner = 0, n_fb = 0, n_full = 0, n_idiv = 0;

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin
      failures++;
      if (failures < 20) $display("FAIL %s", what);
    end
  endtask

  function automatic pe_cfg_t base();
    pe_cfg_t c;
    c = '0;
    c.src   = {SRC_MEM, SRC_MEM, SRC_MEM};
    c.cond  = CD_ALWAYS;
    c.out_t = {OS_Z, OS_Y, OS_X};
    c.out_f = {OS_Z, OS_Y, OS_X};
    c.u1    = '{op: OP_PASS, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2    = '{op: OP_PASS, a: LN_X, b: LN_Y, s: LN_Y};
    return c;
  endfunction

  // ---- host-side helpers ----
  task automatic clear_cfg();
    @(negedge clk);
    for (int i = 0; i < M; i++) begin
      pe_we = 1; pe_idx = 8'(i); pe_data = base(); @(negedge clk); pe_we = 0;
    end
    for (int i = 0; i < 3*M; i++) begin
      rt_we = 1; ar_we = 1; rt_idx = 8'(i); ar_idx = 8'(i); rt_data = '0; ar_data = '0;
      @(negedge clk); rt_we = 0; ar_we = 0;
    end
    for (int i = 0; i < K; i++) begin
      aw_we = 1; lm_we = 1; aw_idx = 8'(i); lm_idx = 8'(i); aw_data = '0; lm_data = '0;
      @(negedge clk); aw_we = 0; lm_we = 0;
    end
  endtask

  task automatic set_pe(int i, pe_cfg_t c);
    pe_we = 1; pe_idx = 8'(i); pe_data = c; @(negedge clk); pe_we = 0;
  endtask
  task automatic route(int pe, int port, int src, int dly = 0);
    rt_we = 1; rt_idx = 8'(3*pe + port); rt_data.en = 1'b1; rt_data.sel = 8'(src); rt_data.dly = DLY_W'(dly);
    @(negedge clk); rt_we = 0;
  endtask
  task automatic alloc_rd(int pe, int port, int src);
    ar_we = 1; ar_idx = 8'(3*pe + port); ar_data = '{en: 1'b1, sel: 8'(src)};
    @(negedge clk); ar_we = 0;
  endtask
  task automatic alloc_wr(int lm, int src);
    aw_we = 1; aw_idx = 8'(lm); aw_data = '{en: 1'b1, sel: 8'(src)};
    @(negedge clk); aw_we = 0;
  endtask
  task automatic lm_stream(int lm, bit rd, bit wr);
    lm_we = 1; lm_idx = 8'(lm);
    lm_data = '{rd_en: rd, rd_base: 16'd0, rd_stride: 16'd1, wr_en: wr, wr_base: 16'd512, wr_stride: 16'd1};
    @(negedge clk); lm_we = 0;
  endtask
  task automatic rf_write(int i, real v);
    rf_we = 1; rf_idx = 8'(i); rf_wdata = to_word(v); @(negedge clk); rf_we = 0;
  endtask
  task automatic mem_write(int lm, int addr, word_t w);
    h_we = 1; h_lm = 8'(lm); h_addr = 16'(addr); h_wdata = w; @(negedge clk); h_we = 0;
  endtask
  task automatic mem_read(int lm, int addr, output word_t w);
    h_lm = 8'(lm); h_addr = 16'(addr); @(negedge clk); w = h_rdata;
  endtask

  task automatic run_job(string name, int c, int nb = N);
    int exp_t;
    n = 16'(nb);
    start = 1; @(negedge clk); start = 0;
    while (!done) @(negedge clk);
    exp_t = ALPHA + (c + 1) * KPE + (c + 2) * BETA + nb - 1 + 5;
    chk(cfg_cycles == 16'(ALPHA), $sformatf("%s: reconfiguration took %0d cycles", name, cfg_cycles));
    if (cfg_cycles == 16'(ALPHA)) n_reconf++;
    chk(cycles == 32'(exp_t), $sformatf("%s: T_d = %0d cycles, expected %0d", name, cycles, exp_t));
    $display("job %s: T_d = %0d cycles (c = %0d, N = %0d)", name, cycles, c, nb);
  endtask

  pe_cfg_t c;

  // network of job B (and H): E = (A + B + C) / D, result to memory 4
  task automatic cfg_divide(int wr_base);
    clear_cfg();
    c = base();                       // PE0: A + B + C
    c.u1 = '{op: OP_FADD, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FADD, a: LN_R1, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_Y, OS_R2};
    set_pe(0, c);
    alloc_rd(0, 0, 0); alloc_rd(0, 1, 1); alloc_rd(0, 2, 2);
    c = base();                       // PE1: ROM guess and first Newton step
    c.rom_x = 1'b1;
    c.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_NR_STEP,     a: LN_X, b: LN_R1, s: LN_Y};
    c.out_t = {OS_Z, OS_Y, OS_R2};
    set_pe(1, c);
    alloc_rd(1, 1, 3);
    c = base();                       // PE2: second Newton step, 1/D
    c.src = {SRC_NET, SRC_NET, SRC_NET};
    c.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_NR_LAST,     a: LN_X, b: LN_R1, s: LN_Y};
    c.out_t = {OS_Z, OS_Y, OS_R2};
    set_pe(2, c);
    route(2, 0, 3); route(2, 1, 4);
    c = base();                       // PE3: (A + B + C) * (1/D)
    c.src = {SRC_NET, SRC_NET, SRC_NET};
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.out_t = {OS_X, OS_Y, OS_R1};
    set_pe(3, c);
    route(3, 0, 0, KPE + BETA);       // left path waits one PE plus one hop
    route(3, 1, 6);
    alloc_wr(4, 9);
    for (int j = 0; j < 4; j++) lm_stream(j, 1, 0);
    lm_data = '{rd_en: 1'b0, rd_base: 16'd0, rd_stride: 16'd1, wr_en: 1'b1, wr_base: 16'(wr_base), wr_stride: 16'd1};
    lm_we = 1; lm_idx = 8'd4; @(negedge clk); lm_we = 0;
  endtask

  real va [N], vb [N], vc [N], vd [N];
  real big [4][DEPTH];

  task automatic load_vectors(real lo, real hi);
    for (int i = 0; i < N; i++) begin
      va[i] = rnd(lo, hi) * (($urandom % 2) ? 1.0 : -1.0);
      vb[i] = rnd(lo, hi) * (($urandom % 2) ? 1.0 : -1.0);
      vc[i] = rnd(lo, hi) * (($urandom % 2) ? 1.0 : -1.0);
      vd[i] = rnd(lo, hi) * (($urandom % 2) ? 1.0 : -1.0);
      mem_write(0, i, to_word(va[i])); va[i] = to_real(to_word(va[i]));
      mem_write(1, i, to_word(vb[i])); vb[i] = to_real(to_word(vb[i]));
      mem_write(2, i, to_word(vc[i])); vc[i] = to_real(to_word(vc[i]));
      mem_write(3, i, to_word(vd[i])); vd[i] = to_real(to_word(vd[i]));
    end
  endtask

  function automatic bit near(real got, real exp, real scale);
    return absr(got - exp) <= 1.0e-5 * scale + 1.0e-5 * absr(exp);
  endfunction

  word_t   w;
  real     e, x, y1, y2, t1, t2, cs, sn, p1, p2, p3, p4, mx, mn;

  initial begin
    h_lm = 0; h_addr = 0; h_wdata = '0; n = '0; rf_idx = 0; rf_wdata = '0;
    pe_idx = 0; rt_idx = 0; ar_idx = 0; aw_idx = 0; lm_idx = 0;
    pe_data = '0; rt_data = '0; ar_data = '0; aw_data = '0; lm_data = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // ================= job A: IF in a loop, both branch sides merged =================
    load_vectors(0.5, 4.0);
    clear_cfg();
    c = base();                       // PE0: AB, AC
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(0, c);
    alloc_rd(0, 0, 0); alloc_rd(0, 1, 1); alloc_rd(0, 2, 2);
    c = base();                       // PE1: DC, DB
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(1, c);
    alloc_rd(1, 0, 3); alloc_rd(1, 1, 2); alloc_rd(1, 2, 1);
    c = base();                       // PE2: Y1 = AB + CD, Y2 = AB - CD
    c.src = {SRC_NET, SRC_NET, SRC_NET};
    c.u1 = '{op: OP_FADD, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FSUB, a: LN_X, b: LN_Y, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(2, c);
    route(2, 0, 0); route(2, 1, 3);
    c = base();                       // PE3: X = AC - BD
    c.src = {SRC_NET, SRC_NET, SRC_NET};
    c.u1 = '{op: OP_FSUB, a: LN_X, b: LN_Y, s: LN_Y};
    c.out_t = {OS_X, OS_Y, OS_R1};
    set_pe(3, c);
    route(3, 0, 1); route(3, 1, 4);
    c = base();                       // PE4: select Y1 when X <= 0, else Y2
    c.src = {SRC_NET, SRC_NET, SRC_NET};
    c.cond = CD_LE; c.clane = OS_Y;
    c.out_t = {OS_Y, OS_Y, OS_X};
    c.out_f = {OS_Y, OS_Y, OS_Z};
    set_pe(4, c);
    route(4, 0, 6); route(4, 1, 9); route(4, 2, 7);
    alloc_wr(4, 12);
    for (int j = 0; j < 4; j++) lm_stream(j, 1, 0);
    lm_stream(4, 0, 1);
    run_job("A (IF merge)", 2);
    for (int i = 0; i < N; i++) begin
      mem_read(4, 512 + i, w);
      x  = va[i] * vc[i] - vb[i] * vd[i];
      y1 = va[i] * vb[i] + vc[i] * vd[i];
      y2 = va[i] * vb[i] - vc[i] * vd[i];
      if (absr(x) > 1.0e-3) begin
        if (x <= 0.0) n_take++; else n_nottake++;
        chk(near(to_real(w), (x <= 0.0) ? y1 : y2, 32.0),
            $sformatf("A[%0d] got %f exp %f", i, to_real(w), (x <= 0.0) ? y1 : y2));
      end
    end

    // ================= job B: E = (A + B + C) / D with a noncompute delay =================
    load_vectors(0.25, 8.0);
    cfg_divide(512);
    n_delay++;
    run_job("B ((A+B+C)/D)", 2);
    for (int i = 0; i < N; i++) begin
      mem_read(4, 512 + i, w);
      e = (va[i] + vb[i] + vc[i]) / vd[i];
      chk(near(to_real(w), e, 4.0 * 3.0 * 8.0), $sformatf("B[%0d] got %f exp %f", i, to_real(w), e));
      if (near(to_real(w), e, 96.0)) n_recip++;
    end

    // ================= job C: FFT butterfly, twiddle factor from the register file =================
    load_vectors(0.1, 2.0);
    cs = 0.7071067811865476; sn = -0.7071067811865476;
    rf_write(0, cs); rf_write(1, sn);
    cs = to_real(to_word(cs)); sn = to_real(to_word(sn));
    clear_cfg();
    c = base();                       // PE5: G cos, G sin
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(5, c);
    alloc_rd(5, 0, 2); alloc_rd(5, 1, K + 0); alloc_rd(5, 2, K + 1);
    c = base();                       // PE6: H sin, H cos
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(6, c);
    alloc_rd(6, 0, 3); alloc_rd(6, 1, K + 1); alloc_rd(6, 2, K + 0);
    for (int p = 0; p < 4; p++) begin  // PE0..PE3: E/F +- (...)
      c = base();
      // E or F enters port C and waits there for the products (one PE
      // and one routing hop: KPE + BETA cycles of noncompute delay)
      c.src = {SRC_MEM, SRC_NET, SRC_NET};
      c.cdly = DLY_W'(KPE + BETA);
      c.u1 = (p < 2) ? '{op: OP_FSUB, a: LN_X, b: LN_Y, s: LN_Y}
                     : '{op: OP_FADD, a: LN_X, b: LN_Y, s: LN_Y};
      c.u2 = (p % 2 == 0) ? '{op: OP_FADD, a: LN_Z, b: LN_R1, s: LN_Y}
                          : '{op: OP_FSUB, a: LN_Z, b: LN_R1, s: LN_Y};
      c.out_t = {OS_X, OS_Y, OS_R2};
      set_pe(p, c);
      alloc_rd(p, 2, (p < 2) ? 0 : 1);
      if (p < 2) begin route(p, 0, 15); route(p, 1, 18); end   // G cos, H sin
      else       begin route(p, 0, 16); route(p, 1, 19); end   // G sin, H cos
      n_cdelay++;
      alloc_wr(4 + p, 3 * p);
    end
    for (int j = 0; j < 4; j++) lm_stream(j, 1, 0);
    for (int j = 4; j < 8; j++) lm_stream(j, 0, 1);
    run_job("C (butterfly)", 1);
    for (int i = 0; i < N; i++) begin
      t1 = vc[i] * cs - vd[i] * sn;
      t2 = vc[i] * sn + vd[i] * cs;
      mem_read(4, 512 + i, w); chk(near(to_real(w), va[i] + t1, 8.0), $sformatf("C.A[%0d]", i));
      mem_read(5, 512 + i, w); chk(near(to_real(w), va[i] - t1, 8.0), $sformatf("C.B[%0d]", i));
      mem_read(6, 512 + i, w); chk(near(to_real(w), vb[i] + t2, 8.0), $sformatf("C.C[%0d]", i));
      mem_read(7, 512 + i, w); chk(near(to_real(w), vb[i] - t2, 8.0), $sformatf("C.D[%0d]", i));
      if (near(to_real(w), vb[i] - t2, 8.0)) n_rf++;
    end

    // ================= job D: interval multiply [a,b] x [c,d] =================
    load_vectors(0.1, 4.0);
    clear_cfg();
    c = base();                       // PE0: a*c, a*d
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(0, c);
    alloc_rd(0, 0, 0); alloc_rd(0, 1, 2); alloc_rd(0, 2, 3);
    c = base();                       // PE1: b*c, b*d
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(1, c);
    alloc_rd(1, 0, 1); alloc_rd(1, 1, 2); alloc_rd(1, 2, 3);
    for (int p = 2; p < 6; p++) begin  // compare PEs: port0 = max, port1 = min
      c = base();
      c.src = {SRC_NET, SRC_NET, SRC_NET};
      c.u1 = '{op: OP_FSUB, a: LN_X, b: LN_Y, s: LN_Y};
      c.cond = CD_GE; c.clane = OS_R1;
      c.out_t = {OS_R1, OS_Y, OS_X};
      c.out_f = {OS_R1, OS_X, OS_Y};
      set_pe(p, c);
    end
    route(2, 0, 0); route(2, 1, 1);   // compare a*c, a*d
    route(3, 0, 3); route(3, 1, 4);   // compare b*c, b*d
    route(4, 0, 6); route(4, 1, 9);   // max of maxima
    route(5, 0, 7); route(5, 1, 10);  // min of minima
    alloc_wr(4, 15 + 1);              // PE5 port 1: min
    alloc_wr(5, 12 + 0);              // PE4 port 0: max
    for (int j = 0; j < 4; j++) lm_stream(j, 1, 0);
    lm_stream(4, 0, 1); lm_stream(5, 0, 1);
    run_job("D (interval multiply)", 2);
    for (int i = 0; i < N; i++) begin
      p1 = va[i] * vc[i]; p2 = va[i] * vd[i]; p3 = vb[i] * vc[i]; p4 = vb[i] * vd[i];
      mx = p1; mn = p1;
      if (p2 > mx) mx = p2; if (p3 > mx) mx = p3; if (p4 > mx) mx = p4;
      if (p2 < mn) mn = p2; if (p3 < mn) mn = p3; if (p4 < mn) mn = p4;
      if (p1 >= p2) n_cmp_keep++; else n_cmp_swap++;
      mem_read(4, 512 + i, w); chk(near(to_real(w), mn, 16.0), $sformatf("D.min[%0d] got %f exp %f", i, to_real(w), mn));
      mem_read(5, 512 + i, w); chk(near(to_real(w), mx, 16.0), $sformatf("D.max[%0d] got %f exp %f", i, to_real(w), mx));
    end

    // ================= job E: complex divide (a + jb) / (c + jd), as in Fig. 7a =================
    // c^2 -> c^2 + d^2 -> two reciprocal PEs -> two output PEs: c = 4 hops.
    // The four cross products are ready long before 1/(c^2 + d^2), so they
    // wait 3*(KPE + BETA) cycles in routing-network delays.
    load_vectors(0.5, 4.0);
    clear_cfg();
    c = base();                       // PE0: c*c
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.out_t = {OS_X, OS_Y, OS_R1};
    set_pe(0, c);
    alloc_rd(0, 0, 2); alloc_rd(0, 1, 2);
    c = base();                       // PE1: c*c + d*d, d waits on port C
    c.src = {SRC_MEM, SRC_NET, SRC_NET};
    c.cdly = DLY_W'(KPE + BETA);
    c.u1 = '{op: OP_FMUL, a: LN_Z, b: LN_Z, s: LN_Y};
    c.u2 = '{op: OP_FADD, a: LN_X, b: LN_R1, s: LN_Y};
    c.out_t = {OS_X, OS_Y, OS_R2};
    set_pe(1, c);
    route(1, 0, 0); alloc_rd(1, 2, 3);
    n_cdelay++;
    c = base();                       // PE2: ROM guess and first Newton step
    c.src = {SRC_NET, SRC_NET, SRC_NET};
    c.rom_x = 1'b1;
    c.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_NR_STEP,     a: LN_X, b: LN_R1, s: LN_Y};
    c.out_t = {OS_Z, OS_Y, OS_R2};
    set_pe(2, c);
    route(2, 1, 3);
    c = base();                       // PE3: second Newton step, 1/(c^2 + d^2)
    c.src = {SRC_NET, SRC_NET, SRC_NET};
    c.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_NR_LAST,     a: LN_X, b: LN_R1, s: LN_Y};
    c.out_t = {OS_Z, OS_Y, OS_R2};
    set_pe(3, c);
    route(3, 0, 6); route(3, 1, 7);
    c = base();                       // PE4: a*c, a*d
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.out_t = {OS_X, OS_R1, OS_R2};
    set_pe(4, c);
    alloc_rd(4, 0, 0); alloc_rd(4, 1, 2); alloc_rd(4, 2, 3);
    c = base();                       // PE5: b*c, b*d
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    c.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.out_t = {OS_X, OS_R2, OS_R1};
    set_pe(5, c);
    alloc_rd(5, 0, 1); alloc_rd(5, 1, 2); alloc_rd(5, 2, 3);
    for (int p = 6; p < 8; p++) begin  // PE6: (ac + bd)/(c^2 + d^2), PE7: (bc - ad)/(...)
      c = base();
      c.src = {SRC_NET, SRC_NET, SRC_NET};
      c.u1 = (p == 6) ? '{op: OP_FADD, a: LN_X, b: LN_Y, s: LN_Y}
                      : '{op: OP_FSUB, a: LN_X, b: LN_Y, s: LN_Y};
      c.u2 = '{op: OP_FMUL, a: LN_R1, b: LN_Z, s: LN_Y};
      c.out_t = {OS_X, OS_Y, OS_R2};
      set_pe(p, c);
      route(p, 2, 9);
      alloc_wr(4 + (p - 6), 3 * p);
    end
    route(6, 0, 12, 3 * (KPE + BETA)); route(6, 1, 16, 3 * (KPE + BETA));
    route(7, 0, 15, 3 * (KPE + BETA)); route(7, 1, 13, 3 * (KPE + BETA));
    n_delay++;
    for (int j = 0; j < 4; j++) lm_stream(j, 1, 0);
    lm_stream(4, 0, 1); lm_stream(5, 0, 1);
    run_job("E (complex divide)", 4);
    for (int i = 0; i < N; i++) begin
      mn = vc[i] * vc[i] + vd[i] * vd[i];
      p1 = (va[i] * vc[i] + vb[i] * vd[i]) / mn;
      p2 = (vb[i] * vc[i] - va[i] * vd[i]) / mn;
      mem_read(4, 512 + i, w); chk(near(to_real(w), p1, 8.0), $sformatf("E.re[%0d] got %f exp %f", i, to_real(w), p1));
      if (near(to_real(w), p1, 8.0)) n_cdiv++;
      mem_read(5, 512 + i, w); chk(near(to_real(w), p2, 8.0), $sformatf("E.im[%0d] got %f exp %f", i, to_real(w), p2));
    end

    // ================= job F: polynomial by Horner's rule, coefficients in registers =================
    // y = ((a3*x + a2)*x + a1)*x + a0: three PEs in a chain (c = 2); each
    // computes r*x + a_i and passes x on.  Register operands are always
    // valid, so they need no delay matching.
    load_vectors(0.1, 1.0);
    rf_write(2, 0.75); rf_write(3, -0.5); rf_write(4, 0.625); rf_write(5, 0.3);
    clear_cfg();
    for (int p = 0; p < 3; p++) begin
      c = base();
      if (p > 0) c.src = {SRC_MEM, SRC_NET, SRC_NET};
      c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
      c.u2 = '{op: OP_FADD, a: LN_R1, b: LN_Z, s: LN_Y};
      c.out_t = {OS_X, OS_Y, OS_R2};
      set_pe(p, c);
      if (p == 0) begin alloc_rd(0, 0, K + 2); alloc_rd(0, 1, 0); end
      else begin route(p, 0, 3 * (p - 1)); route(p, 1, 3 * (p - 1) + 1); end
      alloc_rd(p, 2, K + 3 + p);
    end
    alloc_wr(4, 6);
    lm_stream(0, 1, 0); lm_stream(4, 0, 1);
    run_job("F (Horner)", 2);
    for (int i = 0; i < N; i++) begin
      e = ((0.75 * va[i] - 0.5) * va[i] + 0.625) * va[i] + 0.3;
      mem_read(4, 512 + i, w); chk(near(to_real(w), e, 2.0), $sformatf("F[%0d] got %f exp %f", i, to_real(w), e));
      if (near(to_real(w), e, 2.0)) n_horner++;
    end

    // ================= job G: inner product through the PE's own feedback =================
    // One PE: R1 = A*B, R2 = fed-back E + R1, E = R2.  The loop is seven
    // cycles long, so seven interleaved partial sums build up; every one
    // is written to memory, and the last seven add up to the inner product.
    // No reset between jobs: the feedback port reads zero until its result
    // port carries valid data.
    load_vectors(0.1, 1.0);
    clear_cfg();
    c = base();
    c.src = {SRC_MEM, SRC_FB, SRC_MEM};
    c.fb  = {2'd0, 2'd1, 2'd0};
    c.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    c.u2 = '{op: OP_FADD, a: LN_Y, b: LN_R1, s: LN_Y};
    c.out_t = {OS_Z, OS_R2, OS_X};
    set_pe(0, c);
    alloc_rd(0, 0, 0); alloc_rd(0, 2, 1);
    alloc_wr(4, 1);
    lm_stream(0, 1, 0); lm_stream(1, 1, 0); lm_stream(4, 0, 1);
    run_job("G (inner product)", 0);
    e = 0.0;
    for (int i = 0; i < N; i++) begin
      x = 0.0;
      for (int j = i % KPE; j <= i; j += KPE) x += va[j] * vb[j];
      mem_read(4, 512 + i, w); chk(near(to_real(w), x, 8.0), $sformatf("G[%0d] got %f exp %f", i, to_real(w), x));
      if (i >= N - KPE) e += to_real(w);
    end
    x = 0.0;
    for (int i = 0; i < N; i++) x += va[i] * vb[i];
    chk(near(e, x, 16.0), $sformatf("G inner product got %f exp %f", e, x));
    if (near(e, x, 16.0)) n_fb++;

    // ================= job H: the network of job B on a full memory, N = DEPTH =================
    for (int i = 0; i < DEPTH; i++) begin
      for (int j = 0; j < 4; j++) begin
        big[j][i] = rnd(0.25, 8.0) * (($urandom % 2) ? 1.0 : -1.0);
        mem_write(j, i, to_word(big[j][i])); big[j][i] = to_real(to_word(big[j][i]));
      end
    end
    cfg_divide(0);
    run_job("H ((A+B+C)/D, full memory)", 2, DEPTH);
    for (int i = 0; i < DEPTH; i++) begin
      e = (big[0][i] + big[1][i] + big[2][i]) / big[3][i];
      mem_read(4, i, w);
      chk(near(to_real(w), e, 96.0), $sformatf("H[%0d] got %f exp %f", i, to_real(w), e));
      if (i == DEPTH - 1 && near(to_real(w), e, 96.0)) n_full++;
    end

    // ================= job I: interval divide [a,b] / [c,d] on all ten PEs =================
    // [a,b] x [1/d, 1/c]: two PEs form 1/c, two form 1/d, two multiply, four
    // compare (c = 4).  a and b come straight from memory and wait
    // 2*(KPE + BETA) cycles on port C for the reciprocals.
    load_vectors(0.5, 4.0);
    for (int i = 0; i < N; i++) begin      // divisor intervals away from zero
      vc[i] = absr(vc[i]); vd[i] = absr(vd[i]);
      mem_write(2, i, to_word(vc[i])); mem_write(3, i, to_word(vd[i]));
    end
    clear_cfg();
    for (int r = 0; r < 2; r++) begin      // PE0/1: 1/c, PE2/3: 1/d
      c = base();
      c.rom_x = 1'b1;
      c.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
      c.u2 = '{op: OP_NR_STEP,     a: LN_X, b: LN_R1, s: LN_Y};
      c.out_t = {OS_Z, OS_Y, OS_R2};
      set_pe(2 * r, c);
      alloc_rd(2 * r, 1, 2 + r);
      c = base();
      c.src = {SRC_NET, SRC_NET, SRC_NET};
      c.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
      c.u2 = '{op: OP_NR_LAST,     a: LN_X, b: LN_R1, s: LN_Y};
      c.out_t = {OS_Z, OS_Y, OS_R2};
      set_pe(2 * r + 1, c);
      route(2 * r + 1, 0, 6 * r); route(2 * r + 1, 1, 6 * r + 1);
    end
    for (int p = 4; p < 6; p++) begin      // PE4: a/c, a/d; PE5: b/c, b/d
      c = base();
      c.src = {SRC_MEM, SRC_NET, SRC_NET};
      c.cdly = DLY_W'(2 * (KPE + BETA));
      c.u1 = '{op: OP_FMUL, a: LN_Z, b: LN_Y, s: LN_Y};
      c.u2 = '{op: OP_FMUL, a: LN_Z, b: LN_X, s: LN_Y};
      c.out_t = {OS_X, OS_R2, OS_R1};
      set_pe(p, c);
      route(p, 0, 9); route(p, 1, 3);
      alloc_rd(p, 2, p - 4);
      n_cdelay++;
    end
    for (int p = 6; p < 10; p++) begin     // compare PEs: port0 = max, port1 = min
      c = base();
      c.src = {SRC_NET, SRC_NET, SRC_NET};
      c.u1 = '{op: OP_FSUB, a: LN_X, b: LN_Y, s: LN_Y};
      c.cond = CD_GE; c.clane = OS_R1;
      c.out_t = {OS_R1, OS_Y, OS_X};
      c.out_f = {OS_R1, OS_X, OS_Y};
      set_pe(p, c);
    end
    route(6, 0, 12); route(6, 1, 13);      // a/c vs a/d
    route(7, 0, 15); route(7, 1, 16);      // b/c vs b/d
    route(8, 0, 18); route(8, 1, 21);      // max of maxima
    route(9, 0, 19); route(9, 1, 22);      // min of minima
    alloc_wr(4, 27 + 1);                   // PE9 port 1: lower bound
    alloc_wr(5, 24 + 0);                   // PE8 port 0: upper bound
    for (int j = 0; j < 4; j++) lm_stream(j, 1, 0);
    lm_stream(4, 0, 1); lm_stream(5, 0, 1);
    run_job("I (interval divide, 10 PEs)", 4);
    for (int i = 0; i < N; i++) begin
      p1 = va[i] / vc[i]; p2 = va[i] / vd[i]; p3 = vb[i] / vc[i]; p4 = vb[i] / vd[i];
      mx = p1; mn = p1;
      if (p2 > mx) mx = p2; if (p3 > mx) mx = p3; if (p4 > mx) mx = p4;
      if (p2 < mn) mn = p2; if (p3 < mn) mn = p3; if (p4 < mn) mn = p4;
      mem_read(4, 512 + i, w); chk(near(to_real(w), mn, 16.0), $sformatf("I.min[%0d] got %f exp %f", i, to_real(w), mn));
      if (near(to_real(w), mn, 16.0)) n_idiv++;
      mem_read(5, 512 + i, w); chk(near(to_real(w), mx, 16.0), $sformatf("I.max[%0d] got %f exp %f", i, to_real(w), mx));
    end

    // ---- every mechanism must have happened ----
    $display("mechanisms: reconfig=%0d cdelay=%0d delay=%0d recip=%0d regfile=%0d branch_taken=%0d branch_not=%0d cmp_keep=%0d cmp_swap=%0d cdiv=%0d horner=%0d feedback=%0d full=%0d idiv=%0d",
             n_reconf, n_cdelay, n_delay, n_recip, n_rf, n_take, n_nottake, n_cmp_keep, n_cmp_swap, n_cdiv, n_horner, n_fb, n_full, n_idiv);
    chk(n_reconf == 9, "reconfiguration");
    chk(n_idiv > 0, "interval divide on all PEs");
    chk(n_full > 0, "full-memory job");
    chk(n_fb > 0, "inner product by feedback");
    chk(n_horner > 0, "polynomial");
    chk(n_cdiv > 0, "complex divide");
    chk(n_delay > 0 && n_recip > 0, "routing noncompute delay / reciprocal");
    chk(n_cdelay > 0 && n_rf > 0, "port C noncompute delay");
    chk(n_rf > 0, "register file operands");
    chk(n_take > 0 && n_nottake > 0, "both branch sides");
    chk(n_cmp_keep > 0 && n_cmp_swap > 0, "compare both ways");
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (200000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

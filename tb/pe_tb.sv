// pe_tb: self-checking test of one PE pipeline and of two PEs in cascade.
// Programs the PE for the functions the processor builds from it and streams
// random operands, one set per cycle:
//   two products side by side (a*c, a*d), floating inner-product step y + x*z,
//   logic x OR (y AND z), fixed-point add, compare (max/min through the
//   branch-controlled Transmit multiplexer), a noncompute delay on port C,
//   accumulation through the Transmit-to-Receive feedback, and the
//   reciprocal 1/B over two cascaded PEs (ROM guess plus two Newton steps).
// Expected values are computed with real arithmetic; the latency of each
// result stream (7 cycles per PE) and its rate (one result per cycle) are
// checked too.
module pe_tb;
  import arith_pkg::*;
  import tb_pkg::*;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  pe_cfg_t           cfg1, cfg2;
  flit_t [NPORT-1:0] mem1, net1, out1, mem2, out2;

  pe dut1 (.clk(clk), .rst_n(rst_n), .cfg(cfg1), .mem_in(mem1), .net_in(net1), .out(out1));
  pe dut2 (.clk(clk), .rst_n(rst_n), .cfg(cfg2), .mem_in(mem2), .net_in(out1), .out(out2));

  int checks = 0, failures = 0;
  int cyc = 0;
  always @(posedge clk) cyc <= cyc + 1;

  localparam int N = 24;
  localparam real TOL = 1.0e-5;

  word_t xs [N], ys [N], zs [N];
  flit_t got1 [$][NPORT];
  int    t1 [$];
  flit_t got2 [$][NPORT];
  int    t2 [$];

  always @(negedge clk) begin
    flit_t a [NPORT];
    flit_t b [NPORT];
    for (int p = 0; p < NPORT; p++) begin a[p] = out1[p]; b[p] = out2[p]; end
    if (out1[0].v || out1[1].v || out1[2].v) begin got1.push_back(a); t1.push_back(cyc); end
    if (out2[0].v || out2[1].v || out2[2].v) begin got2.push_back(b); t2.push_back(cyc); end
  end

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

  // stream N operand sets; z is presented zlead cycles ahead of x and y
  task automatic stream(int zlead, output int t0);
    got1.delete(); t1.delete(); got2.delete(); t2.delete();
    @(negedge clk);
    t0 = cyc + zlead;
    for (int i = 0; i < N + zlead; i++) begin
      mem1[0] = (i >= zlead) ? '{v: 1'b1, w: xs[i-zlead]} : '0;
      mem1[1] = (i >= zlead) ? '{v: 1'b1, w: ys[i-zlead]} : '0;
      mem1[2] = (i < N)      ? '{v: 1'b1, w: zs[i]}       : '0;
      @(negedge clk);
    end
    mem1 = '0;
    repeat (30) @(negedge clk);
  endtask

  task automatic fill_rand(real lo, real hi);
    for (int i = 0; i < N; i++) begin
      xs[i] = to_word(rnd(lo, hi) * (($urandom % 2) ? 1.0 : -1.0));
      ys[i] = to_word(rnd(lo, hi) * (($urandom % 2) ? 1.0 : -1.0));
      zs[i] = to_word(rnd(lo, hi) * (($urandom % 2) ? 1.0 : -1.0));
    end
  endtask

  task automatic check_stream(int t0, int lat, string name);
    chk(got1.size() == N, $sformatf("%s: %0d results, expected %0d", name, got1.size(), N));
    if (got1.size() > 0) begin
      chk(t1[0] - t0 == lat, $sformatf("%s: latency %0d, expected %0d", name, t1[0] - t0, lat));
      chk(t1[got1.size()-1] - t1[0] == got1.size() - 1, $sformatf("%s: not one result per cycle", name));
    end
  endtask

  int t0;
  real acc [7];
  real s, e;

  initial begin
    cfg1 = base(); cfg2 = base(); mem1 = '0; net1 = '0; mem2 = '0;
    repeat (3) @(negedge clk);
    rst_n = 1;

    // 1. two products side by side: r1 = x*y, r2 = x*z
    fill_rand(0.01, 100.0);
    cfg1 = base();
    cfg1.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Y, s: LN_Y};
    cfg1.u2 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    cfg1.out_t = {OS_X, OS_R2, OS_R1};
    stream(0, t0);
    check_stream(t0, 7, "mul2");
    for (int i = 0; i < N && i < got1.size(); i++) begin
      chk(close(to_real(got1[i][0].w), to_real(xs[i]) * to_real(ys[i]), TOL), $sformatf("mul2 r1 %0d", i));
      chk(close(to_real(got1[i][1].w), to_real(xs[i]) * to_real(zs[i]), TOL), $sformatf("mul2 r2 %0d", i));
      chk(got1[i][2].w == xs[i], "mul2 pass x");
    end

    // 2. floating inner-product step y + x*z
    cfg1 = base();
    cfg1.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    cfg1.u2 = '{op: OP_FADD, a: LN_Y, b: LN_R1, s: LN_Y};
    cfg1.out_t = {OS_Z, OS_R2, OS_X};
    stream(0, t0);
    check_stream(t0, 7, "madd");
    for (int i = 0; i < N && i < got1.size(); i++) begin
      e = to_real(ys[i]) + to_real(xs[i]) * to_real(zs[i]);
      chk(close(to_real(got1[i][1].w), e, 1.0e-4) || absr(to_real(got1[i][1].w) - e) < 1.0e-3,
          $sformatf("madd %0d got %f exp %f", i, to_real(got1[i][1].w), e));
    end

    // 3. logic x OR (y AND z)
    cfg1 = base();
    cfg1.u1 = '{op: OP_AND, a: LN_Y, b: LN_Z, s: LN_Y};
    cfg1.u2 = '{op: OP_OR,  a: LN_X, b: LN_R1, s: LN_Y};
    cfg1.out_t = {OS_Z, OS_R2, OS_X};
    for (int i = 0; i < N; i++) begin xs[i] = word_t'($urandom); ys[i] = word_t'($urandom); zs[i] = word_t'($urandom); end
    stream(0, t0);
    check_stream(t0, 7, "logic");
    for (int i = 0; i < N && i < got1.size(); i++)
      chk(got1[i][1].w == (xs[i] | (ys[i] & zs[i])), $sformatf("logic %0d", i));

    // 4. fixed-point add and subtract of fractions
    cfg1 = base();
    cfg1.u1 = '{op: OP_IADD, a: LN_X, b: LN_Y, s: LN_Y};
    cfg1.u2 = '{op: OP_ISUB, a: LN_X, b: LN_Y, s: LN_Y};
    cfg1.out_t = {OS_Z, OS_R2, OS_R1};
    for (int i = 0; i < N; i++) begin
      xs[i] = '{e: '0, m: MW'($urandom)}; ys[i] = '{e: '0, m: MW'($urandom)};
    end
    stream(0, t0);
    check_stream(t0, 7, "fixed");
    for (int i = 0; i < N && i < got1.size(); i++) begin
      chk(got1[i][0].w.m == MW'(xs[i].m + ys[i].m), $sformatf("iadd %0d", i));
      chk(got1[i][1].w.m == MW'(xs[i].m - ys[i].m), $sformatf("isub %0d", i));
    end

    // 5. compare: r1 = x - y; max on port 0, min on port 1 (condition r1 >= 0)
    fill_rand(0.01, 100.0);
    cfg1 = base();
    cfg1.u1 = '{op: OP_FSUB, a: LN_X, b: LN_Y, s: LN_Y};
    cfg1.cond = CD_GE; cfg1.clane = OS_R1;
    cfg1.out_t = {OS_R1, OS_Y, OS_X};
    cfg1.out_f = {OS_R1, OS_X, OS_Y};
    stream(0, t0);
    check_stream(t0, 7, "compare");
    for (int i = 0; i < N && i < got1.size(); i++) begin
      s = to_real(xs[i]); e = to_real(ys[i]);
      chk(to_real(got1[i][0].w) == ((s >= e) ? s : e), $sformatf("max %0d", i));
      chk(to_real(got1[i][1].w) == ((s >= e) ? e : s), $sformatf("min %0d", i));
    end

    // 6. noncompute delay on port C: z arrives 5 cycles early, product still pairs
    cfg1 = base();
    cfg1.cdly = DLY_W'(5);
    cfg1.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    cfg1.out_t = {OS_Z, OS_Y, OS_R1};
    stream(5, t0);
    check_stream(t0, 7, "cdelay");
    for (int i = 0; i < N && i < got1.size(); i++)
      chk(close(to_real(got1[i][0].w), to_real(xs[i]) * to_real(zs[i]), TOL), $sformatf("cdelay %0d", i));

    // 7. feedback: y := own result port 1, accumulate x*z (7 interleaved sums)
    cfg1 = base();
    cfg1.src = {SRC_MEM, SRC_FB, SRC_MEM};
    cfg1.fb  = {2'd0, 2'd1, 2'd0};
    cfg1.u1 = '{op: OP_FMUL, a: LN_X, b: LN_Z, s: LN_Y};
    cfg1.u2 = '{op: OP_FADD, a: LN_Y, b: LN_R1, s: LN_Y};
    cfg1.out_t = {OS_Z, OS_R2, OS_X};
    fill_rand(0.1, 2.0);
    stream(0, t0);          // no reset: the feedback starts from zero by itself
    s = 0.0;
    for (int i = 0; i < N; i++) s += to_real(xs[i]) * to_real(zs[i]);
    chk(got1.size() == N, "inner product result count");
    // the last seven results are the seven interleaved partial sums
    e = 0.0;
    for (int k = N - 7; k < N && k < got1.size(); k++) e += to_real(got1[k][1].w);
    chk(close(e, s, 1.0e-4), $sformatf("inner product got %f exp %f", e, s));
    // once the stream has passed, the loop has drained to zero
    chk(out1[1].w == '0, "feedback loop drained");

    // 8. reciprocal 1/B by two cascaded PEs
    cfg1 = base();
    cfg1.rom_x = 1'b1;
    cfg1.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
    cfg1.u2 = '{op: OP_NR_STEP,     a: LN_X, b: LN_R1, s: LN_Y};
    cfg1.out_t = {OS_Z, OS_Y, OS_R2};
    cfg2 = base();
    cfg2.src = {SRC_NET, SRC_NET, SRC_NET};
    cfg2.u1 = '{op: OP_NR_TWOMINUS, a: LN_X, b: LN_Y, s: LN_Y};
    cfg2.u2 = '{op: OP_NR_LAST,     a: LN_X, b: LN_R1, s: LN_Y};
    cfg2.out_t = {OS_Z, OS_Y, OS_R2};
    fill_rand(0.001, 1000.0);
    rst_n = 0; @(negedge clk); rst_n = 1;   // drop the always-valid feedback lanes still in flight
    ys[0] = to_word(1.0); ys[1] = to_word(-1.0); ys[2] = to_word(0.75); ys[3] = to_word(-3.0);
    ys[4] = to_word(0.50001); ys[5] = to_word(-0.9999);
    stream(0, t0);
    chk(got2.size() == N, $sformatf("recip: %0d results", got2.size()));
    if (got2.size() > 0) chk(t2[0] - t0 == 14, $sformatf("recip latency %0d", t2[0] - t0));
    for (int i = 0; i < N && i < got2.size(); i++)
      chk(close(to_real(got2[i][0].w), 1.0 / to_real(ys[i]), 1.0e-6),
          $sformatf("recip %0d: 1/%f got %f rel %g", i, to_real(ys[i]), to_real(got2[i][0].w), absr(to_real(got2[i][0].w)*to_real(ys[i]) - 1.0)));

    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (5000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

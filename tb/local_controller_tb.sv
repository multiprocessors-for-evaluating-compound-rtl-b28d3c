// local_controller_tb: fills the shadow tables with random configurations,
// runs two jobs and checks that
//   - the active tables keep the old job's values until start, and equal the
//     shadow tables after the reconfiguration;
//   - reconfiguration takes exactly M + K cycles (cfg_cycles) and the go
//     pulse to the memories comes once, right after it;
//   - done comes only after every write-enabled memory has reported n
//     results (the testbench plays the memories' write counters), and cycles
//     counts from start to done.
module local_controller_tb;
  import arith_pkg::*;

  localparam int M = 10, K = 8;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  logic        pe_we = 0, rt_we = 0, ar_we = 0, aw_we = 0, lm_we = 0, start = 0;
  logic [7:0]  pe_idx, rt_idx, ar_idx, aw_idx, lm_idx;
  pe_cfg_t     pe_data;
  route_cfg_t  rt_data;
  alloc_cfg_t  ar_data, aw_data;
  lm_cfg_t     lm_data;
  logic [15:0] n;
  logic        busy, done, lm_go;
  logic [31:0] cycles;
  logic [15:0] cfg_cycles, lm_n;
  pe_cfg_t     pe_cfg [M];
  route_cfg_t  rt_cfg [3*M];
  alloc_cfg_t  ar_cfg [3*M];
  alloc_cfg_t  aw_cfg [K];
  lm_cfg_t     lm_cfg [K];
  logic [15:0] lm_wr_count [K];

  pe_cfg_t    pe_m [M];
  route_cfg_t rt_m [3*M];
  alloc_cfg_t ar_m [3*M];
  alloc_cfg_t aw_m [K];
  lm_cfg_t    lm_m [K];

  int checks = 0, failures = 0;

  local_controller #(.M(M), .K(K)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  task automatic fill();
    for (int i = 0; i < M; i++) begin
      pe_m[i] = pe_cfg_t'({$urandom, $urandom, $urandom, $urandom});
      pe_we = 1; pe_idx = 8'(i); pe_data = pe_m[i]; @(negedge clk); pe_we = 0;
    end
    for (int i = 0; i < 3*M; i++) begin
      rt_m[i] = route_cfg_t'($urandom); ar_m[i] = alloc_cfg_t'($urandom);
      rt_we = 1; ar_we = 1; rt_idx = 8'(i); ar_idx = 8'(i); rt_data = rt_m[i]; ar_data = ar_m[i];
      @(negedge clk); rt_we = 0; ar_we = 0;
    end
    for (int i = 0; i < K; i++) begin
      aw_m[i] = alloc_cfg_t'($urandom); lm_m[i] = lm_cfg_t'({$urandom, $urandom, $urandom});
      aw_we = 1; lm_we = 1; aw_idx = 8'(i); lm_idx = 8'(i); aw_data = aw_m[i]; lm_data = lm_m[i];
      @(negedge clk); aw_we = 0; lm_we = 0;
    end
  endtask

  task automatic job(int nn, int run_len);
    int t, go_at, gos;
    pe_cfg_t old0;
    old0 = pe_cfg[0];
    fill();
    chk(pe_cfg[0] == old0, "active table changed before start");
    n = 16'(nn);
    for (int j = 0; j < K; j++) lm_wr_count[j] = '0;
    start = 1; @(negedge clk); start = 0;
    t = 1; go_at = -1; gos = 0;
    while (!done && t < 1000) begin
      if (lm_go) begin gos++; go_at = t; end
      // memories report their results run_len cycles after go
      if (go_at >= 0 && t - go_at >= run_len)
        for (int j = 0; j < K; j++) lm_wr_count[j] = (j == K - 1 && t - go_at < run_len + 3) ? 16'(nn - 1) : 16'(nn);
      @(negedge clk);
      t++;
    end
    chk(done, "done never came");
    chk(gos == 1, $sformatf("%0d go pulses", gos));
    chk(go_at == M + K + 1, $sformatf("go after %0d cycles", go_at));
    chk(cfg_cycles == 16'(M + K), $sformatf("reconfiguration took %0d cycles", cfg_cycles));
    chk(lm_n == 16'(nn), "stream length");
    if (lm_m[K-1].wr_en)
      chk(cycles == 32'(t), $sformatf("cycles %0d, expected %0d", cycles, t));
    for (int i = 0; i < M; i++)   chk(pe_cfg[i] == pe_m[i], $sformatf("PE table %0d", i));
    for (int i = 0; i < 3*M; i++) chk(rt_cfg[i] == rt_m[i] && ar_cfg[i] == ar_m[i], $sformatf("network table %0d", i));
    for (int i = 0; i < K; i++)   chk(aw_cfg[i] == aw_m[i] && lm_cfg[i] == lm_m[i], $sformatf("memory table %0d", i));
    @(negedge clk);
    chk(!busy, "busy after done");
  endtask

  initial begin
    pe_idx = 0; rt_idx = 0; ar_idx = 0; aw_idx = 0; lm_idx = 0; n = 0;
    pe_data = '0; rt_data = '0; ar_data = '0; aw_data = '0; lm_data = '0;
    for (int j = 0; j < K; j++) lm_wr_count[j] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    job(20, 30);
    job(5, 12);
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (3000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

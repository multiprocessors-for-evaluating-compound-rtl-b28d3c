// local_memory_tb: host writes, a strided read stream, a write stream fed by
// valid flits with gaps, and host read-back, on one local memory of the
// default depth.  Checks the read stream's data, order, one-per-cycle rate
// and one-cycle latency after the first address, the write count, and that
// invalid flits are not stored.
module local_memory_tb;
  import arith_pkg::*;

  localparam int DEPTH = 4096, N = 40;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  lm_cfg_t     cfg;
  logic        go = 0;
  logic [15:0] n;
  flit_t       rd_out, wr_in;
  logic [15:0] wr_count;
  logic        h_we = 0;
  logic [15:0] h_addr;
  word_t       h_wdata, h_rdata;
  int checks = 0, failures = 0;

  local_memory #(.DEPTH(DEPTH)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  function automatic word_t pat(int a);
    return word_t'(32'h1357_0000 ^ (a * 32'h9E37));
  endfunction

  initial begin
    int got, first, last;
    cfg = '0; n = '0; h_addr = '0; h_wdata = '0; wr_in = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int a = 0; a < 256; a++) begin
      h_we = 1; h_addr = 16'(a); h_wdata = pat(a); @(negedge clk);
    end
    h_we = 0;
    // read stream: base 5, stride 3; write stream: base 600, stride 2
    cfg = '{rd_en: 1'b1, rd_base: 16'd5, rd_stride: 16'd3, wr_en: 1'b1, wr_base: 16'd600, wr_stride: 16'd2};
    n = 16'(N);
    go = 1; @(negedge clk); go = 0;
    got = 0; first = -1; last = -1;
    for (int t = 0; t < 3 * N; t++) begin
      // feed write flits on every other cycle
      wr_in = '{v: (t % 2 == 0) && (t / 2 < N), w: word_t'(32'hA000_0000 + t / 2)};
      if (rd_out.v) begin
        chk(rd_out.w == pat(5 + 3 * got), $sformatf("read %0d", got));
        if (first < 0) first = t;
        last = t;
        got++;
      end
      @(negedge clk);
    end
    wr_in = '0;
    chk(got == N, $sformatf("read stream gave %0d words", got));
    chk(first == 1, $sformatf("first read word after %0d cycles", first));
    chk(last - first == N - 1, "read stream not one word per cycle");
    chk(wr_count == 16'(N), $sformatf("wr_count %0d", wr_count));
    for (int i = 0; i < N; i++) begin
      h_addr = 16'(600 + 2 * i); @(negedge clk);
      chk(h_rdata == word_t'(32'hA000_0000 + i), $sformatf("written word %0d", i));
      h_addr = 16'(601 + 2 * i); @(negedge clk);
      chk(h_rdata == pat(601 + 2 * i) || 601 + 2 * i >= 256, $sformatf("gap word %0d touched", i));
    end
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

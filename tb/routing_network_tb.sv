// routing_network_tb: random crossbar settings and delays at the default size.
// Every cycle each source carries a fresh random flit; the testbench keeps a
// history and checks that every enabled output shows its selected source
// exactly BETA + dly cycles later (several outputs may share one source),
// and that disabled outputs stay invalid.  Reprograms the crossbar three times.
module routing_network_tb;
  import arith_pkg::*;

  localparam int NSRC = 30, NDST = 30, BETA = 5, DDEPTH = 63, H = 128;

  logic       clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  route_cfg_t cfg [NDST];
  flit_t      src [NSRC];
  flit_t      dst [NDST];
  flit_t      hist [H][NSRC];
  int         cyc = 0;
  int checks = 0, failures = 0;

  routing_network #(.NSRC(NSRC), .NDST(NDST), .BETA(BETA), .DDEPTH(DDEPTH)) dut (.*);

  initial begin
    for (int o = 0; o < NDST; o++) cfg[o] = '0;
    for (int s = 0; s < NSRC; s++) src[s] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int o = 0; o < NDST; o++) begin
        cfg[o].en  = ($urandom % 5) != 0;
        cfg[o].sel = 8'($urandom % NSRC);
        cfg[o].dly = DLY_W'($urandom % (DDEPTH + 1));
      end
      for (int t = 0; t < 120; t++) begin
        for (int s = 0; s < NSRC; s++) begin
          src[s].v = 1'($urandom);
          src[s].w = word_t'($urandom);
          hist[cyc % H][s] = src[s];
        end
        @(posedge clk); #1;
        cyc++;
        if (t >= BETA + DDEPTH + 1) begin
          for (int o = 0; o < NDST; o++) begin
            flit_t e;
            if (cfg[o].en) e = hist[(cyc - BETA - int'(cfg[o].dly)) % H][cfg[o].sel];
            else           e = '0;
            checks++;
            if (dst[o] != e) begin
              failures++;
              if (failures < 10) $display("FAIL out %0d sel %0d dly %0d", o, cfg[o].sel, cfg[o].dly);
            end
          end
        end
        @(negedge clk);
      end
    end
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end

  initial begin
    repeat (2000) @(posedge clk);
    failures++;
    $display("TB_RESULT checks=%0d failures=%0d", checks, failures);
    $finish;
  end
endmodule

// allocation_network_tb: random allocation settings at the default size.
// Memory read streams, register entries and PE result ports carry fresh
// random flits every cycle; each PE memory port must show its selected
// memory or register source, and each memory write port its selected PE
// result port, exactly BETA cycles later.  Disabled ports stay invalid.
module allocation_network_tb;
  import arith_pkg::*;

  localparam int NLM = 8, NREG = 8, NPE = 30, BETA = 5, H = 16;

  logic clk = 0, rst_n = 0;
  always #5 clk = ~clk;

  alloc_cfg_t rd_cfg [NPE];
  alloc_cfg_t wr_cfg [NLM];
  flit_t lm_rd [NLM], rf_rd [NREG], pe_mem [NPE], pe_out [NPE], lm_wr [NLM];
  flit_t h_src [H][NLM + NREG];
  flit_t h_pe  [H][NPE];
  int cyc = 0, checks = 0, failures = 0;

  allocation_network #(.NLM(NLM), .NREG(NREG), .NPE(NPE), .BETA(BETA)) dut (.*);

  task automatic chk(bit ok, string what);
    checks++;
    if (!ok) begin failures++; if (failures < 10) $display("FAIL %s", what); end
  endtask

  initial begin
    for (int o = 0; o < NPE; o++) begin rd_cfg[o] = '0; pe_out[o] = '0; end
    for (int o = 0; o < NLM; o++) begin wr_cfg[o] = '0; lm_rd[o] = '0; end
    for (int o = 0; o < NREG; o++) rf_rd[o] = '0;
    repeat (2) @(negedge clk);
    rst_n = 1;
    for (int round = 0; round < 3; round++) begin
      for (int o = 0; o < NPE; o++) rd_cfg[o] = '{en: ($urandom % 4) != 0, sel: 8'($urandom % (NLM + NREG))};
      for (int o = 0; o < NLM; o++) wr_cfg[o] = '{en: ($urandom % 4) != 0, sel: 8'($urandom % NPE)};
      for (int t = 0; t < 40; t++) begin
        for (int s = 0; s < NLM; s++)  begin lm_rd[s] = flit_t'({$urandom, $urandom}); h_src[cyc % H][s] = lm_rd[s]; end
        for (int s = 0; s < NREG; s++) begin rf_rd[s] = flit_t'({$urandom, $urandom}); h_src[cyc % H][NLM + s] = rf_rd[s]; end
        for (int s = 0; s < NPE; s++)  begin pe_out[s] = flit_t'({$urandom, $urandom}); h_pe[cyc % H][s] = pe_out[s]; end
        @(posedge clk); #1;
        cyc++;
        if (t >= BETA + 1) begin
          for (int o = 0; o < NPE; o++)
            chk(pe_mem[o] == (rd_cfg[o].en ? h_src[(cyc - BETA) % H][rd_cfg[o].sel] : '0),
                $sformatf("PE port %0d", o));
          for (int o = 0; o < NLM; o++)
            chk(lm_wr[o] == (wr_cfg[o].en ? h_pe[(cyc - BETA) % H][wr_cfg[o].sel] : '0),
                $sformatf("LM write port %0d", o));
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

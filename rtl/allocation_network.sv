// allocation_network: connects the local memories and the register file with
// the PEs, both ways.
//
// Read side: each PE memory operand port (A, B or C of some PE; NPE of them)
// selects one source: a read stream of one of NLM local memories (index
// 0..NLM-1) or one register file entry (index NLM..NLM+NREG-1).
// Write side: each local memory write port selects one PE result port.
// Both sides are full crossbars, pipelined in BETA stages, so an operand
// block crosses the allocation network once on its way in and once on its
// way out, as in the processor's macropipeline.
// Latency: BETA cycles each way.  Disabled outputs carry invalid flits.
// The source names this network and its role but not its structure; the
// crossbar form is this design's choice.
module allocation_network
  import arith_pkg::*;
#(
  parameter int NLM  = 8,
  parameter int NREG = 8,
  parameter int NPE  = 30,
  parameter int BETA = 5
) (
  input  logic       clk,
  input  logic       rst_n,
  input  alloc_cfg_t rd_cfg [NPE],
  input  alloc_cfg_t wr_cfg [NLM],
  input  flit_t      lm_rd  [NLM],
  input  flit_t      rf_rd  [NREG],
  output flit_t      pe_mem [NPE],
  input  flit_t      pe_out [NPE],
  output flit_t      lm_wr  [NLM]
);

  flit_t rd_x [NPE];
  flit_t wr_x [NLM];

  always_comb begin
    for (int o = 0; o < NPE; o++) begin
      if (!rd_cfg[o].en)                        rd_x[o] = '0;
      else if (int'(rd_cfg[o].sel) < NLM)        rd_x[o] = lm_rd[int'(rd_cfg[o].sel)];
      else if (int'(rd_cfg[o].sel) < NLM + NREG) rd_x[o] = rf_rd[int'(rd_cfg[o].sel) - NLM];
      else                                       rd_x[o] = '0;
    end
    for (int o = 0; o < NLM; o++) begin
      if (wr_cfg[o].en && int'(wr_cfg[o].sel) < NPE) wr_x[o] = pe_out[int'(wr_cfg[o].sel)];
      else                                           wr_x[o] = '0;
    end
  end

  flit_t rd_p [BETA][NPE];
  flit_t wr_p [BETA][NLM];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int s = 0; s < BETA; s++) begin
        for (int o = 0; o < NPE; o++) rd_p[s][o] <= '0;
        for (int o = 0; o < NLM; o++) wr_p[s][o] <= '0;
      end
    end else begin
      rd_p[0] <= rd_x;
      wr_p[0] <= wr_x;
      for (int s = 1; s < BETA; s++) begin
        rd_p[s] <= rd_p[s-1];
        wr_p[s] <= wr_p[s-1];
      end
    end
  end

  assign pe_mem = rd_p[BETA-1];
  assign lm_wr  = wr_p[BETA-1];

endmodule

// routing_network: the crossbar that links PE result ports to PE operand
// ports, with programmable noncompute delays.
//
// Every one of the NDST outputs (operand port A', B' or C' of some PE) picks
// any one of the NSRC inputs (result port D, E or F of some PE) by its own
// select, so the network is fully connected and non-blocking: any set of
// connections can be held at once, and one source may feed many outputs.
// Each output then passes a programmable delay of 0..DDEPTH cycles, used to
// equalize paths of unequal length, and a BETA-stage pipeline (the network is
// clocked in BETA stages, the beta of the performance model).
// Latency: BETA + cfg.dly cycles.  A disabled output carries invalid flits.
// The source builds this from 8x8 crossbar chips; here it is one crossbar.
module routing_network
  import arith_pkg::*;
#(
  parameter int NSRC   = 30,
  parameter int NDST   = 30,
  parameter int BETA   = 5,
  parameter int DDEPTH = 63
) (
  input  logic       clk,
  input  logic       rst_n,
  input  route_cfg_t cfg [NDST],
  input  flit_t      src [NSRC],
  output flit_t      dst [NDST]
);

  flit_t xb [NDST];
  flit_t dl [NDST];

  always_comb begin
    for (int o = 0; o < NDST; o++) begin
      if (cfg[o].en && int'(cfg[o].sel) < NSRC) xb[o] = src[int'(cfg[o].sel)];
      else                                      xb[o] = '0;
    end
  end

  for (genvar o = 0; o < NDST; o++) begin : g_out
    delay_line #(.DEPTH(DDEPTH)) u_dly (
      .clk(clk), .rst_n(rst_n), .dly(cfg[o].dly), .d(xb[o]), .q(dl[o])
    );

    if (BETA == 0) begin : g_nopipe
      assign dst[o] = dl[o];
    end else begin : g_pipe
      flit_t pipe [BETA];
      always_ff @(posedge clk or negedge rst_n) begin
        if (!rst_n) begin
          for (int s = 0; s < BETA; s++) pipe[s] <= '0;
        end else begin
          pipe[0] <= dl[o];
          for (int s = 1; s < BETA; s++) pipe[s] <= pipe[s-1];
        end
      end
      assign dst[o] = pipe[BETA-1];
    end
  end

endmodule

// pe_receive: the Receive stage of a PE (pipeline stage 1).
//
// Each of the three operand ports x, y, z (ports A, B, C) takes its data from
// the memory side (A, B, C via the allocation network), the network side
// (A', B', C' from the routing network), a feedback result of the same PE's
// Transmit stage (used to accumulate, e.g. an inner product), or zero.
// Port C then passes a programmable noncompute delay (shift registers plus a
// delay select, cdly cycles, 0..CDEPTH), before all three are registered.
// Feedback and zero sources count as always valid.  A feedback port reads
// zero while the fed-back result is invalid, so an accumulation started by
// a new operand stream begins from zero and an idle loop drains to zero;
// the data of any other invalid flit is cleared as well, so idle cycles
// carry zeros through the pipeline.
// Latency: one cycle (plus cdly on port C).
module pe_receive
  import arith_pkg::*;
#(
  parameter int CDEPTH = 63
) (
  input  logic                   clk,
  input  logic                   rst_n,
  input  src_e  [NPORT-1:0]      src,
  input  logic  [NPORT-1:0][1:0] fb,
  input  logic  [DLY_W-1:0]      cdly,
  input  flit_t [NPORT-1:0]      mem_in,
  input  flit_t [NPORT-1:0]      net_in,
  input  flit_t [NPORT-1:0]      fb_in,
  output flit_t [NPORT-1:0]      q
);

  flit_t [NPORT-1:0] sel;
  flit_t             c_dly;

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      unique case (src[p])
        SRC_MEM: sel[p] = mem_in[p];
        SRC_NET: sel[p] = net_in[p];
        SRC_FB:  sel[p] = '{v: 1'b1, w: fb_in[fb[p]].v ? fb_in[fb[p]].w : '0};
        default: sel[p] = '{v: 1'b1, w: '0};
      endcase
      if (!sel[p].v) sel[p].w = '0;
    end
  end

  delay_line #(.DEPTH(CDEPTH)) u_cdelay (
    .clk(clk), .rst_n(rst_n), .dly(cdly), .d(sel[2]), .q(c_dly)
  );

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      q <= '0;
    end else begin
      q[0] <= sel[0];
      q[1] <= sel[1];
      q[2] <= c_dly;
    end
  end

endmodule

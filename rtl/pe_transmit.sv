// pe_transmit: the Transmit stage of a PE (pipeline stage 7).
//
// The branch control evaluates the programmed condition on one lane (a
// normalized word).  A multiplexer then sends, on each of the three result
// ports (D, E, F), the lane chosen for "condition true" or the lane chosen
// for "condition false"; with CD_ALWAYS only the first set is used.  This is
// how both sides of a branch, computed side by side, are merged into one
// result stream, and how a compare returns max and min.  In the source the
// branch control sits in the Receive stage and watches operand B; here it is
// evaluated at Transmit on any lane, which covers that case (lanes x, y, z
// reach Transmit unchanged) and also lets a PE test its own result.
// Latency: one cycle.
module pe_transmit
  import arith_pkg::*;
(
  input  logic              clk,
  input  logic              rst_n,
  input  cond_e             cond,
  input  osel_e             clane,
  input  osel_e [NPORT-1:0] out_t,
  input  osel_e [NPORT-1:0] out_f,
  input  flit_t             x,
  input  flit_t             y,
  input  flit_t             z,
  input  flit_t             r1,
  input  flit_t             r2,
  output flit_t [NPORT-1:0] q
);

  function automatic flit_t lane(osel_e s, flit_t fx, flit_t fy, flit_t fz, flit_t f1, flit_t f2);
    unique case (s)
      OS_X:    return fx;
      OS_Y:    return fy;
      OS_Z:    return fz;
      OS_R1:   return f1;
      default: return f2;
    endcase
  endfunction

  flit_t             cw;
  logic              take;
  flit_t [NPORT-1:0] d;

  assign cw = lane(clane, x, y, z, r1, r2);

  branch_control u_bc (.cond(cond), .w(cw.w), .take(take));

  always_comb begin
    for (int p = 0; p < NPORT; p++) begin
      d[p] = take ? lane(out_t[p], x, y, z, r1, r2) : lane(out_f[p], x, y, z, r1, r2);
      if (cond != CD_ALWAYS) d[p].v = d[p].v & cw.v;
    end
  end

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) q <= '0;
    else        q <= d;
  end

endmodule

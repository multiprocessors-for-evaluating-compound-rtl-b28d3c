// delay_line: programmable noncompute delay for a stream of flits.
//
// A shift register of DEPTH flits with a tap selected by dly: the output is
// the input delayed by dly cycles (dly = 0 passes the input through
// combinationally).  Used on operand port C in the PE Receive stage (the
// shift registers and delay select of the Receive stage) and on every output
// of the routing network, so that operand streams that took paths of unequal
// length meet in step.  The register contents reset to invalid flits.
module delay_line
  import arith_pkg::*;
#(
  parameter int DEPTH = 15
) (
  input  logic             clk,
  input  logic             rst_n,
  input  logic [DLY_W-1:0] dly,
  input  flit_t            d,
  output flit_t            q
);

  flit_t sr [DEPTH];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < DEPTH; i++) sr[i] <= '0;
    end else begin
      sr[0] <= d;
      for (int i = 1; i < DEPTH; i++) sr[i] <= sr[i-1];
    end
  end

  always_comb begin
    if (dly == '0 || int'(dly) > DEPTH) q = d;
    else                                q = sr[int'(dly) - 1];
  end

endmodule

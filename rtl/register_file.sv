// register_file: scalar operands held next to the PEs.
//
// NREG words written by the host (we, idx, wdata) and presented to the
// allocation network as always-valid flits, so a scalar (a twiddle factor
// cos(phi) or sin(phi), the scalar of a scalar-vector product) can be fed to
// a PE operand port on every cycle while vectors stream from the memories.
// Entries reset to zero.  The source places a register file between the
// allocation network and the PEs without describing it; its use for scalar
// operands is this design's choice.
module register_file
  import arith_pkg::*;
#(
  parameter int NREG = 8
) (
  input  logic        clk,
  input  logic        rst_n,
  input  logic        we,
  input  logic [7:0]  idx,
  input  word_t       wdata,
  output flit_t       rd [NREG]
);

  word_t regs [NREG];

  always_ff @(posedge clk or negedge rst_n) begin
    if (!rst_n) begin
      for (int i = 0; i < NREG; i++) regs[i] <= '0;
    end else if (we && int'(idx) < NREG) begin
      regs[int'(idx)] <= wdata;
    end
  end

  always_comb begin
    for (int i = 0; i < NREG; i++) rd[i] = '{v: 1'b1, w: regs[i]};
  end

endmodule

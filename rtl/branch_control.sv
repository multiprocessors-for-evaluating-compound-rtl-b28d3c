// branch_control: evaluates a branch condition on one normalized word.
//
// As the source prescribes, only the sign bit m0 and the leading mantissa bit
// m1 are looked at: x < 0 when m0 = 1, x = 0 when m0 = m1 = 0 (a normalized
// nonzero word always has m0 != m1), x > 0 otherwise.  The result steers the
// Transmit multiplexer, which is how both sides of a branch are merged into a
// single pipeline.
module branch_control
  import arith_pkg::*;
(
  input  cond_e cond,
  input  word_t w,
  output logic  take
);

  logic neg, zero, pos;

  assign neg  = w.m[MW-1];
  assign zero = !w.m[MW-1] && !w.m[MW-2];
  assign pos  = !neg && !zero;

  always_comb begin
    unique case (cond)
      CD_ALWAYS: take = 1'b1;
      CD_LT:     take = neg;
      CD_LE:     take = neg || zero;
      CD_EQ:     take = zero;
      CD_GE:     take = pos || zero;
      CD_GT:     take = pos;
      CD_NE:     take = !zero;
      default:   take = 1'b1;
    endcase
  end

endmodule

// normalize: combinational normalizer of the Normalize stage.
//
// Shifts a two's complement mantissa left until its sign bit and its leading
// mantissa bit differ, lowering the exponent by the shift.  A zero mantissa
// gives the zero word (exponent 0).  Exponent overflow and underflow are not
// detected (the source does not discuss them); the exponent wraps.
module normalize
  import arith_pkg::*;
(
  input  word_t i_w,
  output word_t o_w
);

  int unsigned sh;
  logic        found;

  always_comb begin
    sh    = 0;
    found = 1'b0;
    for (int k = MW - 2; k >= 0; k--) begin
      if (!found) begin
        if (i_w.m[k] != i_w.m[MW-1]) found = 1'b1;
        else                         sh = sh + 1;
      end
    end
    if (i_w.m == '0) begin
      o_w = '0;
    end else begin
      o_w.m = i_w.m <<< sh;
      o_w.e = i_w.e - EW'(sh);
    end
  end

endmodule

// ma_stage: a Multiply/Add stage of the PE pipeline (combinational part).
//
// Runs the muladd core on the operands prepared by the preceding
// Exponent/Logic stage and turns its exact result into a word:
//   floating ops: the result keeps the prepared exponent; a result of
//     magnitude >= 1 is shifted right one place (two places for magnitude
//     >= 2, which only a reciprocal of a mantissa of exactly 1/2 gives) and the
//     exponent raised
//     (full normalization is left to the Normalize stage);
//   fixed-point ops: the fraction is truncated to MW bits (wrapping), exponent 0;
//   2 - (a*b +- b): as fixed point, but the MW bits are an unsigned fraction
//     in [0, 2) that the following a*b +- b step reads as unsigned;
//   a Newton-Raphson step a*b +- b: the implied integer part +-1 (sign of the
//     reference operand) is removed so the estimate stays a fraction, as the
//     next step expects;
//   logic and pass: the Exponent/Logic result is bypassed.
// Truncation (not rounding) is this design's choice.
module ma_stage
  import arith_pkg::*;
(
  input  prep_t p,
  output flit_t r
);

  localparam logic signed [RW-1:0] ONE = RW'(1) << FR;

  ma_op_e               mop;
  logic signed [RW-1:0] res, frac;
  logic signed [RW-1:0] sh0, sh1, sh2;
  logic                 fits, fits2;

  always_comb begin
    unique case (p.op)
      OP_FADD, OP_IADD:        mop = MA_ADD;
      OP_FSUB, OP_ISUB:        mop = MA_SUB;
      OP_NR_TWOMINUS:          mop = MA_TWOMINUS;
      OP_NR_STEP, OP_NR_LAST:  mop = MA_MULACC;
      default:                 mop = MA_MUL;
    endcase
  end

  logic b_uns;
  assign b_uns = (p.op == OP_NR_STEP) || (p.op == OP_NR_LAST);

  muladd u_muladd (.op(mop), .a(p.a), .b(p.b), .neg(p.neg), .b_uns(b_uns), .r(res));

  always_comb begin
    frac = p.neg ? res + ONE : res - ONE;
    sh0  = res >>> (MW - 1);
    sh1  = res >>> MW;
    sh2  = res >>> (MW + 1);
    fits = (res[RW-1:FR] == '0) || (res[RW-1:FR] == '1);
    fits2 = (res[RW-1:FR+1] == '0) || (res[RW-1:FR+1] == '1);
    r.v  = p.v;
    r.w  = '0;
    unique case (p.op)
      OP_FADD, OP_FSUB, OP_FMUL, OP_NR_LAST: begin
        if (fits) begin
          r.w.m = sh0[MW-1:0];
          r.w.e = p.e[EW-1:0];
        end else if (fits2) begin
          r.w.m = sh1[MW-1:0];
          r.w.e = p.e[EW-1:0] + EW'(1);
        end else begin
          r.w.m = sh2[MW-1:0];
          r.w.e = p.e[EW-1:0] + EW'(2);
        end
      end
      OP_IADD, OP_ISUB, OP_IMUL: begin
        r.w.m = sh0[MW-1:0];
      end
      OP_NR_TWOMINUS: begin
        // B' = 2 - A'B is close to 1 from either side; it is kept as an
        // unsigned fraction in [0, 2), which the next step reads as such.
        r.w.m = sh0[MW-1:0];
      end
      OP_NR_STEP: begin
        r.w.m = MW'(frac >>> (MW - 1));
        r.w.e = p.e[EW-1:0];
      end
      default: r.w = p.lres;
    endcase
  end

endmodule
